# Ring-oscillator true random number generator with Keccak conditioning

This is a true random number generator (TRNG) built as a memory-mapped accelerator
for a small RISC-V microcontroller. It is meant to supply key material to
post-quantum algorithms such as CRYSTALS-Kyber.

Randomness comes from the timing jitter of free-running ring oscillators.

- 32 rings of 13 inverters run side by side.
- Every clock, the system clock samples each ring.
- The 32 samples are XORed into one raw bit per cycle.

Two continuous health tests watch the raw stream:

- the **repetition count test** catches a stuck source;
- the **adaptive proportion test** catches a biased one.

A control unit performs these steps:

1. warms the source up;
2. collects 32 bits into a key and raises an interrupt;
3. holds the key until software acknowledges it;
4. goes back to warm-up after a health-test error;
5. shuts down for good if errors persist.

A Keccak-f[1600] permutation can optionally post-process each key. The same block
can also be used on its own as a permutation accelerator. Software reaches
everything through two register files:

- a single control/status register;
- a bank of data words holding the Keccak input, the Keccak output and the key.

```
                       trng_keccak_wrapper (top)
  reg_iface ──► trng_ctrl_regs ──en/ack/start/conditioning──┐
                  ▲ key_ready, keccak_status                ▼
  OBI ──► periph_to_reg ──► trng_data_regs ◄── key, keccak_out ── trng_keccak
                                  └── keccak_in ─────────────────►  ├─ trng
                                                                    │   ├─ noise_source ── 32 × ring_oscillator
                                                                    │   ├─ health_test
                                                                    │   ├─ trng_cu (FSM)
                                                                    │   └─ key_shift_reg
                                                                    └─ keccak (24 rounds, 1 per clock)
  outputs: trng_intr_o, keccak_intr_o, flush_regs_o, trng_state_o
```

## The noise source

Each ring (`ring_oscillator`) has these parts:

- a 2-input OR gate;
- 13 inverters after it;
- a loop from the last inverter back to the OR gate's second input.

With an odd number of inverting stages the loop cannot settle, so it oscillates.
The period is about 2 × 14 gate delays, roughly 7.7 ns, or about 130 MHz.

The OR gate's other input is the **enable**.

- While enable is high, the OR output is forced to 1 and the whole chain settles.
- When enable falls, all rings start together from a known state.
- From then on, their phases drift apart through jitter and their slightly different frequencies.

Enable is therefore a pulse. If it is held high, the output never changes.

`noise_source` samples each ring output with a flip-flop on the system clock. It
then XORs the 32 samples and registers the result once more. The resulting
`rnd_bit` comes two clock edges after the ring values it is built from. Both
flip-flop stages have a clock enable, `dff_en`, driven by the control unit. When
the TRNG is not collecting bits, the sampled state stays frozen.

Why many rings and an XOR:

- A single ring sampled by an unrelated clock gives a bit whose entropy depends on how much jitter builds up between samples.
- The XOR of many weakly random bits is much less biased than any one of them.
- The 32 × 13 point was chosen as a trade-off between area/power and statistical quality. Smaller configurations (down to 4 × 3) failed statistical tests more often.

Both `N_RO` and `N_INV` are parameters. `N_INV` must be odd.

### Simulating a ring

A ring is a combinational loop with no meaning in zero-delay RTL.
`ring_oscillator.sv` is therefore a **behavioural model**: every gate is an `assign`
with its own transport delay.

- Each ring draws a nominal delay uniformly from 275–281 ps.
- Each gate adds its own fixed Gaussian offset with σ = 30 ps.
- Delays are rounded to 1 ps.
- The numbers are produced at elaboration by a constant function. It uses a linear congruential generator seeded with the `SEED` parameter, and the Gaussian is a sum of 12 uniforms.
- `noise_source` gives ring *i* the seed `SEED_BASE + i`, so the 32 rings run at different frequencies.

Because the delays never change, the simulated source is in fact deterministic. Its
"randomness" is the beat between 32 incommensurate periods and the clock. This is
good enough to exercise every mechanism downstream. It says nothing about the
entropy of real silicon.

In an implementation, the ring must be built from standard cells protected from
logic optimisation (`dont_touch`), with the loop kept in place. Synthesis tools
report each ring as a combinational loop, and that is intended.

## Health tests (`health_test`)

Both tests are the NIST SP 800-90B continuous tests for a binary source. They assume
a false-positive rate α = 2⁻²⁰ and a claimed min-entropy H = 1 bit per sample.

**Repetition count test.** A 21-bit shift register holds the last 21 samples.

- `stuck_at_1` is the AND of all bits; `stuck_at_0` is the AND of their inverses.
- A run of 21 identical bits is an error.
- The length is the test's cutoff, C = 1 + ⌈−log₂α / H⌉ = 21.
- The register resets to `0101…`, so no error can appear before 21 real samples have been shifted in.

**Adaptive proportion test.** This test works on windows of 1024 samples.

- A 10-bit window counter and an accumulator count the ones in each window.
- On the window's last sample, the total is checked. More than `CUTOFF` = 588 ones, or fewer than 1024 − 588 = 436, flags `error_adapt` for one cycle. In other words, 589 or more of either value fails.
- Then the accumulator restarts.
- 589 is the binomial cutoff C: for an unbiased source, P(count ≥ 589) = 8.3·10⁻⁷ ≤ 2⁻²⁰, while P(count ≥ 588) is above 2⁻²⁰.

**Total failure.** `error` is the OR of the three flags. A counter counts *consecutive*
cycles with `error` high and clears on any cycle without error. On the
`FAIL_THRESH`-th consecutive error cycle (default 64), `total_failure` rises.

A short error does not cause a total failure:

- a repetition error only persists while the stuck run lasts;
- a proportion error lasts one cycle.

So total failure means that the source has stopped moving for about 85 cycles. That
is the 21-sample run plus 64 cycles.

All health-test state advances only while the control unit enables it. This happens
exactly when the noise source is being sampled.

## Control unit and timing (`trng_cu`)

| state | what happens | `dff_en`, `enable_ht` | other outputs |
|---|---|---|---|
| IDLE | off; waits for `enable` | 0 | |
| BIST | warm-up and start-up test; LATENCY error-free cycles (`counter_BIST`) | 1 | `flush_regs` = 1 |
| WAIT | WAIT_CONST = 32 cycles shifting bits into the key (`counter_WAIT`) | 1 | |
| ES32 | one cycle: key complete | 0 | `rnd_ready` = `trng_intr` = 1 |
| WAIT_FOR_ACK | key held until `ack_read` | 0 | |
| DEAD | permanent; only reset leaves it | 0 | |

- From BIST, WAIT, ES32 and WAIT_FOR_ACK, `error` sends the FSM back to BIST and clears both counters.
- While `error` stays high, `counter_BIST` stays at 0. BIST therefore ends only after `LATENCY` consecutive clean cycles.
- `total_failure` sends the FSM to DEAD and has priority over `error`.
- `enable` only acts in IDLE, and `error` is ignored in IDLE and DEAD. A running or dead TRNG is restarted by reset.
- `flush_regs_o` is high throughout BIST. A system can use it to clear a copy of the key that may have been taken before the error was seen.

Timeline with default parameters, counting clock edges after the edge that samples `enable`:

```
edge   1        65        97     98
       BIST ... BIST  WAIT ... WAIT  ES32  WAIT_FOR_ACK ... (ack) WAIT ×32  ES32 ...
                                      ▲ key_ready / intr (1 cycle)
```

- The first key is ready 97 cycles after enable.
- Each further key is ready 33 cycles after the acknowledge.
- A software driver reading over the bus sees the key about 110 cycles after its enable write.

In conditioning mode, add 24 cycles to each key.

`key_shift_reg` shifts the new bit in at the LSB (`key <= {key[N-2:0], bit}`)
whenever `dff_en` is high. After WAIT, the 32 bits collected in that state sit in
the register, newest at bit 0.

## Keccak conditioning (`keccak`, `trng_keccak`)

`keccak` computes Keccak-f[1600], one round per clock.

- Lane (x, y) is bits `[64·(x+5y) +: 64]` of the 1600-bit vector. This matches the little-endian byte layout of the Keccak reference, so a byte string absorbed into the state maps directly onto the vector.
- A one-cycle `start_i` loads `data_i` and performs round 0 in the same cycle.
- Rounds 1–23 follow on the next 23 clocks.
- On the 24th edge after start, `status_o` rises and stays high until the next start, and `intr_o` pulses for one cycle.
- A new start while busy restarts the permutation.
- `keccak_pkg` holds the round function (θ, ρ, π, χ, ι). Round constants and rotation offsets are computed from their definitions (the degree-8 LFSR for ι, the triangular-number rule for ρ), not from pasted tables.

`trng_keccak` puts the TRNG and the Keccak block side by side. Each has its own
control unit. The `conditioning` bit selects the mode.

- **conditioning = 0:** the two are independent.
  - The key and the key interrupt come straight from the TRNG.
  - Keccak permutes whatever software wrote into the input words, when software asks.
- **conditioning = 1:** the TRNG's one-cycle ready pulse starts Keccak.
  - The input is the 32-bit key in the low bits of the state, all other bits 0.
  - 24 cycles later, the Keccak completion becomes the key-ready pulse and the TRNG interrupt.
  - The key seen by software is the low 32 bits of the permuted state. Any subset of the output would be equally valid; the low bits are a choice.
  - The standalone Keccak interrupt stays silent in this mode.

Keccak is used here as a fixed mixing function on 32 random bits. It whitens the
output, but cannot add entropy beyond the 32 bits it is given. It also raises the
minimum clock period, from about 1.1 ns to about 1.4 ns in a 65 nm
implementation, since a whole round is evaluated in one cycle.

## Software interface

### Control/status register (register-interface port, offset 0x0)

| bit | name | access | meaning |
|---|---|---|---|
| 0 | TRNG_EN | RW | write 1 then 0: starts the TRNG and releases the rings |
| 1 | ACK_KEY_READ | RW | write 1 after reading a key (then 0); clears bit 2 and lets the TRNG collect the next key |
| 2 | STATUS_TRNG | RO | key ready; set by the key-ready pulse, held until acknowledged |
| 3 | KECCAK_START | W1P | writing 1 starts a standalone permutation; reads 0 |
| 4 | STATUS_KECCAK | RO | Keccak output valid |
| 5 | CONDITIONING | RW | pass TRNG keys through Keccak |

Access rules:

- Byte strobe 0 enables a write.
- The response comes in the same cycle.
- Any other offset answers with an error.

### Data words (OBI port, through `periph_to_reg`)

| offset | words | access | content |
|---|---|---|---|
| 0x000–0x0C4 | 50 | RO | Keccak output, word *i* = bits `[32i +: 32]` |
| 0x0C8 | 1 | RO | key (`N_BITS_KEY` = 32; wider keys take further words) |
| 0x100–0x1C4 | 50 | RW | Keccak input, same bit order; byte strobes honoured |

Access rules:

- Writes to read-only words are ignored.
- Offsets outside these ranges answer with an error.

`periph_to_reg` works as follows:

- it grants an OBI request in the cycle it is presented (the register side is always ready);
- it returns `rvalid`, the read data and `err` one cycle later.

### Driver sequences

Polling:

1. Write `TRNG_EN` = 1, then 0.
2. Poll until `STATUS_TRNG` = 1.
3. Read the key word at 0x0C8.
4. Write `ACK_KEY_READ` = 1, then 0.

Interrupt:

- The same sequence, with the `trng_intr_o` pulse replacing the polling loop.
- The interrupt is a single-cycle pulse. An interrupt controller must latch it, or the handler must check `STATUS_TRNG`.

`ACK_KEY_READ` is a level. If software leaves it at 1, the TRNG keeps replacing
the key every 33 cycles, and the next read finds a fresh key already waiting. Once a
write clears bit 1 (the next enable write does), the TRNG stops again at the next
key and waits for an acknowledge.

For more than 32 bits, repeat steps 2–4. The TRNG resumes collecting only after the
acknowledge, so keys are never reused.

Standalone Keccak:

1. Write the 50 input words.
2. Write `KECCAK_START`.
3. Wait for `keccak_intr_o` or `STATUS_KECCAK`.
4. Read the 50 output words.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N_RO` | 32 | noise_source and up | parallel rings |
| `N_INV` | 13 | ring_oscillator and up | inverters per ring (odd) |
| `N_BITS_KEY` | 32 | trng and up | key width; also the number of WAIT cycles |
| `NBITS` | 21 | health_test | repetition-test cutoff |
| `WINDOW` | 1024 | health_test | proportion-test window |
| `CUTOFF` | 588 | health_test | proportion-test limit: error when the count of ones is > `CUTOFF` or < `WINDOW` − `CUTOFF` |
| `FAIL_THRESH` | 64 | health_test | consecutive error cycles to total failure |
| `LATENCY` | 64 | trng_cu | warm-up cycles |
| `SEED_BASE` | 1 | noise_source | seeds of the simulated ring delays |

For another α or entropy claim, recompute `NBITS` = 1 + ⌈−log₂α / H⌉. `CUTOFF` is
the smallest count c such that P(Binomial(1024, 2^−H) > c) ≤ α, which is one below
the cutoff C of the test.

## What is this design's own choice

The following choices are this implementation's own:

- `LATENCY`, `FAIL_THRESH`, the derivation of `NBITS` and `CUTOFF` from α = 2⁻²⁰.
- Register bit positions and data-word offsets.
- The sticky `STATUS_TRNG` bit and the pulse-type `KECCAK_START`.
- How the key enters and leaves the Keccak state.
- Evaluating the proportion test only at the window end. Checking every sample against a running count would flag the start of every window.
- Holding sampling and health tests while a key waits for its acknowledge.
- `flush_regs` timing.
- `enable` acting only in IDLE.
- The OBI bridge.
- The ring delay generator.

All other behaviour follows the reference architecture:

- the block structure and signal names;
- the six FSM states, their counters and transitions;
- the health-test structure;
- 32 × 13 rings;
- 24-cycle Keccak;
- the split into a control register and a data register file.

Not included:

- the microcontroller the accelerator attaches to, with its bus, interrupt controller and memories;
- software drivers;
- build-system files;
- a shared control unit for TRNG and Keccak (each has its own);
- a parallel-output noise source.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ring_oscillator` | held at 0 while enabled; oscillation after enable falls with period ≈ 2 × 14 gate delays (6.5–9.5 ns), stable with fixed delays; different seeds give different periods; stops when enable rises again |
| `tb_noise_source` | bit = registered XOR of registered ring samples; balance and run length over 8,000 bits; `dff_en` freeze |
| `tb_health_test` | cycle-accurate reference model of all three tests on biased, stuck and random streams; stuck runs of exactly 20 and 21; window boundaries; total failure |
| `tb_trng_cu` | every state transition and output, counter behaviour under error, DEAD is permanent |
| `tb_key_shift_reg` | shifting and enable against a model |
| `tb_trng` | first key at 97 cycles, keys equal to the last 32 sampled bits, ack handshake, error recovery through BIST, DEAD |
| `tb_keccak` | SHA3-256, SHA3-512, SHAKE128 vectors, the zero-state permutation, random states against an independent table-driven model (`keccak_ref_pkg`), 24-cycle latency, restart while busy |
| `tb_trng_keccak` | both modes, conditioned key = low bits of Keccak(key), 24 extra cycles |
| `tb_trng_ctrl_regs`, `tb_trng_data_regs`, `tb_periph_to_reg` | register map, access types, byte strobes, errors, OBI timing |
| `tb_trng_keccak_wrapper` | end to end at default parameters: polled and interrupt-driven keys (≤ 150 cycles each), standalone Keccak through the registers, conditioned keys, repetition-test error and recovery with flush, proportion-test error from a biased source, total failure to DEAD, bus errors on both ports; each mechanism is counted and must occur |
| `tb_kyber_randombytes` | workload: the random bytes of one Kyber key generation (64) and encapsulation (32, raw and conditioned) fetched with the byte-buffer driver sequence; words match the raw bits or their Keccak image, never repeat, each within 150 cycles; about 700 cycles for 64 bytes |
| `tb_nist_stream` | workload: 30,000 raw bits at default parameters with the acknowledge held high; frequency, block-frequency (M = 128) and runs tests of NIST SP 800-22 at significance 0.01, no health-test alarm, every key equal to its 32 collected bits; takes one to two minutes |

The end-to-end bench forces the raw bit of the TRNG to model a degraded source. That
is the only way to make the proportion test fire. With the behavioural rings, a
biased enable pattern produces long runs first.

### Running a simulation

Verilator 5 with `--timing` is needed, because the ring model uses delays. List the
packages first:

```
verilator --binary --timing -Wno-fatal --top-module tb_trng \
  rtl/trng_pkg.sv rtl/keccak_pkg.sv \
  rtl/ring_oscillator.sv rtl/noise_source.sv rtl/health_test.sv rtl/trng_cu.sv \
  rtl/key_shift_reg.sv rtl/trng.sv rtl/keccak.sv rtl/trng_keccak.sv \
  rtl/trng_ctrl_regs.sv rtl/trng_data_regs.sv rtl/periph_to_reg.sv \
  rtl/trng_keccak_wrapper.sv \
  tb/keccak_ref_pkg.sv tb/tb_trng.sv
./obj_dir/Vtb_trng
```

Replace `tb_trng` with any other testbench name. All files use
`` `timescale 1ns / 1ps ``. The ring delays need picosecond precision.

- Simulating the rings is what takes the time: 32 × 14 gates toggling every few hundred picoseconds.
- The end-to-end bench runs for several seconds. Blocks above the noise source accept a stubbed bit source if faster runs are needed.

Tool messages that are expected:

- combinational-loop reports on `ring_oscillator` (the rings);
- a warning that `rst_ni` is used both as an asynchronous reset and in the `disable iff` of the assertions in `trng_cu`, `keccak` and `periph_to_reg`.
