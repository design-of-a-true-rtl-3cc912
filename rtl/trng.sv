// True random number generator without conditioning.
//
// The noise source (32 rings of 13 inverters, XORed) produces one raw random bit
// per clock. The bit feeds both the key shift register and the health tests. The
// control unit starts the noise-source sampling, the health tests and the shift
// register with dff_en / enable_ht, runs a warm-up (BIST) of LATENCY error-free
// cycles, collects WAIT_CONST = N_BITS_KEY bits into the key, then raises
// key_ready_o and trng_intr_o for one cycle and holds the key in out_key_o until
// ack_read_i. A health-test error sends it back to warm-up; a total failure stops it
// for good (DEAD) until reset.
//
// Interface: enable_i is a pulse (it both starts the FSM and releases the rings),
// ack_read_i acknowledges the key, flush_regs_o is high during warm-up and may
// clear an external key buffer. With no errors the first key is ready
// 1 + LATENCY + N_BITS_KEY cycles after enable_i is seen (IDLE, BIST, WAIT), each
// following one N_BITS_KEY + 1 cycles after the acknowledge.
//
// The block structure and connections follow the design; parameter defaults not
// fixed by it (LATENCY, FAIL_THRESH, CUTOFF) are explained in the sub-modules.
`timescale 1ns / 1ps
module trng
  import trng_pkg::*;
#(
  parameter int unsigned N_RO        = 32,
  parameter int unsigned N_INV       = 13,
  parameter int unsigned N_BITS_KEY  = 32,
  parameter int unsigned NBITS       = 21,
  parameter int unsigned WINDOW      = 1024,
  parameter int unsigned CUTOFF      = 588,
  parameter int unsigned FAIL_THRESH = 64,
  parameter int unsigned LATENCY     = 64,
  parameter int unsigned SEED_BASE   = 1
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  logic                  enable_i,
  input  logic                  ack_read_i,
  output logic [N_BITS_KEY-1:0] out_key_o,
  output logic                  key_ready_o,
  output logic                  trng_intr_o,
  output logic                  flush_regs_o,
  output cu_state_e             state_o
);

  logic rnd_bit_s;
  logic dff_en_s;
  logic enable_ht_s;
  logic error_s;
  logic tot_fail_s;

  noise_source #(
    .N_RO      (N_RO),
    .N_INV     (N_INV),
    .SEED_BASE (SEED_BASE)
  ) u_noise_source (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .enable_i  (enable_i),
    .dff_en_i  (dff_en_s),
    .rnd_bit_o (rnd_bit_s)
  );

  health_test #(
    .NBITS       (NBITS),
    .WINDOW      (WINDOW),
    .CUTOFF      (CUTOFF),
    .FAIL_THRESH (FAIL_THRESH)
  ) u_health_test (
    .clk_i           (clk_i),
    .rst_ni          (rst_ni),
    .enable_i        (enable_ht_s),
    .rnd_bit_i       (rnd_bit_s),
    .error_o         (error_s),
    .total_failure_o (tot_fail_s)
  );

  trng_cu #(
    .LATENCY    (LATENCY),
    .WAIT_CONST (N_BITS_KEY)
  ) u_cu (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .enable_i     (enable_i),
    .ack_read_i   (ack_read_i),
    .error_i      (error_s),
    .tot_fail_i   (tot_fail_s),
    .enable_ht_o  (enable_ht_s),
    .dff_en_o     (dff_en_s),
    .flush_regs_o (flush_regs_o),
    .rnd_ready_o  (key_ready_o),
    .trng_intr_o  (trng_intr_o),
    .state_o      (state_o)
  );

  key_shift_reg #(
    .N_BITS_KEY (N_BITS_KEY)
  ) u_shift_reg (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .en_i   (dff_en_s),
    .bit_i  (rnd_bit_s),
    .key_o  (out_key_o)
  );

endmodule
