// End-to-end testbench of the memory-mapped TRNG + Keccak accelerator at its
// default parameters (32 rings of 13 inverters, 32-bit key, Keccak-f[1600]),
// clocked at 714 MHz (1.4 ns). The testbench plays the host: it uses the control
// register port and the OBI data port the way a driver would.
//
// Sequences and checks:
//   1. polled key: enable pulse, poll the key-ready bit, read the key word over OBI,
//      acknowledge. The key must equal the last 32 raw noise-source bits (observed
//      in the testbench) and the whole sequence must take under 150 cycles;
//   2. interrupt-driven keys: wait for trng_intr_o instead of polling (6 keys);
//   3. standalone Keccak: write the 50 input words, start, poll the Keccak status,
//      read the 50 output words and compare with the testbench's Keccak model;
//      keccak_intr_o must pulse once;
//   4. conditioned keys: with the conditioning bit set, the key word must be the
//      low 32 bits of Keccak-f[1600] of the zero-extended raw key (3 keys);
//   5. repetition-test error: the enable bit held for 35 cycles stalls the rings;
//      the accelerator must go back to warm-up (flush_regs_o high) and recover;
//   6. proportion-test error: the raw bit is overridden for 2200 cycles by a
//      degraded source (30 % ones, no run over 8); the adaptive proportion test
//      must fire without a total failure;
//   7. total failure: the enable bit held for 150 cycles must end in DEAD, after
//      which no key arrives;
//   8. bus errors on unmapped offsets of both ports.
// Each mechanism is counted and must have happened at least once.
`timescale 1ns / 1ps
module tb_trng_keccak_wrapper;
  import trng_pkg::*;
  import keccak_ref_pkg::*;
  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  reg_req_t  creq = '0;
  reg_rsp_t  crsp;
  obi_req_t  oreq = '0;
  obi_rsp_t  orsp;
  logic      trng_intr, keccak_intr, flush;
  cu_state_e state;
  int        checks = 0, failures = 0;
  int        n_polled = 0, n_intr_keys = 0, n_standalone = 0, n_cond = 0;
  int        n_rct = 0, n_apt = 0, n_dead = 0, n_bus_err = 0, n_flush = 0;

  trng_keccak_wrapper dut (
    .clk_i(clk), .rst_ni(rst_n),
    .ctrl_reg_req_i(creq), .ctrl_reg_rsp_o(crsp),
    .data_obi_req_i(oreq), .data_obi_rsp_o(orsp),
    .trng_intr_o(trng_intr), .keccak_intr_o(keccak_intr),
    .flush_regs_o(flush), .trng_state_o(state));

  always #0.7 clk = ~clk;

  initial begin : watchdog
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // observation of the raw bit stream and of the health-test outcomes
  logic [31:0] raw_key = '0;
  int          cycle = 0;
  int          keccak_intr_count = 0;
  always @(posedge clk) begin
    cycle++;
    if (dut.u_trng_keccak.u_trng.dff_en_s) raw_key <= {raw_key[30:0], dut.u_trng_keccak.u_trng.rnd_bit_s};
    if (dut.u_trng_keccak.u_trng.u_health_test.error_adapt_q && dut.u_trng_keccak.u_trng.enable_ht_s) n_apt++;
    if (keccak_intr && rst_n) keccak_intr_count++;
    if (flush) n_flush++;
  end

  // host accesses
  task automatic ctrl_wr(input logic [31:0] data);
    @(negedge clk);
    creq = '{valid: 1'b1, write: 1'b1, addr: 32'h0, wdata: data, wstrb: 4'hF};
    @(negedge clk);
    creq = '0;
  endtask

  task automatic ctrl_rd(input logic [31:0] addr, output logic [31:0] data, output logic err);
    @(negedge clk);
    creq = '{valid: 1'b1, write: 1'b0, addr: addr, wdata: '0, wstrb: '0};
    #0.1;
    data = crsp.rdata;
    err  = crsp.error;
    @(negedge clk);
    creq = '0;
  endtask

  task automatic obi(input logic we, input logic [31:0] addr, input logic [31:0] wdata,
                     output logic [31:0] rdata, output logic err);
    @(negedge clk);
    oreq = '{req: 1'b1, we: we, be: 4'hF, addr: addr, wdata: wdata};
    #0.1;
    while (!orsp.gnt) begin
      @(negedge clk);
      #0.1;
    end
    @(negedge clk);
    oreq = '0;
    check(orsp.rvalid, "OBI response missing");
    rdata = orsp.rdata;
    err   = orsp.err;
  endtask

  task automatic poll_ready(input int bit_pos);
    logic [31:0] d;
    logic e;
    int n = 0;
    do begin
      ctrl_rd(0, d, e);
      n++;
    end while (!d[bit_pos] && n < 1000);
    check(d[bit_pos], $sformatf("status bit %0d never set", bit_pos));
  endtask

  task automatic wait_intr();
    int n = 0;
    while (!trng_intr && n < 1000) begin
      @(negedge clk);
      n++;
    end
    check(trng_intr, $sformatf("no interrupt (state %s)", state.name()));
  endtask

  task automatic read_key(output logic [31:0] key);
    logic e;
    obi(1'b0, 32'hC8, '0, key, e);
    check(!e, "error reading the key word");
  endtask

  task automatic ack_key(input logic [31:0] extra = '0);
    ctrl_wr(32'h2 | extra);
    ctrl_wr(extra);
  endtask

  initial begin
    logic [31:0]   d, key;
    logic          e;
    logic [1599:0] din, expect_out;
    int            t0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. polled key
    t0 = cycle;
    ctrl_wr(32'h0);
    ctrl_wr(32'h1);
    ctrl_wr(32'h0);
    poll_ready(STATUS_TRNG_BIT);
    read_key(key);
    check(key == raw_key, $sformatf("polled key %h, raw %h", key, raw_key));
    ack_key();
    check(cycle - t0 < 150, $sformatf("polled key sequence took %0d cycles", cycle - t0));
    $display("polled key %h in %0d cycles", key, cycle - t0);
    n_polled++;

    // 2. interrupt-driven keys
    for (int i = 0; i < 6; i++) begin
      wait_intr();
      read_key(key);
      check(key == raw_key, $sformatf("key %h, raw %h", key, raw_key));
      ack_key();
      n_intr_keys++;
    end

    // 3. standalone Keccak
    for (int w = 0; w < 50; w++) begin
      din[32*w +: 32] = $urandom;
      obi(1'b1, 32'h100 + 4 * w, din[32*w +: 32], d, e);
    end
    keccak_intr_count = 0;
    ctrl_wr(32'h8);
    poll_ready(STATUS_KECCAK_BIT);
    expect_out = permute(din);
    for (int w = 0; w < 50; w++) begin
      obi(1'b0, 4 * w, '0, d, e);
      check(d == expect_out[32*w +: 32] && !e, $sformatf("Keccak output word %0d", w));
    end
    check(keccak_intr_count == 1, $sformatf("%0d Keccak interrupts", keccak_intr_count));
    n_standalone++;

    // the TRNG kept a key waiting meanwhile: take it, then switch to conditioning
    poll_ready(STATUS_TRNG_BIT);
    read_key(key);
    ack_key(32'h20);

    // 4. conditioned keys
    for (int i = 0; i < 3; i++) begin
      logic [31:0] raw;
      wait_intr();
      raw = raw_key;
      expect_out = permute(1600'(raw));
      read_key(key);
      check(key == expect_out[31:0], $sformatf("conditioned key %h, expected %h", key, expect_out[31:0]));
      ack_key(32'h20);
      n_cond++;
    end
    check(keccak_intr_count == 1, "Keccak interrupt in conditioning mode");
    ctrl_wr(32'h0);
    wait_intr();
    ack_key();

    // 5. repetition-test error: rings held for 35 cycles right after an acknowledge
    n_flush = 0;
    @(negedge clk);
    creq = '{valid: 1'b1, write: 1'b1, addr: 32'h0, wdata: 32'h1, wstrb: 4'hF};
    repeat (35) @(negedge clk);
    creq = '0;
    ctrl_wr(32'h0);
    check(state == CU_BIST, $sformatf("stalled rings did not cause warm-up (state %s)", state.name()));
    check(n_flush > 0, "flush_regs not raised");
    if (state == CU_BIST) n_rct++;
    wait_intr();
    read_key(key);
    check(key == raw_key, "key after recovery");
    ack_key();

    // 6. proportion-test error: the raw bit is overridden by a degraded source,
    //    30 % ones and no run longer than 8, with the acknowledge held high
    n_apt = 0;
    begin
      int run = 0;
      logic v, prev = 1'b0;
      creq = '{valid: 1'b1, write: 1'b1, addr: 32'h0, wdata: 32'h2, wstrb: 4'hF};
      for (int c = 0; c < 2200; c++) begin
        v = (($urandom % 100) < 30);
        run = (v == prev) ? run + 1 : 1;
        if (run > 8) begin
          v = ~prev;
          run = 1;
        end
        prev = v;
        force dut.u_trng_keccak.u_trng.rnd_bit_s = v;
        @(negedge clk);
      end
      release dut.u_trng_keccak.u_trng.rnd_bit_s;
      creq = '0;
    end
    ctrl_wr(32'h0);
    check(n_apt > 0, "adaptive proportion test never fired");
    check(state != CU_DEAD, "biased stream ended in DEAD");
    poll_ready(STATUS_TRNG_BIT);
    read_key(key);
    ack_key();

    // 7. total failure
    @(negedge clk);
    creq = '{valid: 1'b1, write: 1'b1, addr: 32'h0, wdata: 32'h1, wstrb: 4'hF};
    repeat (150) @(negedge clk);
    creq = '0;
    ctrl_wr(32'h0);
    check(state == CU_DEAD, $sformatf("no total failure (state %s)", state.name()));
    if (state == CU_DEAD) n_dead++;
    ctrl_wr(32'h1);
    ctrl_wr(32'h0);
    repeat (300) begin
      @(negedge clk);
      check(!trng_intr && state == CU_DEAD, "activity after total failure");
    end

    // 8. bus errors
    ctrl_rd(32'h8, d, e);
    check(e, "no error on unmapped control offset");
    n_bus_err += e;
    obi(1'b0, 32'h1F0, '0, d, e);
    check(e, "no error on unmapped data offset");
    n_bus_err += e;

    $display("mechanisms: polled_keys=%0d interrupt_keys=%0d standalone_keccak=%0d conditioned_keys=%0d rct_recoveries=%0d apt_errors=%0d flush_cycles=%0d total_failures=%0d bus_errors=%0d",
             n_polled, n_intr_keys, n_standalone, n_cond, n_rct, n_apt, n_flush, n_dead, n_bus_err);
    check(n_polled > 0 && n_intr_keys > 0 && n_standalone > 0 && n_cond > 0 && n_rct > 0 &&
          n_apt > 0 && n_flush > 0 && n_dead > 0 && n_bus_err > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
