// Self-checking testbench of the TRNG with Keccak conditioning (default
// parameters), clocked at 714 MHz (1.4 ns).
//
// conditioning = 0: the key must be the raw TRNG key (the last 32 raw bits seen by
// the testbench), key ready must come from the TRNG, and a standalone Keccak run on
// a random 1600-bit input must match the testbench's own Keccak-f[1600] model
// with its interrupt 24 cycles after start.
// conditioning = 1: each key must be the low 32 bits of Keccak-f[1600] applied to
// the zero-extended raw TRNG key, ready exactly 24 cycles after the TRNG finished
// the raw key, with the Keccak interrupt line kept low.
`timescale 1ns / 1ps
module tb_trng_keccak;
  import trng_pkg::*;
  import keccak_ref_pkg::*;
  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          enable = 1'b0, ack = 1'b0, cond = 1'b0, kstart = 1'b0;
  logic [1599:0] kin = '0;
  logic [31:0]   key;
  logic          key_ready, intr, flush, kstatus, kintr;
  logic [1599:0] kout;
  cu_state_e     state;
  int            checks = 0, failures = 0;
  int            n_plain = 0, n_cond = 0, n_standalone = 0;

  trng_keccak dut (.clk_i(clk), .rst_ni(rst_n), .enable_i(enable), .ack_read_i(ack),
                   .conditioning_i(cond), .keccak_start_i(kstart), .keccak_in_i(kin),
                   .out_key_o(key), .key_ready_o(key_ready), .trng_intr_o(intr),
                   .flush_regs_o(flush), .trng_state_o(state), .keccak_out_o(kout),
                   .keccak_status_o(kstatus), .keccak_intr_o(kintr));

  always #0.7 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  logic [31:0] raw_key = '0;
  int          kintr_count = 0;
  int          cycle = 0;
  int          trng_done_cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (dut.u_trng.dff_en_s) raw_key <= {raw_key[30:0], dut.u_trng.rnd_bit_s};
    if (kintr && rst_n) kintr_count++;
  end
  // cycle (counted between clock edges) in which the raw key is ready
  always @(negedge clk) if (state == CU_ES32) trng_done_cycle = cycle;

  task automatic wait_ready();
    int n = 0;
    while (!key_ready && n < 5000) begin
      @(negedge clk);
      n++;
    end
    check(key_ready, "key never ready");
  endtask

  task automatic acknowledge();
    @(negedge clk);
    ack = 1'b1;
    @(negedge clk);
    ack = 1'b0;
  endtask

  initial begin
    logic [1599:0] r, expect_out;
    logic [31:0]   raw;
    int            start_cycle;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    // conditioning off: plain keys, and a standalone Keccak run in between
    for (int i = 0; i < 3; i++) begin
      wait_ready();
      check(intr && key == raw_key, $sformatf("plain key %h, raw %h", key, raw_key));
      n_plain++;
      for (int w = 0; w < 50; w++) r[32*w +: 32] = $urandom;
      kin = r;
      kstart = 1'b1;
      start_cycle = cycle;
      @(negedge clk);
      kstart = 1'b0;
      while (!kstatus) @(negedge clk);
      check(cycle - start_cycle == 24, $sformatf("standalone Keccak took %0d cycles", cycle - start_cycle));
      check(kout == permute(r), "standalone Keccak output");
      n_standalone++;
      acknowledge();
    end
    check(kintr_count == 3, $sformatf("%0d Keccak interrupts for 3 standalone runs", kintr_count));
    // conditioning on
    cond = 1'b1;
    kintr_count = 0;
    for (int i = 0; i < 4; i++) begin
      wait_ready();
      raw = raw_key;
      expect_out = permute(1600'(raw));
      check(intr, "conditioned key without interrupt");
      check(key == expect_out[31:0], $sformatf("conditioned key %h, expected %h", key, expect_out[31:0]));
      check(cycle - trng_done_cycle == 24, $sformatf("conditioned key %0d cycles after raw key", cycle - trng_done_cycle));
      check(key != raw, "conditioned key equals raw key");
      n_cond++;
      repeat (5) @(negedge clk);
      check(key == expect_out[31:0], "conditioned key not held");
      acknowledge();
    end
    check(kintr_count == 0, "Keccak interrupt in conditioning mode");
    $display("mechanisms: plain_keys=%0d conditioned_keys=%0d standalone_keccak=%0d", n_plain, n_cond, n_standalone);
    check(n_plain > 0 && n_cond > 0 && n_standalone > 0, "a mode never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
