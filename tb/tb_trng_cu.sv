// Self-checking testbench of the TRNG control unit (default LATENCY 64,
// WAIT_CONST 32).
//
// Directed scenarios, each checked cycle by cycle against the expected state
// sequence and output decoding:
//   1. enable -> BIST for 64 cycles -> WAIT for 32 -> ES32 (one cycle, ready and
//      interrupt) -> WAIT_FOR_ACK until ack -> WAIT -> ES32 again after 33 cycles;
//   2. an error during WAIT returns to BIST; BIST restarts its count only after the
//      error clears, so the next key arrives error_cycles + 64 + 32 cycles later;
//   3. total failure -> DEAD, outputs off, enable and ack ignored.
`timescale 1ns / 1ps
module tb_trng_cu;
  import trng_pkg::*;
  localparam int unsigned LATENCY = 64, WAIT_CONST = 32;
  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      enable = 1'b0, ack = 1'b0, err = 1'b0, tot = 1'b0;
  logic      en_ht, dff_en, flush, ready, intr;
  cu_state_e state;
  int        checks = 0, failures = 0;

  trng_cu dut (.clk_i(clk), .rst_ni(rst_n), .enable_i(enable), .ack_read_i(ack),
               .error_i(err), .tot_fail_i(tot), .enable_ht_o(en_ht), .dff_en_o(dff_en),
               .flush_regs_o(flush), .rnd_ready_o(ready), .trng_intr_o(intr), .state_o(state));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s (state %s)", $time, what, state.name());
    end
  endtask

  // output decoding expected in each state
  task automatic check_outputs();
    bit run = (state == CU_BIST) || (state == CU_WAIT);
    check(dff_en == run && en_ht == run, "dff_en / enable_ht decoding");
    check(flush == (state == CU_BIST), "flush_regs decoding");
    check(ready == (state == CU_ES32) && intr == (state == CU_ES32), "ready / interrupt decoding");
  endtask

  // wait n cycles expecting state s throughout
  task automatic expect_for(input cu_state_e s, input int n, input string what);
    for (int i = 0; i < n; i++) begin
      check(state == s, $sformatf("%s: cycle %0d expected %s", what, i, s.name()));
      check_outputs();
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_for(CU_IDLE, 5, "idle without enable");
    // 1. normal flow
    enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    expect_for(CU_BIST, LATENCY, "warm-up");
    expect_for(CU_WAIT, WAIT_CONST, "key collection");
    expect_for(CU_ES32, 1, "key ready");
    expect_for(CU_WAIT_FOR_ACK, 10, "waiting for ack");
    ack = 1'b1;
    @(negedge clk);
    ack = 1'b0;
    expect_for(CU_WAIT, WAIT_CONST, "second key collection");
    expect_for(CU_ES32, 1, "second key ready");
    ack = 1'b1;
    @(negedge clk);
    ack = 1'b0;
    // 2. error in WAIT, held 7 cycles
    expect_for(CU_WAIT, 5, "third key collection");
    err = 1'b1;
    @(negedge clk);
    expect_for(CU_BIST, 6, "error held");
    err = 1'b0;
    expect_for(CU_BIST, LATENCY, "warm-up after error");
    expect_for(CU_WAIT, WAIT_CONST, "collection after error");
    expect_for(CU_ES32, 1, "key after error");
    // error while waiting for ack also returns to warm-up
    expect_for(CU_WAIT_FOR_ACK, 3, "waiting for ack");
    err = 1'b1;
    @(negedge clk);
    err = 1'b0;
    expect_for(CU_BIST, 10, "error during wait for ack");
    // 3. total failure
    err = 1'b1;
    tot = 1'b1;
    @(negedge clk);
    err = 1'b0;
    tot = 1'b0;
    enable = 1'b1;
    ack = 1'b1;
    expect_for(CU_DEAD, 20, "dead");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
