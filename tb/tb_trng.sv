// Self-checking testbench of the TRNG core at its default parameters (32 rings of
// 13 inverters, 32-bit key, warm-up 64 cycles), clocked at 909 MHz (1.1 ns).
//
// Scenario and checks:
//   1. enable pulse: the first key must be ready exactly 1 + 64 + 32 = 97 cycles
//      later when the health tests report no error on the way (otherwise later);
//   2. every key must equal the last 32 raw bits that the testbench itself saw
//      leave the noise source while sampling was enabled (oldest bit in the MSB),
//      must stay stable until acknowledged, and must come 33 cycles after the
//      acknowledge; key_ready and the interrupt must be one-cycle pulses;
//   3. 24 keys: all distinct, 40-60 % ones overall;
//   4. holding enable high for 35 cycles stops the rings; the stuck bit stream
//      must trip the repetition test, send the control unit back to warm-up and
//      recover with a new key afterwards;
//   5. holding enable high for 150 cycles must end in the DEAD state, which must
//      persist after enable is released.
// Each mechanism (key, acknowledge, error recovery, total failure) is counted and
// must have happened at least once.
`timescale 1ns / 1ps
module tb_trng;
  import trng_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b0;
  logic        ack = 1'b0;
  logic [31:0] key;
  logic        key_ready, intr, flush;
  cu_state_e   state;
  int          checks = 0, failures = 0;
  int          n_keys = 0, n_acks = 0, n_recover = 0, n_dead = 0;

  trng dut (.clk_i(clk), .rst_ni(rst_n), .enable_i(enable), .ack_read_i(ack),
            .out_key_o(key), .key_ready_o(key_ready), .trng_intr_o(intr),
            .flush_regs_o(flush), .state_o(state));

  always #0.55 clk = ~clk;

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

  // raw bits seen by the testbench, and health-test errors seen
  logic [31:0] ref_key = '0;
  int          errors_seen = 0;
  always @(posedge clk) begin
    if (dut.dff_en_s) ref_key <= {ref_key[30:0], dut.rnd_bit_s};
    if (dut.error_s && dut.enable_ht_s) errors_seen++;
  end

  logic [31:0] keys [$];

  // wait for key_ready, return cycles waited
  task automatic wait_key(output int cycles);
    cycles = 0;
    while (!key_ready && cycles < 5000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // check and acknowledge a ready key
  task automatic take_key();
    logic [31:0] k;
    check(key_ready && intr, "key_ready / interrupt not raised");
    check(key == ref_key, $sformatf("key %h, raw bits %h", key, ref_key));
    k = key;
    keys.push_back(k);
    n_keys++;
    @(negedge clk);
    check(!key_ready && !intr, "key_ready longer than one cycle");
    repeat (20) begin
      check(key == k && state == CU_WAIT_FOR_ACK, "key not held until acknowledge");
      @(negedge clk);
    end
    ack = 1'b1;
    @(negedge clk);
    ack = 1'b0;
    n_acks++;
  endtask

  initial begin
    int cyc, e0, ones;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    // 1. first key
    e0 = errors_seen;
    enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    wait_key(cyc);
    cyc++;
    if (errors_seen == e0) check(cyc == 97, $sformatf("first key after %0d cycles, expected 97", cyc));
    else check(cyc > 97, "first key too early");
    take_key();
    // 2./3. further keys
    for (int i = 1; i < 24; i++) begin
      e0 = errors_seen;
      wait_key(cyc);
      if (errors_seen == e0) check(cyc == 32, $sformatf("key %0d after %0d cycles, expected 32", i, cyc));
      take_key();
    end
    ones = 0;
    for (int i = 0; i < keys.size(); i++) begin
      ones += $countones(keys[i]);
      for (int j = 0; j < i; j++) check(keys[i] != keys[j], "repeated key");
    end
    check(ones > 307 && ones < 461, $sformatf("%0d ones in 768 key bits", ones));
    $display("ones in keys: %0d/768", ones);
    // 4. transient stall of the rings, right after an acknowledge (state WAIT)
    enable = 1'b1;
    repeat (35) @(negedge clk);
    enable = 1'b0;
    check(state == CU_BIST, $sformatf("stalled rings did not cause warm-up (state %s)", state.name()));
    if (state == CU_BIST) n_recover++;
    wait_key(cyc);
    check(key_ready, "no key after recovery");
    take_key();
    // 5. permanent stall
    enable = 1'b1;
    repeat (150) @(negedge clk);
    enable = 1'b0;
    check(state == CU_DEAD, $sformatf("no total failure (state %s)", state.name()));
    repeat (200) begin
      @(negedge clk);
      check(state == CU_DEAD && !key_ready && !dut.dff_en_s, "DEAD state left");
    end
    if (state == CU_DEAD) n_dead++;
    $display("mechanisms: keys=%0d acks=%0d error_recoveries=%0d total_failures=%0d health_error_cycles=%0d",
             n_keys, n_acks, n_recover, n_dead, errors_seen);
    check(n_keys > 0 && n_acks > 0 && n_recover > 0 && n_dead > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
