// Self-checking testbench of the health tests (default parameters: NBITS 21,
// window 1024, cutoff 588, FAIL_THRESH 64).
//
// The expected outputs come from a behavioural reference written from the test
// definitions: the Repetition Count Test as a run-length counter (error while the
// current run of equal samples is at least NBITS long), the Adaptive Proportion
// Test as a count of ones per 1024-sample window checked against [1024-CUTOFF,
// CUTOFF] and reported in the cycle after the window's last sample, and a
// consecutive-error count. The stimulus mixes directed phases (runs of exactly 20
// and 21 equal bits, windows with 588/589 and 436/435 ones, a stuck source until
// total failure) with random bits of varying bias and random enable gaps.
`timescale 1ns / 1ps
module tb_health_test;
  localparam int unsigned NBITS = 21, W = 1024, CUTOFF = 588, FAIL_THRESH = 64;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic b = 1'b0;
  logic error, total_failure;
  int   checks = 0, failures = 0;
  int   n_rct = 0, n_apt = 0, n_total = 0;

  health_test dut (.clk_i(clk), .rst_ni(rst_n), .enable_i(en), .rnd_bit_i(b),
                   .error_o(error), .total_failure_o(total_failure));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int  run_len = 1;      // length of the current run (reset pattern alternates)
  bit  last_bit = 1'b0;  // value of the most recent sample (reset pattern ends in 0)
  int  win_pos = 0;
  int  ones = 0;
  bit  apt_flag = 0;
  int  consec = 0;

  function automatic bit ref_error();
    return (run_len >= int'(NBITS)) || apt_flag;
  endfunction

  // compare before the edge, then update the reference with the sampled input
  always @(posedge clk) if (rst_n) begin
    bit e;
    e = ref_error();
    checks++;
    if (error !== e) begin
      failures++;
      $display("FAIL t=%0t: error %b expected %b (run %0d apt %b)", $time, error, e, run_len, apt_flag);
    end
    checks++;
    if (total_failure !== (e && consec == int'(FAIL_THRESH) - 1)) begin
      failures++;
      $display("FAIL t=%0t: total_failure %b expected %b", $time, total_failure, !total_failure);
    end
    if (e && run_len >= int'(NBITS)) n_rct++;
    if (apt_flag) n_apt++;
    if (total_failure) n_total++;
    if (en) begin
      consec = e ? ((consec == int'(FAIL_THRESH) - 1) ? consec : consec + 1) : 0;
      if (b == last_bit) run_len++; else run_len = 1;
      last_bit = b;
      ones += b;
      if (win_pos == int'(W) - 1) begin
        apt_flag = (ones > int'(CUTOFF)) || (ones < int'(W - CUTOFF));
        ones = 0;
        win_pos = 0;
      end else begin
        apt_flag = 0;
        win_pos++;
      end
    end
  end

  // drive one sample on the negative edge
  task automatic drive(input bit v, input bit e = 1'b1);
    @(negedge clk);
    b  = v;
    en = e;
  endtask

  // a window of W samples with exactly k ones, spread so that no run reaches 20
  task automatic window_with_ones(input int k);
    int placed = 0;
    for (int i = 0; i < int'(W); i++) begin
      // Bresenham spreading of k ones over W slots
      bit v = ((i + 1) * k / int'(W)) != (i * k / int'(W));
      placed += v;
      drive(v);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // align with the window start: window counter starts at 0 on reset
    // phase 1: balanced windows at the four boundary counts
    window_with_ones(512);
    window_with_ones(588);
    window_with_ones(589);
    window_with_ones(436);
    window_with_ones(435);
    // phase 2: runs of 20 and 21 equal bits
    for (int r = 0; r < 2; r++) begin
      for (int i = 0; i < 20 + r; i++) drive(1'b1);
      drive(1'b0);
      for (int i = 0; i < 20 + r; i++) drive(1'b0);
      drive(1'b1);
    end
    // phase 3: random bits with varying bias and enable gaps
    for (int blk = 0; blk < 30; blk++) begin
      int bias = 30 + int'($urandom % 41);  // percent of ones
      for (int i = 0; i < 1000; i++) drive(($urandom % 100) < bias, ($urandom % 16) != 0);
    end
    // phase 4: stuck source until total failure
    for (int i = 0; i < 200; i++) drive(1'b1);
    drive(1'b0);
    drive(1'b1);
    checks++;
    if (n_rct == 0 || n_apt == 0 || n_total == 0) begin
      failures++;
      $display("FAIL: mechanism not exercised rct=%0d apt=%0d total=%0d", n_rct, n_apt, n_total);
    end
    $display("mechanisms: rct_error_cycles=%0d apt_errors=%0d total_failure_cycles=%0d", n_rct, n_apt, n_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
