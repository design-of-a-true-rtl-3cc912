// Continuous health tests on the raw bit stream of the noise source.
//
// Repetition Count Test: the last NBITS samples sit in a shift register. When all
// of them are 1 (stuck_at_1) or all are 0 (stuck_at_0) the source has repeated one
// value NBITS times, NBITS being the test's cutoff C = 1 + ceil(-log2(alpha)/H);
// alpha = 2^-20 and H = 1 bit per sample give 21.
//
// Adaptive Proportion Test: a window counter runs over WINDOW = 1024 samples and an
// accumulator counts the ones among them. On the last sample of a window the count
// is compared with the allowed range: more than CUTOFF ones, or fewer than
// WINDOW - CUTOFF, flags error_adapt for one cycle. The accumulator then restarts.
// CUTOFF = 588 puts the failure point at the binomial cutoff C = 589 for
// alpha = 2^-20 at 1 bit of entropy per sample: a count of 589 or more of either
// value fails (P(count >= 589) = 8.3e-7 <= 2^-20 for an unbiased source, while
// P(count >= 588) exceeds 2^-20).
//
// error_o is the OR of the three conditions. A third counter counts consecutive
// cycles with error_o high and clears on a cycle without error; total_failure_o is
// high on the FAIL_THRESH-th consecutive error cycle.
//
// All state advances only while enable_i is high (the control unit enables the
// tests exactly when the noise source is sampled), and holds otherwise. The
// structure (shift register with two AND reductions, accumulator with window
// counter and two comparators, consecutive-error counter) follows the design.
// Evaluating the proportion only at the end of the window, registering that
// result, resetting the repetition register to an alternating 0101... pattern (so
// that no error appears before real samples arrive) and the FAIL_THRESH default of
// 64 are this implementation's choices.
//
// Timing: error_o depends only on registers; a run of NBITS equal bits is flagged
// in the cycle after its last bit is sampled.
`timescale 1ns / 1ps
module health_test #(
  parameter int unsigned NBITS       = 21,
  parameter int unsigned WINDOW      = 1024,
  parameter int unsigned CUTOFF      = 588,
  parameter int unsigned FAIL_THRESH = 64
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic enable_i,
  input  logic rnd_bit_i,
  output logic error_o,
  output logic total_failure_o
);

  localparam int unsigned CNT_W  = $clog2(WINDOW);
  localparam int unsigned ACC_W  = $clog2(WINDOW + 1);
  localparam int unsigned FAIL_W = $clog2(FAIL_THRESH + 1);

  function automatic logic [NBITS-1:0] alternating();
    logic [NBITS-1:0] v;
    for (int i = 0; i < int'(NBITS); i++) v[i] = 1'(i % 2);
    return v;
  endfunction

  // Repetition Count Test
  logic [NBITS-1:0] rep_sr_q;
  logic             stuck_at_1, stuck_at_0;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)       rep_sr_q <= alternating();
    else if (enable_i) rep_sr_q <= {rep_sr_q[NBITS-2:0], rnd_bit_i};
  end

  assign stuck_at_1 = &rep_sr_q;
  assign stuck_at_0 = ~|rep_sr_q;

  // Adaptive Proportion Test
  logic [CNT_W-1:0] win_cnt_q;
  logic [ACC_W-1:0] acc_q;
  logic [ACC_W-1:0] acc_next;
  logic             win_last;
  logic             error_adapt_q;

  assign win_last = (win_cnt_q == CNT_W'(WINDOW - 1));
  assign acc_next = acc_q + ACC_W'(rnd_bit_i);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      win_cnt_q     <= '0;
      acc_q         <= '0;
      error_adapt_q <= 1'b0;
    end else if (enable_i) begin
      if (win_last) begin
        win_cnt_q     <= '0;
        acc_q         <= '0;
        error_adapt_q <= (acc_next > ACC_W'(CUTOFF)) || (acc_next < ACC_W'(WINDOW - CUTOFF));
      end else begin
        win_cnt_q     <= win_cnt_q + CNT_W'(1);
        acc_q         <= acc_next;
        error_adapt_q <= 1'b0;
      end
    end
  end

  assign error_o = stuck_at_1 | stuck_at_0 | error_adapt_q;

  // Consecutive error counter
  logic [FAIL_W-1:0] consec_error_cnt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      consec_error_cnt_q <= '0;
    end else if (enable_i) begin
      if (!error_o)                                            consec_error_cnt_q <= '0;
      else if (consec_error_cnt_q != FAIL_W'(FAIL_THRESH - 1)) consec_error_cnt_q <= consec_error_cnt_q + FAIL_W'(1);
    end
  end

  assign total_failure_o = error_o && (consec_error_cnt_q == FAIL_W'(FAIL_THRESH - 1));

  initial begin
    assert (NBITS >= 2) else $error("NBITS must be at least 2");
    assert (CUTOFF < WINDOW && 2 * CUTOFF >= WINDOW) else $error("CUTOFF out of range");
  end

endmodule
