// Workload testbench: statistics of the raw bit stream of the TRNG at its default
// parameters (32 rings of 13 inverters, 1.1 ns clock), on N_BITS = 30,000 bits.
//
// The acknowledge input is held high, so the control unit cycles WAIT -> ES32 ->
// WAIT_FOR_ACK -> WAIT without a host; every bit sampled while dff_en is high is
// collected. Three tests of the NIST SP 800-22 suite are computed on the fly, each
// passing at significance 0.01:
//   - frequency (monobit): |S_n| / sqrt(n) < 2.576 (erfc(x / sqrt 2) >= 0.01);
//   - block frequency, M = 128: chi^2 = 4M sum (pi_i - 1/2)^2 over N blocks, tested
//     with the normal approximation (chi^2 - N) / sqrt(2N) < 2.326;
//   - runs: |V_n - 2n pi (1 - pi)| / (2 sqrt(2n) pi (1 - pi)) < 1.821
//     (erfc >= 0.01), after the monobit pre-test |pi - 1/2| < 2 / sqrt(n).
// Also checked: the health tests raise no error and the control unit never leaves
// the WAIT / ES32 / WAIT_FOR_ACK loop after warm-up, and each key equals the 32
// bits collected for it.
`timescale 1ns / 1ps
module tb_nist_stream;
  import trng_pkg::*;
  localparam int N_BITS = 30000;
  localparam int M      = 128;
  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      enable = 1'b0;
  logic      ack = 1'b1;
  logic [31:0] key;
  logic      key_ready, intr, flush;
  cu_state_e state;
  int        checks = 0, failures = 0;

  trng dut (.clk_i(clk), .rst_ni(rst_n), .enable_i(enable), .ack_read_i(ack),
            .out_key_o(key), .key_ready_o(key_ready), .trng_intr_o(intr),
            .flush_regs_o(flush), .state_o(state));

  always #0.55 clk = ~clk;

  initial begin : watchdog
    repeat (N_BITS * 2) @(posedge clk);
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

  // collection (only after warm-up, so that the stream is the one keys are made of)
  int          n = 0, ones = 0, runs = 0, blk_ones = 0, n_blocks = 0, n_keys = 0;
  int          errors_seen = 0, bad_states = 0;
  real         chi_sum = 0.0;
  logic        prev = 1'b0;
  logic [31:0] shadow = '0;
  logic        collecting = 1'b0;

  always @(posedge clk) begin
    if (rst_n && dut.error_s) errors_seen++;
    if (collecting && (state == CU_BIST || state == CU_DEAD || state == CU_IDLE)) bad_states++;
    if (key_ready) begin
      n_keys++;
      if (key != shadow) begin
        failures++;
        $display("FAIL t=%0t: key %h, collected %h", $time, key, shadow);
      end
      checks++;
    end
    if (state == CU_WAIT) collecting <= 1'b1;
    if (dut.dff_en_s && state == CU_WAIT && n < N_BITS) begin
      shadow <= {shadow[30:0], dut.rnd_bit_s};
      if (dut.rnd_bit_s) ones++;
      if (n == 0 || dut.rnd_bit_s != prev) runs++;
      prev <= dut.rnd_bit_s;
      if (dut.rnd_bit_s) blk_ones++;
      if ((n + 1) % M == 0) begin
        chi_sum += (real'(blk_ones) / M - 0.5) ** 2;
        n_blocks++;
        blk_ones = 0;
      end
      n++;
    end
  end

  initial begin
    real s_obs, pi, chi2, z_blk, v_stat;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    while (n < N_BITS) @(negedge clk);
    // frequency
    s_obs = real'(2 * ones - N_BITS) / $sqrt(real'(N_BITS));
    if (s_obs < 0) s_obs = -s_obs;
    check(s_obs < 2.576, $sformatf("frequency test: |S_n|/sqrt(n) = %f", s_obs));
    // block frequency
    chi2  = 4.0 * M * chi_sum;
    z_blk = (chi2 - n_blocks) / $sqrt(2.0 * n_blocks);
    check(z_blk < 2.326, $sformatf("block frequency test: chi2 = %f over %0d blocks", chi2, n_blocks));
    // runs
    pi = real'(ones) / N_BITS;
    check((pi > 0.5 ? pi - 0.5 : 0.5 - pi) < 2.0 / $sqrt(real'(N_BITS)), "runs pre-test");
    v_stat = (real'(runs) - 2.0 * N_BITS * pi * (1.0 - pi));
    if (v_stat < 0) v_stat = -v_stat;
    v_stat = v_stat / (2.0 * $sqrt(2.0 * N_BITS) * pi * (1.0 - pi));
    check(v_stat < 1.821, $sformatf("runs test: statistic %f (%0d runs)", v_stat, runs));
    check(errors_seen == 0, $sformatf("%0d health-test error cycles", errors_seen));
    check(bad_states == 0, "control unit left the key loop");
    check(n_keys >= N_BITS / 32 - 1, $sformatf("only %0d keys", n_keys));
    $display("stream: %0d bits, %0d ones (%f), %0d runs, block chi2 %f, %0d keys",
             N_BITS, ones, pi, runs, chi2, n_keys);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
