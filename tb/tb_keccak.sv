// Self-checking testbench of the Keccak-f[1600] accelerator.
//
// Each vector is a single padded sponge block (SHA-3 or SHAKE padding of a short
// message, capacity lanes zero) whose permutation must reproduce the first bytes
// of the published hash or XOF output; the expected values were computed with an
// independent SHA-3 implementation. A fifth check permutes the all-zero state and
// compares the first lane with the known value F1258F7940E1DDE7. Eight random
// states are compared with the testbench's own Keccak model (keccak_ref_pkg), and a
// start while busy must restart on the new input. For every run
// the testbench checks the 24-cycle latency from start to status, that status stays
// low while busy, and that the interrupt pulses exactly once.
`timescale 1ns / 1ps
module tb_keccak;
  import keccak_ref_pkg::*;
  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [1599:0] din = '0;
  logic [1599:0] dout;
  logic          status, intr;
  int            checks = 0, failures = 0;

  keccak dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .data_i(din),
              .data_o(dout), .status_o(status), .intr_o(intr));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [1599:0] in, input logic [1599:0] exp, input int nbytes,
                     input string name);
    int cycles = 0;
    int intrs  = 0;
    bit early  = 0;
    logic [1599:0] mask;
    mask = '0;
    for (int i = 0; i < nbytes * 8; i++) mask[i] = 1'b1;
    @(negedge clk);
    din   = in;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    din   = '0;
    cycles = 1;
    while (!status && cycles < 100) begin
      if (intr) intrs++;
      @(negedge clk);
      cycles++;
    end
    if (intr) intrs++;
    @(negedge clk);
    if (intr) intrs++;
    check(cycles == 24, $sformatf("%s: latency %0d cycles, expected 24", name, cycles));
    check(intrs == 1, $sformatf("%s: %0d interrupt pulses", name, intrs));
    check(((dout ^ exp) & mask) == '0, $sformatf("%s: output mismatch", name));
    check(status == 1'b1, $sformatf("%s: status not held", name));
  endtask

  logic [1599:0] in, exp;
  int nbytes;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(status == 1'b0, "status high after reset");
    // SHAKE128('')
    in  = 1600'h000000000000000000000000000000000000000000000000000000000000000080000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000001f;
    exp = 1344'ha9fcb07cf4eee7aeefbdaa140b587a169f844c5e9fcd0700afa8cc8c364d4723565f76adcfa7cd17ea20513a0b1abf1cbcc8102e30049adf38d5594bcc7bbbefa559c3aadfd6dfbab28550436a5ed235889174d9586a91ab752ffa9a1660d2b862dc233c87ccb835e257aef9e3a1a89c63a3e8584afa016e682afdee0afb3c10934b0088a9eeb13c26ef66faac6e1aeb88bceff693803bd73e850576504560617d828fe8a42b9c7f; nbytes = 168;
    run(in, exp, nbytes, "SHAKE128('')");
    // SHA3-256('abc')
    in  = 1600'h0000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000080000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000006636261;
    exp = 256'h3215431145e2bf465b529d3e6e085f85bd90d36b2d175c04b225e24fa75d983a; nbytes = 32;
    run(in, exp, nbytes, "SHA3-256('abc')");
    // SHA3-512(00..27)
    in  = 1600'h0000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000800000000000000000000000000000000000000000000000000000000000000627262524232221201f1e1d1c1b1a191817161514131211100f0e0d0c0b0a09080706050403020100;
    exp = 512'he81c7619ed5eaf195fdaf3d8dfeb47e29341e752b109aa57fa80d47fd31e6cb90e0869090350508fa5c7087ba03e83adc71b35d2cee08b47b6dabce0af593a41; nbytes = 64;
    run(in, exp, nbytes, "SHA3-512(00..27)");
    // SHAKE256(fox)
    in  = 1600'h0000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000080000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000001f786f66206e776f7262206b6369757120656854;
    exp = 1088'h10615cffe851378f8dd28c455daa8d1f3155e19e0b64c557fa0efe46314c27c40f5db094cfb3547ddadbb730e354f0a4d9fc92c7e7022d8c3ce1b48757a36b8f7825252c6782c1e105a570c26efd3d348625fb8f582f3863a2c60e392251dee16590954fe2b644e6905150f147720b2a70501983d484a777a680f394e0ac479939253f9c1ca5d01d; nbytes = 136;
    run(in, exp, nbytes, "SHAKE256(fox)");
    run('0, 1600'h0_f1258f7940e1dde7, 8, "zero state");
    // random states against the testbench's table-driven model
    for (int n = 0; n < 8; n++) begin
      logic [1599:0] r;
      for (int w = 0; w < 50; w++) r[32*w +: 32] = $urandom;
      run(r, permute(r), 200, $sformatf("random state %0d", n));
    end
    // back-to-back start: the second start restarts on the new input
    begin
      logic [1599:0] r;
      for (int w = 0; w < 50; w++) r[32*w +: 32] = $urandom;
      @(negedge clk);
      din = '1;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      repeat (5) @(negedge clk);
      run(r, permute(r), 200, "restart while busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
