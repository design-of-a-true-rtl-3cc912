// Self-checking testbench of the noise source (32 rings of 13 inverters, clock
// period 1.1 ns).
//
// Checks, against the ring outputs observed directly in the testbench:
//   - rnd_bit_o equals the XOR of the ring outputs seen two enabled clock edges
//     earlier (sample stage, then XOR stage);
//   - with dff_en_i low the output holds;
//   - while enable_i is high all rings are stopped, so the output is constant 0;
//   - over 8000 enabled cycles the share of ones lies in 45-55 % and no run of
//     equal bits reaches the repetition cutoff of 21.
`timescale 1ns / 1ps
module tb_noise_source;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b1;
  logic dff_en = 1'b0;
  logic rnd_bit;
  int   checks = 0, failures = 0;

  noise_source dut (.clk_i(clk), .rst_ni(rst_n), .enable_i(enable), .dff_en_i(dff_en),
                    .rnd_bit_o(rnd_bit));

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

  // reference pipeline built from the ring outputs
  logic [31:0] rings;
  logic        ref_s1 = 1'b0, ref_s2 = 1'b0;
  for (genvar i = 0; i < 32; i++) begin : g_tap
    assign rings[i] = dut.g_ro[i].u_ro.ro_o;
  end
  always @(posedge clk) if (dff_en) begin
    ref_s2 <= ref_s1;
    ref_s1 <= ^rings;
  end

  initial begin
    int ones = 0, run = 0, max_run = 0;
    logic prev, held;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    dff_en = 1'b1;
    repeat (10) @(negedge clk);
    check(rnd_bit == 1'b0, "output not 0 while rings are held");
    enable = 1'b0;
    repeat (20) @(negedge clk);
    prev = rnd_bit;
    for (int c = 0; c < 8000; c++) begin
      @(negedge clk);
      check(rnd_bit == ref_s2, "output is not the XOR of the sampled rings");
      ones += rnd_bit;
      run = (rnd_bit == prev) ? run + 1 : 1;
      if (run > max_run) max_run = run;
      prev = rnd_bit;
      if (c % 1000 == 500) begin
        held = rnd_bit;
        dff_en = 1'b0;
        repeat (7) begin
          @(negedge clk);
          check(rnd_bit == held, "output changes with dff_en low");
        end
        dff_en = 1'b1;
        @(negedge clk);
        prev = rnd_bit;
      end
    end
    check(ones > 3600 && ones < 4400, $sformatf("%0d ones in 8000 bits", ones));
    check(max_run < 21, $sformatf("run of %0d equal bits", max_run));
    $display("ones=%0d/8000 longest_run=%0d", ones, max_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
