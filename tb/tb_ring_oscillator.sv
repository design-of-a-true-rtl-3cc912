// Self-checking testbench of the ring oscillator model (13 inverters).
//
// With enable high the ring must settle to 0 (OR output 1 through 13 inversions)
// and stay there. After enable falls it must oscillate with a period of about
// 2 * 14 gate delays: each gate is 275-281 ps nominal with 30 ps Gaussian spread,
// so the period must lie in 6.5-9.5 ns. With fixed gate delays every period must be
// the same to the picosecond. Two rings with different seeds must not share a
// period. Raising enable again must stop the oscillation.
`timescale 1ns / 1ps
module tb_ring_oscillator;
  logic enable = 1'b1;
  logic ro_a, ro_b;
  int   checks = 0, failures = 0;

  ring_oscillator #(.SEED(1)) dut   (.enable_i(enable), .ro_o(ro_a));
  ring_oscillator #(.SEED(2)) dut_b (.enable_i(enable), .ro_o(ro_b));

  initial begin : watchdog
    #5000;
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

  realtime rise_a [$];
  realtime rise_b [$];
  always @(posedge ro_a) rise_a.push_back($realtime);
  always @(posedge ro_b) rise_b.push_back($realtime);

  initial begin
    realtime pa, pb, p;
    int edges;
    #20;
    check(ro_a == 1'b0 && ro_b == 1'b0, "ring not settled to 0 under enable");
    edges = rise_a.size();
    #20;
    check(rise_a.size() == edges && ro_a == 1'b0, "ring toggles while enabled");
    enable = 1'b0;
    rise_a.delete();
    rise_b.delete();
    #200;
    check(rise_a.size() >= 20, $sformatf("only %0d rising edges in 200 ns", rise_a.size()));
    pa = rise_a[2] - rise_a[1];
    pb = rise_b[2] - rise_b[1];
    check(pa > 6.5 && pa < 9.5, $sformatf("period %0f ns out of range", pa));
    check(pb > 6.5 && pb < 9.5, $sformatf("period %0f ns out of range (seed 2)", pb));
    for (int i = 2; i + 1 < rise_a.size(); i++) begin
      p = rise_a[i+1] - rise_a[i];
      check(p - pa < 0.002 && pa - p < 0.002, $sformatf("period %0d is %0f ns, first %0f ns", i, p, pa));
    end
    check(pa != pb, "two seeds give the same period");
    $display("periods: seed 1 %0.3f ns, seed 2 %0.3f ns", pa, pb);
    enable = 1'b1;
    #20;
    edges = rise_a.size();
    #50;
    check(rise_a.size() == edges && ro_a == 1'b0, "ring not stopped by enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
