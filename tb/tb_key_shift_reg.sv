// Self-checking testbench of the key shift register: random bits with a random
// enable, compared every cycle with a reference that keeps the bits in a queue.
`timescale 1ns / 1ps
module tb_key_shift_reg;
  localparam int unsigned N = 32;
  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0;
  logic         b = 1'b0;
  logic [N-1:0] key;
  int           checks = 0, failures = 0;
  bit           hist [$];

  key_shift_reg #(.N_BITS_KEY(N)) dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .bit_i(b), .key_o(key));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] expected();
    logic [N-1:0] e = '0;
    // newest bit in the LSB, bit i is the one entered i enabled cycles earlier
    for (int i = 0; i < N && i < hist.size(); i++) e[i] = hist[hist.size() - 1 - i];
    return e;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      checks++;
      if (key !== expected()) begin
        failures++;
        $display("FAIL cycle %0d: key %h expected %h", c, key, expected());
      end
      en = ($urandom % 4) != 0;
      b  = 1'($urandom);
      @(posedge clk);
      if (en) hist.push_back(b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
