// Self-checking testbench of the data register file: reads of all 50 Keccak
// output words and the key word from random inputs, write/read-back of all 50
// Keccak input words with the resulting 1600-bit vector checked, byte-strobe
// writes, and the error response on unmapped offsets.
`timescale 1ns / 1ps
module tb_trng_data_regs;
  import trng_pkg::*;
  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  reg_req_t      req = '0;
  reg_rsp_t      rsp;
  logic [1599:0] kout;
  logic [31:0]   key;
  logic [1599:0] kin;
  logic [31:0]   shadow [50];
  int            checks = 0, failures = 0;

  trng_data_regs dut (.clk_i(clk), .rst_ni(rst_n), .reg_req_i(req), .reg_rsp_o(rsp),
                      .keccak_out_i(kout), .key_i(key), .keccak_in_o(kin));

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
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  task automatic wr(input logic [31:0] addr, input logic [31:0] data, input logic [3:0] strb = 4'hF);
    @(negedge clk);
    req = '{valid: 1'b1, write: 1'b1, addr: addr, wdata: data, wstrb: strb};
    @(negedge clk);
    req = '0;
  endtask

  task automatic rd(input logic [31:0] addr, output logic [31:0] data, output logic err);
    @(negedge clk);
    req = '{valid: 1'b1, write: 1'b0, addr: addr, wdata: '0, wstrb: '0};
    #1;
    data = rsp.rdata;
    err  = rsp.error;
    @(negedge clk);
    req = '0;
  endtask

  initial begin
    logic [31:0] d;
    logic e;
    for (int i = 0; i < 50; i++) kout[32*i +: 32] = $urandom;
    key = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(kin == '0, "input registers not reset");
    for (int i = 0; i < 50; i++) begin
      rd(4 * i, d, e);
      check(d == kout[32*i +: 32] && !e, $sformatf("Keccak output word %0d", i));
    end
    rd(32'hC8, d, e);
    check(d == key && !e, "key word");
    for (int i = 0; i < 50; i++) begin
      shadow[i] = $urandom;
      wr(32'h100 + 4 * i, shadow[i]);
    end
    for (int i = 0; i < 50; i++) begin
      rd(32'h100 + 4 * i, d, e);
      check(d == shadow[i] && !e, $sformatf("Keccak input word %0d", i));
      check(kin[32*i +: 32] == shadow[i], $sformatf("Keccak input vector word %0d", i));
    end
    wr(32'h100 + 4 * 7, 32'hA5A5A5A5, 4'b0100);
    rd(32'h100 + 4 * 7, d, e);
    check(d == {shadow[7][31:24], 8'hA5, shadow[7][15:0]}, "byte strobe");
    rd(32'hCC, d, e);
    check(e, "no error at 0x0CC");
    rd(32'h1C8, d, e);
    check(e, "no error at 0x1C8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
