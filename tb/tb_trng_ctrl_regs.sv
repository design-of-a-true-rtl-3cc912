// Self-checking testbench of the control/status register: write/read-back of the
// RW fields, the sticky key-ready bit (set by a one-cycle pulse, cleared by a write
// with the acknowledge bit), the one-cycle Keccak start pulse, the Keccak status
// mirror, byte strobes and the error response on other offsets.
`timescale 1ns / 1ps
module tb_trng_ctrl_regs;
  import trng_pkg::*;
  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  reg_req_t req = '0;
  reg_rsp_t rsp;
  logic     en, ack, kstart, cond;
  logic     key_ready = 1'b0, kstatus = 1'b0;
  int       checks = 0, failures = 0;
  int       starts = 0;

  trng_ctrl_regs dut (.clk_i(clk), .rst_ni(rst_n), .reg_req_i(req), .reg_rsp_o(rsp),
                      .trng_en_o(en), .ack_read_o(ack), .keccak_start_o(kstart),
                      .conditioning_o(cond), .key_ready_i(key_ready), .keccak_status_i(kstatus));

  always #5 clk = ~clk;
  always @(posedge clk) if (kstart) starts++;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
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
    check(rsp.ready, "not ready");
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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    rd(0, d, e);
    check(d == 0 && !e, "reset value");
    wr(0, 32'h1);
    check(en && !ack && !cond, "enable bit");
    rd(0, d, e);
    check(d == 32'h1, $sformatf("read back %h", d));
    wr(0, 32'h0);
    check(!en, "enable cleared");
    wr(0, 32'h20);
    check(cond, "conditioning bit");
    wr(0, 32'h21, 4'h0);
    check(!en && cond, "write with no byte strobe changed the register");
    // key ready pulse -> sticky status
    @(negedge clk);
    key_ready = 1'b1;
    @(negedge clk);
    key_ready = 1'b0;
    repeat (3) @(negedge clk);
    rd(0, d, e);
    check(d[STATUS_TRNG_BIT], "key ready not held");
    wr(0, 32'h22);
    check(ack, "ack bit");
    rd(0, d, e);
    check(!d[STATUS_TRNG_BIT] && d[CTRL_ACK_KEY_READ_BIT], "key ready not cleared by ack");
    wr(0, 32'h20);
    // status bit is read-only
    wr(0, 32'h24);
    rd(0, d, e);
    check(!d[STATUS_TRNG_BIT], "status bit writable");
    // Keccak start pulse and status mirror
    starts = 0;
    wr(0, 32'h28);
    repeat (3) @(negedge clk);
    check(starts == 1, $sformatf("%0d start pulses", starts));
    rd(0, d, e);
    check(!d[CTRL_KECCAK_START_BIT], "start bit reads 1");
    kstatus = 1'b1;
    rd(0, d, e);
    check(d[STATUS_KECCAK_BIT], "Keccak status not visible");
    // other offsets
    rd(32'h4, d, e);
    check(e, "no error on unmapped offset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
