// Self-checking testbench of the OBI-to-register bridge, against a small register
// memory model on the register side that is randomly not ready: writes must reach
// the model with address, data and strobes intact, grants must only be given when
// the model is ready, and every granted read must return its data and error with
// rvalid exactly one cycle after the grant.
`timescale 1ns / 1ps
module tb_periph_to_reg;
  import trng_pkg::*;
  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  obi_req_t obi_req = '0;
  obi_rsp_t obi_rsp;
  reg_req_t reg_req;
  reg_rsp_t reg_rsp;
  logic     model_ready = 1'b1;
  logic [31:0] mem [16];
  int       checks = 0, failures = 0;

  periph_to_reg dut (.clk_i(clk), .rst_ni(rst_n), .obi_req_i(obi_req), .obi_rsp_o(obi_rsp),
                     .reg_req_o(reg_req), .reg_rsp_i(reg_rsp));

  // register-side model: 16 words, error above
  always_comb begin
    reg_rsp.ready = model_ready;
    reg_rsp.error = reg_req.valid && (reg_req.addr[31:6] != 0);
    reg_rsp.rdata = mem[reg_req.addr[5:2]];
  end
  always @(posedge clk) if (reg_req.valid && reg_req.write && model_ready && reg_req.addr[31:6] == 0)
    for (int b = 0; b < 4; b++) if (reg_req.wstrb[b]) mem[reg_req.addr[5:2]][8*b +: 8] <= reg_req.wdata[8*b +: 8];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  // one OBI transfer; the model's readiness changes randomly each cycle
  task automatic xfer(input logic we, input logic [31:0] addr, input logic [31:0] wdata,
                      input logic [3:0] be, output logic [31:0] rdata, output logic err);
    @(negedge clk);
    obi_req = '{req: 1'b1, we: we, be: be, addr: addr, wdata: wdata};
    model_ready = ($urandom % 3) != 0;
    #1;
    while (!obi_rsp.gnt) begin
      check(!model_ready, "grant withheld although ready");
      @(negedge clk);
      model_ready = ($urandom % 3) != 0;
      #1;
    end
    check(model_ready, "grant while not ready");
    @(negedge clk);
    obi_req = '0;
    check(obi_rsp.rvalid, "no rvalid one cycle after grant");
    rdata = obi_rsp.rdata;
    err   = obi_rsp.err;
    @(negedge clk);
    check(!obi_rsp.rvalid, "rvalid longer than one cycle");
  endtask

  logic [31:0] ref_mem [16];

  initial begin
    logic [31:0] d;
    logic e;
    for (int i = 0; i < 16; i++) begin
      mem[i] = '0;
      ref_mem[i] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int a = $urandom % 16;
      if ($urandom % 2) begin
        logic [31:0] w = $urandom;
        logic [3:0] be = 4'($urandom);
        xfer(1'b1, 4 * a, w, be, d, e);
        for (int b = 0; b < 4; b++) if (be[b]) ref_mem[a][8*b +: 8] = w[8*b +: 8];
        check(!e, "error on write");
      end else begin
        xfer(1'b0, 4 * a, '0, 4'hF, d, e);
        check(d == ref_mem[a] && !e, $sformatf("read word %0d: %h expected %h", a, d, ref_mem[a]));
      end
    end
    xfer(1'b0, 32'h100, '0, 4'hF, d, e);
    check(e, "error not forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
