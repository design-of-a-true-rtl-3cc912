// Bridge from an OBI slave port to the register interface of a register file.
//
// An OBI request (req with addr/we/be/wdata) is passed to the register interface
// in the same cycle; gnt is returned when the register file is ready. The read
// data and error of the granted transfer are registered and returned with rvalid
// in the next cycle, as OBI requires a response phase after the address phase.
// One transfer per cycle can be in flight. Assertions check the response rule:
// one rvalid per grant, in the cycle after it.
//
// The design only names this bridge and its purpose (letting the data register
// file, reachable by the DMA, sit on an external OBI bus); this single-cycle
// implementation is the simplest one that does it.
`timescale 1ns / 1ps
module periph_to_reg
  import trng_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  obi_req_t obi_req_i,
  output obi_rsp_t obi_rsp_o,
  output reg_req_t reg_req_o,
  input  reg_rsp_t reg_rsp_i
);

  logic        rvalid_q;
  logic        err_q;
  logic [31:0] rdata_q;
  logic        gnt;

  always_comb begin
    reg_req_o.valid = obi_req_i.req;
    reg_req_o.write = obi_req_i.we;
    reg_req_o.addr  = obi_req_i.addr;
    reg_req_o.wdata = obi_req_i.wdata;
    reg_req_o.wstrb = obi_req_i.be;
  end

  assign gnt = obi_req_i.req && reg_rsp_i.ready;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rvalid_q <= 1'b0;
      err_q    <= 1'b0;
      rdata_q  <= '0;
    end else begin
      rvalid_q <= gnt;
      if (gnt) begin
        err_q   <= reg_rsp_i.error;
        rdata_q <= reg_rsp_i.rdata;
      end
    end
  end

  always_comb begin
    obi_rsp_o.gnt    = gnt;
    obi_rsp_o.rvalid = rvalid_q;
    obi_rsp_o.err    = err_q;
    obi_rsp_o.rdata  = rdata_q;
  end

  // OBI response phase: exactly one rvalid per granted request, in the next cycle
  property p_rvalid_after_gnt;
    @(posedge clk_i) disable iff (!rst_ni) gnt |=> obi_rsp_o.rvalid;
  endproperty
  property p_no_unrequested_rvalid;
    @(posedge clk_i) disable iff (!rst_ni) !gnt |=> !obi_rsp_o.rvalid;
  endproperty
  assert property (p_rvalid_after_gnt);
  assert property (p_no_unrequested_rvalid);

endmodule
