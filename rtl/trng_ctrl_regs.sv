// Control/status register file of the TRNG accelerator, on the register interface.
//
// One 32-bit register at offset 0x0 (other offsets answer with error):
//   bit 0 TRNG_EN          RW  enable of the TRNG; software writes 1 then 0 (pulse)
//   bit 1 ACK_KEY_READ     RW  acknowledge of the key; level passed to the TRNG
//   bit 2 STATUS_TRNG      RO  key ready: set by the one-cycle key_ready_i pulse,
//                              cleared by a write with ACK_KEY_READ = 1
//   bit 3 KECCAK_START     W1  writing 1 emits a one-cycle keccak_start_o; reads 0
//   bit 4 STATUS_KECCAK    RO  Keccak output ready (keccak_status_i, level)
//   bit 5 CONDITIONING     RW  route the TRNG key through the Keccak block
//
// The response is combinational: ready is always 1 and rdata is valid in the cycle
// of the request. A write takes effect on the following clock edge, byte strobe
// 0 enables bits 7:0 (all fields live there).
//
// A 32-bit register holding the enable and acknowledge bits written by the host
// and the key-ready bit written by the accelerator, plus the Keccak control/status
// bits and a conditioning bit in the same register, follow the design. The bit
// positions, the sticky key-ready bit (the TRNG raises key ready for one cycle
// only, a polling host would miss it) and the start pulse are this
// implementation's choices.
`timescale 1ns / 1ps
module trng_ctrl_regs
  import trng_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  reg_req_t reg_req_i,
  output reg_rsp_t reg_rsp_o,
  output logic     trng_en_o,
  output logic     ack_read_o,
  output logic     keccak_start_o,
  output logic     conditioning_o,
  input  logic     key_ready_i,
  input  logic     keccak_status_i
);

  logic en_q, ack_q, key_ready_q, start_q, cond_q;
  logic addr_hit, wr;

  assign addr_hit = (reg_req_i.addr[11:2] == 10'd0);
  assign wr       = reg_req_i.valid && reg_req_i.write && addr_hit && reg_req_i.wstrb[0];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      en_q        <= 1'b0;
      ack_q       <= 1'b0;
      key_ready_q <= 1'b0;
      start_q     <= 1'b0;
      cond_q      <= 1'b0;
    end else begin
      start_q <= wr && reg_req_i.wdata[CTRL_KECCAK_START_BIT];
      if (wr) begin
        en_q   <= reg_req_i.wdata[CTRL_TRNG_EN_BIT];
        ack_q  <= reg_req_i.wdata[CTRL_ACK_KEY_READ_BIT];
        cond_q <= reg_req_i.wdata[CTRL_CONDITIONING_BIT];
      end
      if (key_ready_i)                                       key_ready_q <= 1'b1;
      else if (wr && reg_req_i.wdata[CTRL_ACK_KEY_READ_BIT]) key_ready_q <= 1'b0;
    end
  end

  always_comb begin
    reg_rsp_o       = '0;
    reg_rsp_o.ready = 1'b1;
    reg_rsp_o.error = reg_req_i.valid && !addr_hit;
    if (reg_req_i.valid && !reg_req_i.write && addr_hit) begin
      reg_rsp_o.rdata[CTRL_TRNG_EN_BIT]      = en_q;
      reg_rsp_o.rdata[CTRL_ACK_KEY_READ_BIT] = ack_q;
      reg_rsp_o.rdata[STATUS_TRNG_BIT]       = key_ready_q;
      reg_rsp_o.rdata[STATUS_KECCAK_BIT]     = keccak_status_i;
      reg_rsp_o.rdata[CTRL_CONDITIONING_BIT] = cond_q;
    end
  end

  assign trng_en_o      = en_q;
  assign ack_read_o     = ack_q;
  assign keccak_start_o = start_q;
  assign conditioning_o = cond_q;

endmodule
