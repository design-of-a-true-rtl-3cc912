// Data register file of the TRNG accelerator, on the register interface.
//
// Byte offsets (32-bit words):
//   0x000-0x0C4  DOUT[0..49]   RO  Keccak output, word i = keccak_out_i[32*i +: 32]
//   0x0C8-...    DOUT[50..]    RO  random key, KEY_WORDS words (one for a 32-bit key)
//   0x100-0x1C4  DIN[0..49]    RW  Keccak input, keccak_in_o[32*i +: 32] = word i
// Any other offset answers with error. Writes honour the byte strobes.
//
// The output words are read straight from the Keccak state and the key register
// (external registers, no copy); the 50 input words are flip-flops. ready is
// always 1 and rdata is valid in the cycle of the request.
//
// Fifty 32-bit words for the Keccak input, fifty for its output and the key in the
// fifty-first output word follow the design; the offsets, and splitting a key wider
// than 32 bits over consecutive words, are this implementation's choices.
`timescale 1ns / 1ps
module trng_data_regs
  import trng_pkg::*;
#(
  parameter int unsigned N_BITS_KEY = 32
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  reg_req_t              reg_req_i,
  output reg_rsp_t              reg_rsp_o,
  input  logic [KECCAK_W-1:0]   keccak_out_i,
  input  logic [N_BITS_KEY-1:0] key_i,
  output logic [KECCAK_W-1:0]   keccak_in_o
);

  localparam int unsigned KEY_WORDS = (N_BITS_KEY + 31) / 32;

  logic [32*KEY_WORDS-1:0] key_ext;
  logic [31:0]             din_q [KECCAK_WORDS];
  logic [9:0]              word;
  logic                    is_dout_keccak, is_dout_key, is_din;
  logic [9:0]              din_idx;
  logic [5:0]              din_sel;

  assign key_ext = (32*KEY_WORDS)'(key_i);
  assign word    = reg_req_i.addr[11:2];

  assign is_dout_keccak = (word - 10'(DOUT_KECCAK_OFFSET >> 2)) < 10'(KECCAK_WORDS);
  assign is_dout_key    = (word >= 10'(DOUT_KEY_OFFSET >> 2)) && (word < 10'(DOUT_KEY_OFFSET >> 2) + 10'(KEY_WORDS));
  assign din_idx        = word - 10'(DIN_KECCAK_OFFSET >> 2);
  assign din_sel        = din_idx[5:0];
  assign is_din         = (word >= 10'(DIN_KECCAK_OFFSET >> 2)) && (din_idx < 10'(KECCAK_WORDS));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < int'(KECCAK_WORDS); i++) din_q[i] <= '0;
    end else if (reg_req_i.valid && reg_req_i.write && is_din) begin
      for (int b = 0; b < 4; b++)
        if (reg_req_i.wstrb[b]) din_q[din_sel][8*b +: 8] <= reg_req_i.wdata[8*b +: 8];
    end
  end

  always_comb begin
    for (int i = 0; i < int'(KECCAK_WORDS); i++) keccak_in_o[32*i +: 32] = din_q[i];
  end

  always_comb begin
    reg_rsp_o       = '0;
    reg_rsp_o.ready = 1'b1;
    reg_rsp_o.error = reg_req_i.valid && !(is_dout_keccak || is_dout_key || is_din);
    if (reg_req_i.valid && !reg_req_i.write) begin
      if (is_dout_keccak)   reg_rsp_o.rdata = keccak_out_i[32*word +: 32];
      else if (is_dout_key) reg_rsp_o.rdata = key_ext[32*(word - 10'(DOUT_KEY_OFFSET >> 2)) +: 32];
      else if (is_din)      reg_rsp_o.rdata = din_q[din_sel];
    end
    // writes to read-only words are ignored without error
  end

endmodule
