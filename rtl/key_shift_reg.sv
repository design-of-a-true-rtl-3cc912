// Serial-to-parallel key register of the TRNG.
//
// While en_i is high the register shifts one random bit per clock in at the LSB:
// key_o <= {key_o[N_BITS_KEY-2:0], bit_i}. With en_i low it holds, so the key stays
// stable while it is read. After N_BITS_KEY enabled cycles key_o holds the last
// N_BITS_KEY bits, the oldest in the MSB. Reset clears it.
//
// The configurable width N_BITS_KEY (32, the width read by the host) follows the
// design; the shift direction is this implementation's choice.
`timescale 1ns / 1ps
module key_shift_reg #(
  parameter int unsigned N_BITS_KEY = 32
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  logic                  en_i,
  input  logic                  bit_i,
  output logic [N_BITS_KEY-1:0] key_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)   key_o <= '0;
    else if (en_i) key_o <= {key_o[N_BITS_KEY-2:0], bit_i};
  end

endmodule
