// RO-based noise source (top_level_RO): N_RO parallel ring oscillators of N_INV
// inverters each, sampled by the system clock.
//
// Every ring gets the enable_i pulse on its OR gate (see ring_oscillator). The
// output of the last inverter of each ring is sampled by a flip-flop, the N_RO
// samples are XORed, and the XOR is sampled again into rnd_bit_o: one random bit
// per enabled clock, two clock cycles after the rings are sampled. Both flip-flop
// stages are clock-enabled by dff_en_i from the control unit and hold otherwise.
//
// The sampling flip-flops capture asynchronous signals on purpose: the jitter of
// the rings against the clock is the entropy. The structure, 32 rings and 13
// inverters follow the design; SEED_BASE only selects which set of simulated gate
// delays the rings receive (ring i uses SEED_BASE + i).
//
// The combinational loops reported inside ring_oscillator are the rings
// themselves and are intended.
`timescale 1ns / 1ps
module noise_source #(
  parameter int unsigned N_RO      = 32,
  parameter int unsigned N_INV     = 13,
  parameter int unsigned SEED_BASE = 1
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic enable_i,
  input  logic dff_en_i,
  output logic rnd_bit_o
);

  logic [N_RO-1:0] ro_out;
  logic [N_RO-1:0] ro_sample_q;

  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    ring_oscillator #(
      .N_INV (N_INV),
      .SEED  (SEED_BASE + i)
    ) u_ro (
      .enable_i (enable_i),
      .ro_o     (ro_out[i])
    );
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ro_sample_q <= '0;
      rnd_bit_o   <= 1'b0;
    end else if (dff_en_i) begin
      ro_sample_q <= ro_out;
      rnd_bit_o   <= ^ro_sample_q;
    end
  end

endmodule
