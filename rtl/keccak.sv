// Keccak-f[1600] permutation accelerator, used as the optional conditioning stage
// of the TRNG and also usable on its own.
//
// The block takes a 1600-bit input and returns the 1600-bit permuted state. A
// one-cycle start_i pulse loads data_i and applies round 0 on the same clock edge;
// each following clock applies one more round, one round per cycle. After the 24th
// round (24 clock cycles after start_i) status_o rises and intr_o pulses for one
// cycle; status_o stays high and data_o holds the result until the next start_i.
// A start_i while busy restarts the permutation with the new input.
//
// The 1600-bit interface, the start pulse and the 24-cycle latency with a status
// flag and an interrupt follow the design; the round-per-cycle datapath is the
// simplest structure that meets that latency and is this implementation's choice.
// The round constants are computed at elaboration (keccak_pkg) into a 24-entry
// constant table indexed by the round counter. Assertions check that intr_o is a
// single-cycle pulse that comes with status_o.
`timescale 1ns / 1ps
module keccak
  import keccak_pkg::*;
(
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          start_i,
  input  logic [1599:0] data_i,
  output logic [1599:0] data_o,
  output logic          status_o,
  output logic          intr_o
);

  typedef logic [63:0] rc_table_t [N_ROUNDS];

  function automatic rc_table_t gen_rc_table();
    rc_table_t t;
    for (int unsigned i = 0; i < N_ROUNDS; i++) t[i] = round_constant(i);
    return t;
  endfunction

  localparam rc_table_t RC = gen_rc_table();

  state_t      state_q;
  logic [4:0]  round_q;    // index of the next round to apply
  logic        busy_q;
  logic        status_q;
  logic        intr_q;
  state_t      round_in;
  logic [63:0] round_rc;
  state_t      round_out;

  always_comb begin
    round_in = start_i ? data_i : state_q;
    round_rc = start_i ? RC[0] : RC[round_q];
    round_out = keccak_round(round_in, round_rc);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q  <= '0;
      round_q  <= '0;
      busy_q   <= 1'b0;
      status_q <= 1'b0;
      intr_q   <= 1'b0;
    end else begin
      intr_q <= 1'b0;
      if (start_i) begin
        state_q  <= round_out;
        round_q  <= 5'd1;
        busy_q   <= 1'b1;
        status_q <= 1'b0;
      end else if (busy_q) begin
        state_q <= round_out;
        if (round_q == 5'(N_ROUNDS - 1)) begin
          round_q  <= '0;
          busy_q   <= 1'b0;
          status_q <= 1'b1;
          intr_q   <= 1'b1;
        end else begin
          round_q <= round_q + 5'd1;
        end
      end
    end
  end

  assign data_o   = state_q;
  assign status_o = status_q;
  assign intr_o   = intr_q;

  // the interrupt is a single-cycle pulse and coincides with the rise of status
  property p_intr_pulse;
    @(posedge clk_i) disable iff (!rst_ni) intr_q |=> !intr_q;
  endproperty
  property p_intr_with_status;
    @(posedge clk_i) disable iff (!rst_ni) intr_q |-> status_o;
  endproperty
  assert property (p_intr_pulse);
  assert property (p_intr_with_status);

endmodule
