// Behavioural model of one ring oscillator of the noise source (not synthesizable
// as written: the delays exist only in simulation).
//
// The ring is a two-input OR gate followed by N_INV inverters, the last inverter
// output fed back to the OR gate. With N_INV odd the loop inverts, so it
// oscillates with a period of about 2 * (N_INV + 1) gate delays. While enable_i is
// high the OR output is forced to 1 and every node of the chain settles to a known
// level; when enable_i falls the ring starts to oscillate. Enable is therefore meant
// as a pulse, not a level.
//
// Timing model: every gate gets its own fixed delay, a nominal delay common to the
// ring (drawn uniformly in NOM_MIN_PS..NOM_MAX_PS) plus a Gaussian term of standard
// deviation SIGMA_PS drawn per gate. Global and deterministic jitter are left out.
// This is the simulation model of the design (275-281 ps nominal, 30 ps sigma, 1 ps
// resolution); the delays are computed here from SEED by a constant function
// rather than read from a file, and the OR gate is given a delay from the same
// model, which is this model's own choice. The Gaussian term is the sum of twelve
// uniform numbers (Irwin-Hall), which is accurate to a few percent in the tails.
//
// In silicon the ring is built from standard cells that synthesis must not touch;
// the sampling flip-flops and the XOR that follow it are in noise_source.
//
// Ports: enable_i (OR-gate input), ro_o (output of the last inverter).
`timescale 1ns / 1ps
module ring_oscillator #(
  parameter int unsigned N_INV      = 13,
  parameter int unsigned SEED       = 1,
  parameter int unsigned NOM_MIN_PS = 275,
  parameter int unsigned NOM_MAX_PS = 281,
  parameter int unsigned SIGMA_PS   = 30
) (
  input  logic enable_i,
  output logic ro_o
);

  typedef int unsigned delay_arr_t [N_INV+1];

  // 32-bit linear congruential generator step (Numerical Recipes constants)
  function automatic int unsigned lcg(input int unsigned s);
    return s * 32'd1664525 + 32'd1013904223;
  endfunction

  // Gate delays in ps: index 0 is the OR gate, 1..N_INV the inverters.
  function automatic delay_arr_t gen_delays(input int unsigned seed);
    delay_arr_t d;
    int unsigned s;
    int          nominal;
    int          acc;
    int          g;
    s = lcg(seed * 32'd2654435761 + 32'd12345);
    s = lcg(s);
    nominal = int'(NOM_MIN_PS) + int'((s >> 8) % (NOM_MAX_PS - NOM_MIN_PS + 1));
    for (int i = 0; i <= int'(N_INV); i++) begin
      // sum of 12 uniforms in [0,1) minus 6 has unit variance; scaled by 4096
      acc = 0;
      for (int k = 0; k < 12; k++) begin
        s = lcg(s);
        acc += int'((s >> 20) & 32'hFFF);
      end
      g = ((acc - 6 * 4096) * int'(SIGMA_PS)) / 4096;
      if (nominal + g < 50) d[i] = 50;
      else                  d[i] = unsigned'(nominal + g);
    end
    return d;
  endfunction

  localparam delay_arr_t DELAY_PS = gen_delays(SEED);

  logic [N_INV:0] node;

  assign #(DELAY_PS[0] * 1ps) node[0] = enable_i | node[N_INV];

  for (genvar i = 0; i < N_INV; i++) begin : g_inv
    assign #(DELAY_PS[i+1] * 1ps) node[i+1] = ~node[i];
  end

  assign ro_o = node[N_INV];

endmodule
