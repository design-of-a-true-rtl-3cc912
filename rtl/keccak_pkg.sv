// Keccak-f[1600] step functions, shared by the Keccak accelerator.
//
// The 1600-bit state is a flat vector; lane A[x,y] (64 bits) sits at bits
// [64*(x+5*y) +: 64], and byte k of the state at bits [8*k +: 8], the usual
// little-endian layout of the Keccak reference.
//
// keccak_round applies theta, rho, pi, chi and iota once. The rotation offsets
// and round constants are not stored as tables: rho_offset walks the (x,y) ->
// (y, 2x+3y) path with offset (t+1)(t+2)/2 mod 64, and round_constant runs the
// degree-8 LFSR x^8 + x^6 + x^5 + x^4 + 1, placing rc(j + 7i) at bit 2^j - 1.
`timescale 1ns / 1ps
package keccak_pkg;

  localparam int unsigned N_ROUNDS = 24;

  typedef logic [1599:0] state_t;

  function automatic int unsigned rho_offset(input int unsigned x, input int unsigned y);
    int unsigned cx, cy, nx;
    if (x == 0 && y == 0) return 0;
    cx = 1;
    cy = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      if (cx == x && cy == y) return ((t + 1) * (t + 2) / 2) % 64;
      nx = cy;
      cy = (2 * cx + 3 * cy) % 5;
      cx = nx;
    end
    return 0;
  endfunction

  function automatic logic [63:0] round_constant(input int unsigned rnd);
    logic [7:0]  lfsr;
    logic [63:0] rc;
    lfsr = 8'h01;
    rc   = '0;
    // advance the LFSR by 7 * rnd steps, then take 7 bits
    for (int unsigned k = 0; k < 7 * rnd + 7; k++) begin
      if (k >= 7 * rnd) rc[(1 << (k - 7 * rnd)) - 1] = lfsr[0];
      lfsr = lfsr[7] ? ((lfsr << 1) ^ 8'h71) : (lfsr << 1);
    end
    return rc;
  endfunction

  function automatic logic [63:0] rotl(input logic [63:0] v, input int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic state_t keccak_round(input state_t s, input logic [63:0] rc);
    logic [63:0] a [25];
    logic [63:0] b [25];
    logic [63:0] c [5];
    logic [63:0] d [5];
    state_t      o;
    for (int i = 0; i < 25; i++) a[i] = s[64*i +: 64];
    // theta
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i%5];
    // rho and pi: B[y, 2x+3y] = ROT(A[x,y], r[x,y])
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], rho_offset(x, y));
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // iota
    a[0] = a[0] ^ rc;
    for (int i = 0; i < 25; i++) o[64*i +: 64] = a[i];
    return o;
  endfunction

endpackage
