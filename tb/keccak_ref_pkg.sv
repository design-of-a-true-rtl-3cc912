// Reference model of Keccak-f[1600] for the testbenches, written independently of
// the RTL: lanes in a 5x5 array, the published round constants and rotation
// offsets as literal tables, one step per loop. State layout as in the RTL: lane
// (x,y) at bits [64*(x+5*y) +: 64].
`timescale 1ns / 1ps
package keccak_ref_pkg;

  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008
  };

  // R[x][y]
  localparam int R [5][5] = '{
    '{ 0, 36,  3, 41, 18},
    '{ 1, 44, 10, 45,  2},
    '{62,  6, 43, 15, 61},
    '{28, 55, 25, 21, 56},
    '{27, 20, 39,  8, 14}
  };

  function automatic logic [63:0] rol(input logic [63:0] v, input int n);
    logic [127:0] d;
    d = {v, v} << n;
    return d[127:64];
  endfunction

  function automatic logic [1599:0] permute(input logic [1599:0] s);
    logic [63:0] A [5][5];
    logic [63:0] B [5][5];
    logic [63:0] C [5];
    logic [63:0] D [5];
    logic [1599:0] o;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) A[x][y] = s[64*(x+5*y) +: 64];
    for (int r = 0; r < 24; r++) begin
      for (int x = 0; x < 5; x++) C[x] = A[x][0] ^ A[x][1] ^ A[x][2] ^ A[x][3] ^ A[x][4];
      for (int x = 0; x < 5; x++) D[x] = C[(x+4)%5] ^ rol(C[(x+1)%5], 1);
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) A[x][y] ^= D[x];
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) B[y][(2*x+3*y)%5] = rol(A[x][y], R[x][y]);
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
        A[x][y] = B[x][y] ^ (~B[(x+1)%5][y] & B[(x+2)%5][y]);
      A[0][0] ^= RC[r];
    end
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) o[64*(x+5*y) +: 64] = A[x][y];
    return o;
  endfunction

endpackage
