// TRNG with optional Keccak conditioning, each block with its own control unit.
//
// conditioning_i = 0: the two blocks work independently. out_key_o is the TRNG
// key and key_ready_o / trng_intr_o come from the TRNG control unit; the Keccak
// block permutes keccak_in_i when keccak_start_i pulses and reports through
// keccak_status_o and keccak_intr_o.
//
// conditioning_i = 1: the one-cycle key-ready pulse of the TRNG starts the Keccak
// block on the TRNG key, placed in the low N_BITS_KEY bits of the 1600-bit input
// with the other bits zero. 24 cycles later the Keccak interrupt becomes the key
// ready pulse and the TRNG interrupt, and out_key_o is the low N_BITS_KEY bits of
// the permuted state. keccak_intr_o stays low in this mode. ack_read_i always goes
// to the TRNG, which does not start the next key before it; the Keccak result
// therefore stays stable until then.
//
// conditioning_i should be changed only while no key is being produced.
// keccak_out_o always shows the Keccak state (read by the data register file).
//
// The two modes, the separate control units and the truncation of the Keccak output
// to the key width follow the design; how the key is placed into the Keccak input
// and that the low bits are kept are this implementation's choices.
`timescale 1ns / 1ps
module trng_keccak
  import trng_pkg::*;
#(
  parameter int unsigned N_RO        = 32,
  parameter int unsigned N_INV       = 13,
  parameter int unsigned N_BITS_KEY  = 32,
  parameter int unsigned NBITS       = 21,
  parameter int unsigned WINDOW      = 1024,
  parameter int unsigned CUTOFF      = 588,
  parameter int unsigned FAIL_THRESH = 64,
  parameter int unsigned LATENCY     = 64,
  parameter int unsigned SEED_BASE   = 1
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  logic                  enable_i,
  input  logic                  ack_read_i,
  input  logic                  conditioning_i,
  input  logic                  keccak_start_i,
  input  logic [KECCAK_W-1:0]   keccak_in_i,
  output logic [N_BITS_KEY-1:0] out_key_o,
  output logic                  key_ready_o,
  output logic                  trng_intr_o,
  output logic                  flush_regs_o,
  output cu_state_e             trng_state_o,
  output logic [KECCAK_W-1:0]   keccak_out_o,
  output logic                  keccak_status_o,
  output logic                  keccak_intr_o
);

  logic [N_BITS_KEY-1:0] trng_key;
  logic                  trng_ready;
  logic                  trng_intr;
  logic                  kc_start;
  logic [KECCAK_W-1:0]   kc_in;
  logic                  kc_intr;

  trng #(
    .N_RO        (N_RO),
    .N_INV       (N_INV),
    .N_BITS_KEY  (N_BITS_KEY),
    .NBITS       (NBITS),
    .WINDOW      (WINDOW),
    .CUTOFF      (CUTOFF),
    .FAIL_THRESH (FAIL_THRESH),
    .LATENCY     (LATENCY),
    .SEED_BASE   (SEED_BASE)
  ) u_trng (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .enable_i     (enable_i),
    .ack_read_i   (ack_read_i),
    .out_key_o    (trng_key),
    .key_ready_o  (trng_ready),
    .trng_intr_o  (trng_intr),
    .flush_regs_o (flush_regs_o),
    .state_o      (trng_state_o)
  );

  assign kc_start = conditioning_i ? trng_ready : keccak_start_i;
  assign kc_in    = conditioning_i ? KECCAK_W'(trng_key) : keccak_in_i;

  keccak u_keccak (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .start_i  (kc_start),
    .data_i   (kc_in),
    .data_o   (keccak_out_o),
    .status_o (keccak_status_o),
    .intr_o   (kc_intr)
  );

  assign out_key_o     = conditioning_i ? keccak_out_o[N_BITS_KEY-1:0] : trng_key;
  assign key_ready_o   = conditioning_i ? kc_intr : trng_ready;
  assign trng_intr_o   = conditioning_i ? kc_intr : trng_intr;
  assign keccak_intr_o = conditioning_i ? 1'b0 : kc_intr;

endmodule
