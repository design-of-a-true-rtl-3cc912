// Top level: the TRNG + Keccak accelerator as a memory-mapped peripheral of a
// 32-bit RISC-V microcontroller.
//
// The accelerator (trng_keccak) sits between two register files:
//   - the control/status register (trng_ctrl_regs), reached directly through the
//     register-interface slave port ctrl_reg_req_i / ctrl_reg_rsp_o;
//   - the data register file (trng_data_regs: 50 Keccak output words, the key word,
//     50 Keccak input words), reached through the OBI slave port data_obi_req_i /
//     data_obi_rsp_o and the periph_to_reg bridge, so that a DMA can move data.
// trng_intr_o (key ready) and keccak_intr_o (standalone Keccak done) are one-cycle
// interrupt pulses for the host's external interrupt lines. flush_regs_o (TRNG in
// warm-up) and trng_state_o are brought out for the system and for debugging.
//
// Host sequence for a key: write CTRL = 1 then CTRL = 0 (enable pulse; add bit 5 to
// both writes for conditioning), poll bit 2 of CTRL or wait for trng_intr_o, read
// the key word at 0x0C8 of the data port, write CTRL = 2 then 0 (acknowledge).
//
// The partition into register files, bridge and accelerator follows the design;
// the register map is given in trng_pkg.
`timescale 1ns / 1ps
module trng_keccak_wrapper
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
  input  logic      clk_i,
  input  logic      rst_ni,
  input  reg_req_t  ctrl_reg_req_i,
  output reg_rsp_t  ctrl_reg_rsp_o,
  input  obi_req_t  data_obi_req_i,
  output obi_rsp_t  data_obi_rsp_o,
  output logic      trng_intr_o,
  output logic      keccak_intr_o,
  output logic      flush_regs_o,
  output cu_state_e trng_state_o
);

  logic                  trng_en, ack_read, keccak_start, conditioning;
  logic                  key_ready, keccak_status;
  logic [N_BITS_KEY-1:0] out_key;
  logic [KECCAK_W-1:0]   keccak_in, keccak_out;
  reg_req_t              data_reg_req;
  reg_rsp_t              data_reg_rsp;

  trng_ctrl_regs u_ctrl_regs (
    .clk_i           (clk_i),
    .rst_ni          (rst_ni),
    .reg_req_i       (ctrl_reg_req_i),
    .reg_rsp_o       (ctrl_reg_rsp_o),
    .trng_en_o       (trng_en),
    .ack_read_o      (ack_read),
    .keccak_start_o  (keccak_start),
    .conditioning_o  (conditioning),
    .key_ready_i     (key_ready),
    .keccak_status_i (keccak_status)
  );

  periph_to_reg u_periph_to_reg (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .obi_req_i (data_obi_req_i),
    .obi_rsp_o (data_obi_rsp_o),
    .reg_req_o (data_reg_req),
    .reg_rsp_i (data_reg_rsp)
  );

  trng_data_regs #(
    .N_BITS_KEY (N_BITS_KEY)
  ) u_data_regs (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .reg_req_i    (data_reg_req),
    .reg_rsp_o    (data_reg_rsp),
    .keccak_out_i (keccak_out),
    .key_i        (out_key),
    .keccak_in_o  (keccak_in)
  );

  trng_keccak #(
    .N_RO        (N_RO),
    .N_INV       (N_INV),
    .N_BITS_KEY  (N_BITS_KEY),
    .NBITS       (NBITS),
    .WINDOW      (WINDOW),
    .CUTOFF      (CUTOFF),
    .FAIL_THRESH (FAIL_THRESH),
    .LATENCY     (LATENCY),
    .SEED_BASE   (SEED_BASE)
  ) u_trng_keccak (
    .clk_i           (clk_i),
    .rst_ni          (rst_ni),
    .enable_i        (trng_en),
    .ack_read_i      (ack_read),
    .conditioning_i  (conditioning),
    .keccak_start_i  (keccak_start),
    .keccak_in_i     (keccak_in),
    .out_key_o       (out_key),
    .key_ready_o     (key_ready),
    .trng_intr_o     (trng_intr_o),
    .flush_regs_o    (flush_regs_o),
    .trng_state_o    (trng_state_o),
    .keccak_out_o    (keccak_out),
    .keccak_status_o (keccak_status),
    .keccak_intr_o   (keccak_intr_o)
  );

endmodule
