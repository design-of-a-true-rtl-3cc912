// Shared types and constants of the TRNG accelerator.
//
// - cu_state_e: the six states of the TRNG control unit.
// - reg_req_t / reg_rsp_t: a simple register interface (valid/write/address/data
//   request, single-cycle ready/rdata/error response) used by the register files.
// - obi_req_t / obi_rsp_t: the request and response channels of an OBI slave port
//   (req/gnt address phase, rvalid/rdata response phase).
// - Register map of the control/status register and of the data register file.
//   The names of the fields follow the design; their bit positions and the data
//   register offsets are this implementation's choice.
`timescale 1ns / 1ps
package trng_pkg;

  typedef enum logic [2:0] {
    CU_IDLE         = 3'd0,
    CU_BIST         = 3'd1,
    CU_WAIT         = 3'd2,
    CU_ES32         = 3'd3,
    CU_WAIT_FOR_ACK = 3'd4,
    CU_DEAD         = 3'd5
  } cu_state_e;

  typedef struct packed {
    logic        valid;
    logic        write;
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
  } reg_req_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        error;
    logic        ready;
  } reg_rsp_t;

  typedef struct packed {
    logic        req;
    logic        we;
    logic [3:0]  be;
    logic [31:0] addr;
    logic [31:0] wdata;
  } obi_req_t;

  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic        err;
    logic [31:0] rdata;
  } obi_rsp_t;

  // Control/status register (offset 0 of the control register file)
  localparam int unsigned CTRL_TRNG_EN_BIT       = 0;  // sw RW: enable pulse
  localparam int unsigned CTRL_ACK_KEY_READ_BIT  = 1;  // sw RW: key acknowledge
  localparam int unsigned STATUS_TRNG_BIT        = 2;  // sw RO: key ready
  localparam int unsigned CTRL_KECCAK_START_BIT  = 3;  // sw W1: Keccak start pulse
  localparam int unsigned STATUS_KECCAK_BIT      = 4;  // sw RO: Keccak output ready
  localparam int unsigned CTRL_CONDITIONING_BIT  = 5;  // sw RW: Keccak conditioning

  // Keccak state
  localparam int unsigned KECCAK_W     = 1600;
  localparam int unsigned KECCAK_WORDS = KECCAK_W / 32;  // 50

  // Data register file, byte offsets
  localparam logic [11:0] DOUT_KECCAK_OFFSET = 12'h000;  // words 0..49, RO
  localparam logic [11:0] DOUT_KEY_OFFSET    = 12'h0C8;  // word 50 on, RO
  localparam logic [11:0] DIN_KECCAK_OFFSET  = 12'h100;  // words 0..49, RW

endpackage
