// Control unit of the TRNG: a six-state FSM (IDLE, BIST, WAIT, ES32, WAIT_FOR_ACK,
// DEAD) that sequences warm-up, key collection and hand-over.
//
// IDLE      everything off. enable_i moves to BIST.
// BIST      warm-up / start-up test: noise source sampled and health tests run,
//           no key produced, flush_regs_o high. counter_BIST counts cycles without
//           error; after LATENCY of them the FSM moves to WAIT.
// WAIT      the random bits are shifted into the key register for WAIT_CONST
//           cycles (counter_WAIT), one bit per cycle.
// ES32      one cycle: key complete, rnd_ready_o and trng_intr_o high.
// WAIT_FOR_ACK  sampling stops so the key stays stable until ack_read_i; then WAIT
//           collects the next key.
// DEAD      unrecoverable: reached on tot_fail_i, left only through reset.
//
// From BIST, WAIT, ES32 and WAIT_FOR_ACK an error_i sends the FSM back to BIST and
// clears both counters; counter_BIST stays at 0 while error_i is high, so BIST lasts
// LATENCY error-free cycles. tot_fail_i has priority over error_i.
//
// Outputs: dff_en_o enables the noise-source sampling flip-flops and the key shift
// register, enable_ht_o the health tests; both are high in BIST and WAIT. All
// outputs are decoded from the registered state (Moore).
//
// The states, the counters and the transitions follow the design. The LATENCY
// default of 64 cycles, holding sampling and health tests in ES32 and
// WAIT_FOR_ACK, and raising flush_regs_o for the whole BIST state are this
// implementation's choices.
`timescale 1ns / 1ps
module trng_cu
  import trng_pkg::*;
#(
  parameter int unsigned LATENCY    = 64,
  parameter int unsigned WAIT_CONST = 32
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  logic      enable_i,
  input  logic      ack_read_i,
  input  logic      error_i,
  input  logic      tot_fail_i,
  output logic      enable_ht_o,
  output logic      dff_en_o,
  output logic      flush_regs_o,
  output logic      rnd_ready_o,
  output logic      trng_intr_o,
  output cu_state_e state_o
);

  localparam int unsigned BIST_W = $clog2(LATENCY + 1);
  localparam int unsigned WAIT_W = $clog2(WAIT_CONST + 1);

  cu_state_e         state_q, state_d;
  logic [BIST_W-1:0] counter_bist_q, counter_bist_d;
  logic [WAIT_W-1:0] counter_wait_q, counter_wait_d;
  logic              running;

  assign running = (state_q == CU_BIST) || (state_q == CU_WAIT) ||
                   (state_q == CU_ES32) || (state_q == CU_WAIT_FOR_ACK);

  always_comb begin
    state_d        = state_q;
    counter_bist_d = counter_bist_q;
    counter_wait_d = counter_wait_q;
    if (running && tot_fail_i) begin
      state_d        = CU_DEAD;
      counter_bist_d = '0;
      counter_wait_d = '0;
    end else if (running && error_i) begin
      state_d        = CU_BIST;
      counter_bist_d = '0;
      counter_wait_d = '0;
    end else begin
      unique case (state_q)
        CU_IDLE: if (enable_i) state_d = CU_BIST;
        CU_BIST: begin
          if (counter_bist_q == BIST_W'(LATENCY - 1)) begin
            state_d        = CU_WAIT;
            counter_bist_d = '0;
          end else begin
            counter_bist_d = counter_bist_q + BIST_W'(1);
          end
        end
        CU_WAIT: begin
          if (counter_wait_q == WAIT_W'(WAIT_CONST - 1)) begin
            state_d        = CU_ES32;
            counter_wait_d = '0;
          end else begin
            counter_wait_d = counter_wait_q + WAIT_W'(1);
          end
        end
        CU_ES32:         state_d = CU_WAIT_FOR_ACK;
        CU_WAIT_FOR_ACK: if (ack_read_i) state_d = CU_WAIT;
        CU_DEAD:         state_d = CU_DEAD;
        default:         state_d = CU_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q        <= CU_IDLE;
      counter_bist_q <= '0;
      counter_wait_q <= '0;
    end else begin
      state_q        <= state_d;
      counter_bist_q <= counter_bist_d;
      counter_wait_q <= counter_wait_d;
    end
  end

  assign dff_en_o     = (state_q == CU_BIST) || (state_q == CU_WAIT);
  assign enable_ht_o  = dff_en_o;
  assign flush_regs_o = (state_q == CU_BIST);
  assign rnd_ready_o  = (state_q == CU_ES32);
  assign trng_intr_o  = (state_q == CU_ES32);
  assign state_o      = state_q;

  // Once dead, the FSM stays dead until reset.
  property p_dead_sticky;
    @(posedge clk_i) disable iff (!rst_ni) (state_q == CU_DEAD) |=> (state_q == CU_DEAD);
  endproperty
  assert property (p_dead_sticky);

endmodule
