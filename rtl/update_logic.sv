// update_logic: transition function of the FIFO controller.
//
// Computes the next values of the three registers:
//   state  IDLE -> REFRESHING when cref = CNT_REF_PREA (PREA issued),
//          IDLE -> RUNNING when a slot starts (queue not empty and
//                  cref <= CNT_REF_PREA - SLOT_LEN),
//          RUNNING -> IDLE after the last slot cycle (cnt = SLOT_LEN - 1),
//          REFRESHING -> IDLE when cref = T_REFI - 1 (the counter wraps).
//   cnt    slot-cycle counter: 1 in the first RUNNING cycle, +1 per cycle,
//          0 outside RUNNING; bounded by SLOT_LEN.
//   cref   refresh counter: +1 every cycle, modulo T_REFI, so REF commands
//          are exactly T_REFI cycles apart.
// Purely combinational; an unused state encoding returns to IDLE.
//
// The three states, the two counters and their bounded ranges follow the
// design; the counter values at which transitions happen are this design's
// choice.
module update_logic
  import cava_dram_pkg::*;
#(
  parameter int unsigned T_RP     = cava_dram_pkg::DEF_T_RP,
  parameter int unsigned T_RFC    = cava_dram_pkg::DEF_T_RFC,
  parameter int unsigned T_REFI   = cava_dram_pkg::DEF_T_REFI,
  parameter int unsigned SLOT_LEN = cava_dram_pkg::DEF_SLOT_LEN,
  localparam int unsigned CNT_W   = cnt_w(SLOT_LEN),
  localparam int unsigned CREF_W  = cnt_w(T_REFI)
) (
  input  ctrl_state_t       state_i,
  input  logic              empty_i,
  input  logic [CNT_W-1:0]  cnt_i,
  input  logic [CREF_W-1:0] cref_i,
  output ctrl_state_t       state_o,
  output logic [CNT_W-1:0]  cnt_o,
  output logic [CREF_W-1:0] cref_o
);
  localparam int unsigned CNT_REF_PREA = T_REFI - T_RFC - T_RP;
  localparam int unsigned LAST_START   = CNT_REF_PREA - SLOT_LEN;

  always_comb begin
    // refresh counter: bounded, wraps at T_REFI
    if (32'(cref_i) >= T_REFI - 1) cref_o = '0;
    else                           cref_o = cref_i + 1'b1;

    state_o = ST_IDLE;
    cnt_o   = '0;
    unique case (state_i)
      ST_IDLE: begin
        if (32'(cref_i) == CNT_REF_PREA) begin
          state_o = ST_REFRESHING;
        end else if (!empty_i && 32'(cref_i) <= LAST_START) begin
          state_o = ST_RUNNING;
          cnt_o   = CNT_W'(1);
        end
      end
      ST_RUNNING: begin
        if (32'(cnt_i) >= SLOT_LEN - 1) begin
          state_o = ST_IDLE;
        end else begin
          state_o = ST_RUNNING;
          cnt_o   = cnt_i + 1'b1;
        end
      end
      ST_REFRESHING: begin
        state_o = (32'(cref_i) >= T_REFI - 1) ? ST_IDLE : ST_REFRESHING;
      end
      default: state_o = ST_IDLE;
    endcase
  end
endmodule
