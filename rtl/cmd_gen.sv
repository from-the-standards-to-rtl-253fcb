// cmd_gen: DRAM command of the current cycle.
//
// A closed-page FIFO slot always issues PRE, ACT and one CAS to the bank of
// its request: PRE in the IDLE cycle that starts the slot (slot cycle 0), ACT
// at slot cycle T_RP and the CAS (RD or WR, from the request's we bit) at
// slot cycle T_RP + T_RCD; every other slot cycle is a NOP. In IDLE, when the
// refresh counter reaches CNT_REF_PREA the all-bank precharge PREA is issued,
// and in REFRESHING the REF follows T_RP cycles later, at REF_DATE =
// T_REFI - T_RFC, so that tRFC has elapsed when the counter wraps to 0.
// Purely combinational.
//
// The PRE-ACT-CAS order, the PREA at CNT_REF_PREA in IDLE and the REF in
// REFRESHING follow the design; the slot cycles and refresh dates derived
// from the timing parameters are this design's choice.
module cmd_gen
  import cava_dram_pkg::*;
#(
  parameter int unsigned T_RP     = cava_dram_pkg::DEF_T_RP,
  parameter int unsigned T_RCD    = cava_dram_pkg::DEF_T_RCD,
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
  input  request_t          request_i,  // from next_cr
  output command_t          command_o
);
  localparam int unsigned REF_DATE     = T_REFI - T_RFC;
  localparam int unsigned CNT_REF_PREA = REF_DATE - T_RP;
  localparam int unsigned LAST_START   = CNT_REF_PREA - SLOT_LEN;
  localparam int unsigned ACT_DATE     = T_RP;
  localparam int unsigned CAS_DATE     = T_RP + T_RCD;

  always_comb begin
    command_o = CMD_NOP;
    unique case (state_i)
      ST_IDLE: begin
        if (32'(cref_i) == CNT_REF_PREA)                 command_o = CMD_PREA;
        else if (!empty_i && 32'(cref_i) <= LAST_START) command_o = CMD_PRE;
      end
      ST_RUNNING: begin
        if (32'(cnt_i) == ACT_DATE)      command_o = CMD_ACT;
        else if (32'(cnt_i) == CAS_DATE) command_o = request_i.we ? CMD_WR : CMD_RD;
      end
      ST_REFRESHING: begin
        if (32'(cref_i) == REF_DATE)     command_o = CMD_REF;
      end
      default: command_o = CMD_NOP;
    endcase
  end
endmodule
