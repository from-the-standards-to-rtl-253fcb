// read_logic: read enable (pop) of the request queue.
//
// The queue is read in the cycle a new slot starts: the controller is IDLE,
// the queue holds a request, and the slot that would start now ends before the
// refresh counter reaches the value at which the all-bank precharge of the
// refresh sequence is due (CNT_REF_PREA). The last refresh-counter value at
// which a slot may start is therefore CNT_REF_PREA - SLOT_LEN. The block is
// purely combinational; the queue's head is popped at the clock edge that
// ends the cycle in which pop_o is high.
//
// That the pop comes from the registers and the queue state follows the
// design; the exact start condition (slot must end before the refresh
// sequence) is this design's choice.
module read_logic
  import cava_dram_pkg::*;
#(
  parameter int unsigned T_RP     = cava_dram_pkg::DEF_T_RP,
  parameter int unsigned T_RFC    = cava_dram_pkg::DEF_T_RFC,
  parameter int unsigned T_REFI   = cava_dram_pkg::DEF_T_REFI,
  parameter int unsigned SLOT_LEN = cava_dram_pkg::DEF_SLOT_LEN,
  localparam int unsigned CREF_W  = cnt_w(T_REFI)
) (
  input  ctrl_state_t       state_i,
  input  logic [CREF_W-1:0] cref_i,
  input  logic              empty_i,
  output logic              pop_o
);
  localparam int unsigned CNT_REF_PREA = T_REFI - T_RFC - T_RP;
  localparam int unsigned LAST_START   = CNT_REF_PREA - SLOT_LEN;

  always_comb begin
    pop_o = (state_i == ST_IDLE) && !empty_i && (32'(cref_i) <= LAST_START);
  end
endmodule
