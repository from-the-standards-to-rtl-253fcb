// next_cr: the request currently being served.
//
// Holds the req register, the request of the slot in progress. When a slot
// starts (controller IDLE, queue not empty, enough time left before the
// refresh sequence) the head of the queue is driven straight to request_o and
// captured in req; during the rest of the slot (RUNNING) request_o is req.
// Otherwise request_o is the all-zero null request. request_o therefore
// carries the bank, row and column of every PRE, ACT and CAS of the slot in
// the same cycle as the command. req is cleared by the active-low reset.
//
// The register and the outputs follow the design; the null request being all
// zeros and the reset value are this design's choice.
module next_cr
  import cava_dram_pkg::*;
#(
  parameter int unsigned T_RP     = cava_dram_pkg::DEF_T_RP,
  parameter int unsigned T_RFC    = cava_dram_pkg::DEF_T_RFC,
  parameter int unsigned T_REFI   = cava_dram_pkg::DEF_T_REFI,
  parameter int unsigned SLOT_LEN = cava_dram_pkg::DEF_SLOT_LEN,
  localparam int unsigned CREF_W  = cnt_w(T_REFI)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_state_t       state_i,
  input  logic [CREF_W-1:0] cref_i,
  input  logic              empty_i,
  input  request_t          data_i,     // head of the queue
  output request_t          request_o
);
  localparam int unsigned CNT_REF_PREA = T_REFI - T_RFC - T_RP;
  localparam int unsigned LAST_START   = CNT_REF_PREA - SLOT_LEN;

  request_t req_q;
  logic     start;

  always_comb begin
    start = (state_i == ST_IDLE) && !empty_i && (32'(cref_i) <= LAST_START);
    if (start)                       request_o = data_i;
    else if (state_i == ST_RUNNING)  request_o = req_q;
    else                             request_o = REQUEST_NIL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      req_q <= REQUEST_NIL;
    else if (start)  req_q <= data_i;
  end
endmodule
