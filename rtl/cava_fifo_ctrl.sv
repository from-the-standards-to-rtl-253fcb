// cava_fifo_ctrl: closed-page FIFO DRAM controller with refresh.
//
// Requests are served one at a time, in arrival order, each in a fixed slot
// of SLOT_LEN controller cycles long enough for PRE, ACT and one CAS to a
// single bank under every timing constraint. Periodically the controller
// stops starting slots, precharges all banks (PREA) and refreshes (REF).
//
// Structure: three registers, state (IDLE / RUNNING / REFRESHING), cnt (slot
// cycle) and cref (refresh counter), feed five blocks chained in this order:
//   read_logic   -> pop of the queue
//   request_queue-> empty, head of queue, ack (handshake)
//   next_cr      -> request_o, with the req register of the slot in progress
//   cmd_gen      -> command_o
//   update_logic -> next state, cnt and cref
//
// Interface: a request is accepted at a rising edge where pending_i and ack_o
// are both high (one request per cycle at most). command_o and request_o
// change with the registers; request_o holds the bank, row and column the
// command is for, REQUEST_NIL with NOP/PREA/REF. A request accepted into an
// empty, idle controller has its PRE two cycles after acceptance at the
// earliest, its CAS T_RP + T_RCD cycles after the PRE. All registers reset to
// IDLE / 0 on the active-low reset.
//
// Registers, block names, ports and the queue depth follow the design; the
// timing parameters (DDR4-2666 values quartered for the 1:4 clock ratio) are
// this design's choice.
module cava_fifo_ctrl
  import cava_dram_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH = 256,
  parameter int unsigned T_RP        = cava_dram_pkg::DEF_T_RP,
  parameter int unsigned T_RCD       = cava_dram_pkg::DEF_T_RCD,
  parameter int unsigned T_RFC       = cava_dram_pkg::DEF_T_RFC,
  parameter int unsigned T_REFI      = cava_dram_pkg::DEF_T_REFI,
  parameter int unsigned SLOT_LEN    = cava_dram_pkg::DEF_SLOT_LEN,
  localparam int unsigned CNT_W      = cnt_w(SLOT_LEN),
  localparam int unsigned CREF_W     = cnt_w(T_REFI)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     pending_i,
  input  request_t request_i,
  output logic     ack_o,
  output request_t request_o,
  output command_t command_o
);
  ctrl_state_t       state_q, state_d;
  logic [CNT_W-1:0]  cnt_q, cnt_d;
  logic [CREF_W-1:0] cref_q, cref_d;

  logic     pop, empty;
  request_t head;

  read_logic #(.T_RP(T_RP), .T_RFC(T_RFC), .T_REFI(T_REFI), .SLOT_LEN(SLOT_LEN)) u_read_logic (
    .state_i(state_q), .cref_i(cref_q), .empty_i(empty), .pop_o(pop)
  );

  request_queue #(.DEPTH(QUEUE_DEPTH), .WIDTH(REQ_W)) u_queue (
    .clk, .rst_n,
    .push_i(pending_i), .data_i(request_i), .pop_i(pop),
    .data_o(head), .empty_o(empty), .ack_o(ack_o)
  );

  next_cr #(.T_RP(T_RP), .T_RFC(T_RFC), .T_REFI(T_REFI), .SLOT_LEN(SLOT_LEN)) u_next_cr (
    .clk, .rst_n,
    .state_i(state_q), .cref_i(cref_q), .empty_i(empty), .data_i(head),
    .request_o(request_o)
  );

  cmd_gen #(.T_RP(T_RP), .T_RCD(T_RCD), .T_RFC(T_RFC), .T_REFI(T_REFI), .SLOT_LEN(SLOT_LEN)) u_cmd_gen (
    .state_i(state_q), .empty_i(empty), .cnt_i(cnt_q), .cref_i(cref_q),
    .request_i(request_o), .command_o(command_o)
  );

  update_logic #(.T_RP(T_RP), .T_RFC(T_RFC), .T_REFI(T_REFI), .SLOT_LEN(SLOT_LEN)) u_update (
    .state_i(state_q), .empty_i(empty), .cnt_i(cnt_q), .cref_i(cref_q),
    .state_o(state_d), .cnt_o(cnt_d), .cref_o(cref_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      cnt_q   <= '0;
      cref_q  <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
      cref_q  <= cref_d;
    end
  end

  // The slot and the refresh sequence must fit in one refresh interval.
  if (T_REFI < T_RFC + T_RP + SLOT_LEN + 1) begin : g_bad_timing
    $error("cava_fifo_ctrl: T_REFI too short for a slot plus the refresh sequence");
  end
  if (SLOT_LEN < T_RP + T_RCD + 1) begin : g_bad_slot
    $error("cava_fifo_ctrl: SLOT_LEN shorter than PRE-ACT-CAS");
  end

  a_one_cas_per_slot: assert property (@(posedge clk) disable iff (!rst_n)
      (command_o inside {CMD_RD, CMD_WR}) |-> state_q == ST_RUNNING)
    else $error("cava_fifo_ctrl: CAS outside a slot");
endmodule
