// request_queue: the controller's request FIFO.
//
// A dual-ported memory (one write port, one read port) of DEPTH entries with
// a write pointer and a read pointer. Each pointer has one bit more than the
// address, so the queue is empty when the pointers are equal and full when
// they differ only in that top bit. The head entry is read combinationally
// (data_o = mem[read address]), as a distributed-RAM read port would, so the
// controller can use the head in the same cycle it pops it.
//
// Handshake: ack_o = not full. A request is accepted, and written at the
// write pointer, at the rising clock edge where pending_i and ack_o are both
// high. pop_i removes the head at the same edge; popping an empty queue is a
// protocol error caught by an assertion. A request written into an empty
// queue is visible on data_o from the next cycle. Pointers reset to zero
// (active-low reset); the memory itself is not reset.
//
// The dual-ported memory, the pointer-based full/empty logic, the ports and
// the depth of 256 follow the design; ack_o being exactly "not full" and the
// combinational read are this design's choices. DEPTH must be a power of two.
module request_queue #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = cava_dram_pkg::REQ_W,
  localparam int unsigned AW   = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_i,   // pending_i of the controller
  input  logic [WIDTH-1:0] data_i,   // request_i of the controller
  input  logic             pop_i,
  output logic [WIDTH-1:0] data_o,
  output logic             empty_o,
  output logic             ack_o
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             full, do_push;

  always_comb begin
    empty_o = (wr_ptr == rd_ptr);
    full    = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
    ack_o   = !full;
    do_push = push_i && ack_o;
    data_o  = mem[rd_ptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr[AW-1:0]] <= data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (pop_i)   rd_ptr <= rd_ptr + 1'b1;
    end
  end

  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> !empty_o)
    else $error("request_queue: pop of an empty queue");

  if ((1 << AW) != DEPTH) begin : g_bad_depth
    $error("request_queue: DEPTH must be a power of two");
  end
endmodule
