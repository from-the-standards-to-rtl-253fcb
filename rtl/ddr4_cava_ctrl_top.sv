// ddr4_cava_ctrl_top: scheduling part of a DDR4 controller built around the
// FIFO controller.
//
// A host request (read/write flag and byte address, valid = req_pending_i)
// is split into row, column, bank and bank group by address_mapping and
// offered to cava_fifo_ctrl, which accepts it when req_ack_o is high,
// queues it, and serves it in arrival order with PRE, ACT and RD/WR,
// inserting PREA and REF every refresh interval. phy_cmd_slot encodes each
// command as DDR4 command/address pins in slot 0 of the four slots per system
// clock that the PHY takes (clock ratio 1:4).
//
// The host interface, the write and read data buffers, the PHY and the DRAM
// are outside this module. command_o and request_o are brought out for the
// data buffers: a RD or WR on command_o, with its request on request_o, is
// the moment the data transfer for that request is scheduled.
//
// Timing: req_ack_o is combinational (not full); the command of a cycle
// appears on phy_slot_o in the same cycle. Active-low reset. Slots 1 to 3 of
// phy_slot_o are constant deselect, since the controller issues at most one
// command per system clock.
//
// The arrangement follows the design; parameter defaults are the queue depth
// of 256 requests and DDR4-2666 timings, the latter this design's choice.
module ddr4_cava_ctrl_top
  import cava_dram_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH = 256,
  parameter int unsigned T_RP        = cava_dram_pkg::DEF_T_RP,
  parameter int unsigned T_RCD       = cava_dram_pkg::DEF_T_RCD,
  parameter int unsigned T_RFC       = cava_dram_pkg::DEF_T_RFC,
  parameter int unsigned T_REFI      = cava_dram_pkg::DEF_T_REFI,
  parameter int unsigned SLOT_LEN    = cava_dram_pkg::DEF_SLOT_LEN
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              req_pending_i,
  input  logic              req_write_i,
  input  logic [ADDR_W-1:0] req_addr_i,
  output logic              req_ack_o,
  // to the data buffers
  output command_t          command_o,
  output request_t          request_o,
  // to the PHY
  output phy_slot_t         phy_slot_o [PHY_SLOTS]
);
  request_t req_in;

  address_mapping u_addr_map (
    .write_i(req_write_i), .addr_i(req_addr_i), .request_o(req_in)
  );

  cava_fifo_ctrl #(
    .QUEUE_DEPTH(QUEUE_DEPTH), .T_RP(T_RP), .T_RCD(T_RCD),
    .T_RFC(T_RFC), .T_REFI(T_REFI), .SLOT_LEN(SLOT_LEN)
  ) u_ctrl (
    .clk, .rst_n,
    .pending_i(req_pending_i), .request_i(req_in), .ack_o(req_ack_o),
    .request_o(request_o), .command_o(command_o)
  );

  phy_cmd_slot u_slot (
    .command_i(command_o), .request_i(request_o), .slot_o(phy_slot_o)
  );
endmodule
