// address_mapping: byte address and read/write flag to a controller request.
//
// Splits a byte address of one DDR4 device into column, bank group, bank and
// row, lowest bits first: addr = {row, bank, bank group, column}. Putting the
// bank group just above the column sends consecutive 1 KiB blocks to
// different bank groups. Purely combinational.
//
// That the controller receives row, column, bank and bank group from an
// address-mapping stage follows the design; the bit order is this design's
// choice (the FIFO controller closes the row after every access, so the order
// does not change its timing).
module address_mapping
  import cava_dram_pkg::*;
(
  input  logic              write_i,  // 1: write request, 0: read request
  input  logic [ADDR_W-1:0] addr_i,   // byte address
  output request_t          request_o
);
  always_comb begin
    request_o.we  = write_i;
    request_o.col = addr_i[COL_W-1:0];
    request_o.bg  = addr_i[COL_W +: BG_W];
    request_o.ba  = addr_i[COL_W+BG_W +: BA_W];
    request_o.row = addr_i[COL_W+BG_W+BA_W +: ROW_W];
  end
endmodule
