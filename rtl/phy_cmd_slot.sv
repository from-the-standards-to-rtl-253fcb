// phy_cmd_slot: controller command to the four command slots of the PHY.
//
// The PHY runs on the system clock, a quarter of the DRAM clock, and takes
// four command/address slots per system clock, which it sends on four
// consecutive DRAM clocks. The controller issues at most one command per
// system clock; this block encodes it as DDR4 command pins and places it in
// slot 0. Slots 1 to 3 are always deselect (cs_n high), and so is slot 0 when
// the command is a NOP. Purely combinational.
//
// Encodings (DDR4 command truth table): ACT act_n=0 with the row on
// A16..A0; PRE/PREA ras_n=0 we_n=0, A10 = 0/1; REF ras_n=0 cas_n=0; WR
// cas_n=0 we_n=0; RD cas_n=0; CAS without auto-precharge (A10=0) and with
// BL8 (A12=1). Unused address bits are driven 0.
//
// Slot-0 placement follows the design; the pin encoding is the DDR4
// standard's, and driving don't-care bits to 0 is this design's choice.
module phy_cmd_slot
  import cava_dram_pkg::*;
(
  input  command_t  command_i,
  input  request_t  request_i,
  output phy_slot_t slot_o [PHY_SLOTS]
);
  phy_slot_t s0;

  always_comb begin
    s0    = PHY_DES;
    s0.bg = request_i.bg;
    s0.ba = request_i.ba;
    unique case (command_i)
      CMD_ACT: begin
        s0.cs_n  = 1'b0;
        s0.act_n = 1'b0;
        s0.ras_n = 1'b0;                 // A16: no such row bit on this part
        s0.cas_n = request_i.row[15];    // A15
        s0.we_n  = request_i.row[14];    // A14
        s0.adr   = request_i.row[13:0];
      end
      CMD_PRE, CMD_PREA: begin
        s0.cs_n  = 1'b0;
        s0.ras_n = 1'b0;
        s0.we_n  = 1'b0;
        s0.adr[10] = (command_i == CMD_PREA);
      end
      CMD_REF: begin
        s0.cs_n  = 1'b0;
        s0.ras_n = 1'b0;
        s0.cas_n = 1'b0;
        s0.bg    = '0;
        s0.ba    = '0;
      end
      CMD_RD, CMD_WR: begin
        s0.cs_n  = 1'b0;
        s0.cas_n = 1'b0;
        s0.we_n  = (command_i == CMD_RD);
        s0.adr[COL_W-1:0] = request_i.col;
        s0.adr[12] = 1'b1;               // BC_n high: full BL8
      end
      default: s0 = PHY_DES;
    endcase
    if (command_i == CMD_PREA) begin
      s0.bg = '0;
      s0.ba = '0;
    end

    slot_o[0] = s0;
    for (int i = 1; i < PHY_SLOTS; i++) slot_o[i] = PHY_DES;
  end
endmodule
