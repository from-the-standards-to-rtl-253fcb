// tb_phy_cmd_slot: every controller command with random requests, checked
// against the DDR4 command truth table written out per command below
// (cs_n act_n ras_n cas_n we_n), slot 0 only, slots 1..3 deselected.
module tb_phy_cmd_slot;
  import cava_dram_pkg::*;

  command_t  cmd;
  request_t  req;
  phy_slot_t slot [PHY_SLOTS];
  int checks = 0, failures = 0;

  phy_cmd_slot dut (.command_i(cmd), .request_i(req), .slot_o(slot));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 700; i++) begin
      logic [4:0]  pins, exp_pins;
      logic [13:0] exp_adr;
      logic        chk_addr, chk_bank;
      cmd = command_t'(i % 7);
      req = request_t'($urandom);
      #1;
      pins = {slot[0].cs_n, slot[0].act_n, slot[0].ras_n, slot[0].cas_n, slot[0].we_n};
      chk_addr = 1'b1; chk_bank = 1'b1; exp_adr = '0;
      case (cmd)
        CMD_NOP:  begin exp_pins = 5'b11111; chk_addr = 0; chk_bank = 0; end
        CMD_ACT:  begin exp_pins = {2'b00, 1'b0, req.row[15], req.row[14]}; exp_adr = req.row[13:0]; end
        CMD_PRE:  begin exp_pins = 5'b01010; end
        CMD_PREA: begin exp_pins = 5'b01010; exp_adr = 14'h0400; chk_bank = 0; end
        CMD_REF:  begin exp_pins = 5'b01001; chk_bank = 0; end
        CMD_WR:   begin exp_pins = 5'b01100; exp_adr = {2'b01, 2'b00, req.col}; end
        CMD_RD:   begin exp_pins = 5'b01101; exp_adr = {2'b01, 2'b00, req.col}; end
        default:  exp_pins = 5'b11111;
      endcase
      checks++;
      if (pins != exp_pins || (chk_addr && slot[0].adr != exp_adr) ||
          (chk_bank && (slot[0].bg != req.bg || slot[0].ba != req.ba))) begin
        failures++;
        if (failures < 10) $display("FAIL cmd=%s pins=%b exp=%b adr=%h exp=%h", cmd.name(), pins, exp_pins, slot[0].adr, exp_adr);
      end
      for (int s = 1; s < PHY_SLOTS; s++) begin
        checks++;
        if (slot[s].cs_n != 1'b1) begin failures++; $display("FAIL slot %0d not deselected", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
