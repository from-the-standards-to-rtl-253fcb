// tb_cmd_gen: check of the command generator against a reference table.
//
// Default timing: T_RP 5, T_RCD 5, so in a slot ACT is at slot cycle 5 and
// the CAS at 10; PREA at refresh-counter value 2478 (in IDLE), REF at 2483
// (in REFRESHING); a slot may start (PRE) while the counter is at most 2458.
module tb_cmd_gen;
  import cava_dram_pkg::*;

  localparam int unsigned CNT_W  = cnt_w(DEF_SLOT_LEN);
  localparam int unsigned CREF_W = cnt_w(DEF_T_REFI);

  ctrl_state_t       state;
  logic              empty;
  logic [CNT_W-1:0]  cnt;
  logic [CREF_W-1:0] cref;
  request_t          req;
  command_t          cmd;
  int checks = 0, failures = 0;
  int seen[7];

  cmd_gen dut (.state_i(state), .empty_i(empty), .cnt_i(cnt), .cref_i(cref),
               .request_i(req), .command_o(cmd));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int s, int e, int c, int r, bit we);
    command_t exp;
    state = ctrl_state_t'(s); empty = e[0]; cnt = CNT_W'(c); cref = CREF_W'(r);
    req = request_t'($urandom);
    req.we = we;
    #1;
    exp = CMD_NOP;
    case (s)
      0: if (r == 2478) exp = CMD_PREA; else if (e == 0 && r <= 2458) exp = CMD_PRE;
      1: if (c == 5) exp = CMD_ACT; else if (c == 10) exp = we ? CMD_WR : CMD_RD;
      2: if (r == 2483) exp = CMD_REF;
      default: ;
    endcase
    checks++;
    seen[int'(cmd)]++;
    if (cmd != exp) begin
      failures++;
      if (failures < 10) $display("FAIL s=%0d e=%0d c=%0d r=%0d we=%0b cmd=%0d exp=%0d", s, e, c, r, we, cmd, exp);
    end
  endtask

  initial begin
    int refs[$];
    refs = '{0, 7, 2457, 2458, 2459, 2477, 2478, 2479, 2482, 2483, 2484, 2599};
    for (int k = 0; k < 20; k++) refs.push_back($urandom_range(0, 2599));
    foreach (refs[i])
      for (int s = 0; s < 3; s++)
        for (int e = 0; e < 2; e++)
          for (int c = 0; c < 20; c++)
            for (int w = 0; w < 2; w++)
              check_one(s, e, c, refs[i], w[0]);
    // every command kind must have been produced
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL command %0d never produced", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
