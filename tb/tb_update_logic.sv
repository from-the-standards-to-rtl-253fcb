// tb_update_logic: check of the transition function against a reference.
//
// Sweeps state, queue emptiness, every slot-cycle value and a set of
// refresh-counter values around the dates where something happens (0, the
// last slot start, the PREA date, the REF date, the end of the interval) plus
// random ones, at the default timing (SLOT_LEN 20, T_REFI 2600, PREA at 2478).
module tb_update_logic;
  import cava_dram_pkg::*;

  localparam int unsigned CNT_W  = cnt_w(DEF_SLOT_LEN);
  localparam int unsigned CREF_W = cnt_w(DEF_T_REFI);
  localparam int PREA_AT    = 2478;   // 2600 - 117 - 5
  localparam int LAST_START = 2458;   // PREA_AT - 20

  ctrl_state_t       state, state_n;
  logic              empty;
  logic [CNT_W-1:0]  cnt, cnt_n;
  logic [CREF_W-1:0] cref, cref_n;
  int checks = 0, failures = 0;

  update_logic dut (.state_i(state), .empty_i(empty), .cnt_i(cnt), .cref_i(cref),
                    .state_o(state_n), .cnt_o(cnt_n), .cref_o(cref_n));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int s, int e, int c, int r);
    int es, ec, er;
    state = ctrl_state_t'(s); empty = e[0]; cnt = CNT_W'(c); cref = CREF_W'(r);
    #1;
    er = (r == 2599) ? 0 : r + 1;
    es = 0; ec = 0;
    if (s == 0) begin
      if (r == PREA_AT) es = 2;
      else if (e == 0 && r <= LAST_START) begin es = 1; ec = 1; end
    end else if (s == 1) begin
      if (c == 19) begin es = 0; ec = 0; end
      else begin es = 1; ec = c + 1; end
    end else begin
      es = (r == 2599) ? 0 : 2;
    end
    checks++;
    if (int'(state_n) != es || int'(cnt_n) != ec || int'(cref_n) != er) begin
      failures++;
      if (failures < 10)
        $display("FAIL s=%0d e=%0d c=%0d r=%0d -> %0d/%0d/%0d exp %0d/%0d/%0d",
                 s, e, c, r, state_n, cnt_n, cref_n, es, ec, er);
    end
  endtask

  initial begin
    int refs[$];
    refs = '{0, 1, 100, LAST_START - 1, LAST_START, LAST_START + 1, PREA_AT - 1, PREA_AT,
             PREA_AT + 1, 2482, 2483, 2484, 2598, 2599};
    for (int k = 0; k < 40; k++) refs.push_back($urandom_range(0, 2599));
    foreach (refs[i])
      for (int s = 0; s < 3; s++)
        for (int e = 0; e < 2; e++)
          for (int c = 0; c < 20; c++)
            check_one(s, e, (s == 1) ? c : 0, refs[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
