// tb_read_logic: exhaustive check of the queue read enable.
//
// Sweeps every state, both queue states and every refresh-counter value at
// the default timing. Expected: pop only in IDLE with a non-empty queue and
// only while a whole slot (SLOT_LEN cycles) still ends no later than the
// all-bank precharge of the refresh sequence, which falls T_RP + T_RFC cycles
// before the end of the refresh interval.
module tb_read_logic;
  import cava_dram_pkg::*;

  localparam int unsigned CREF_W = cnt_w(DEF_T_REFI);

  ctrl_state_t       state;
  logic [CREF_W-1:0] cref;
  logic              empty, pop;
  int checks = 0, failures = 0;
  int unsigned prea_at;
  int n_pop = 0;

  read_logic dut (.state_i(state), .cref_i(cref), .empty_i(empty), .pop_o(pop));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prea_at = DEF_T_REFI - DEF_T_RFC - DEF_T_RP;
    for (int s = 0; s < 3; s++) begin
      for (int e = 0; e < 2; e++) begin
        for (int c = 0; c < int'(DEF_T_REFI); c++) begin
          logic exp;
          state = ctrl_state_t'(s);
          empty = e[0];
          cref  = CREF_W'(c);
          #1;
          // a slot started at c occupies c .. c+SLOT_LEN-1; PREA must come after
          exp = (s == 0) && (e == 0) && (c + int'(DEF_SLOT_LEN) <= int'(prea_at));
          checks++;
          if (pop !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL state=%0d empty=%0d cref=%0d pop=%0b exp=%0b", s, e, c, pop, exp);
          end
          if (pop) n_pop++;
        end
      end
    end
    // 2600 - 117 - 5 = 2478 is the PREA date; starts at cref 0..2458
    checks++;
    if (n_pop != 2459) begin failures++; $display("FAIL pop count %0d", n_pop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
