// tb_next_cr: the request output and the req register.
//
// Drives random sequences of state, refresh counter, queue emptiness and
// queue head. Expected each cycle: the head when a slot starts (IDLE,
// non-empty, counter <= 2458 at the default timing), the request captured at
// the last slot start while RUNNING, the all-zero request otherwise.
module tb_next_cr;
  import cava_dram_pkg::*;

  localparam int unsigned CREF_W = cnt_w(DEF_T_REFI);

  logic              clk = 0, rst_n = 0;
  ctrl_state_t       state = ST_IDLE;
  logic [CREF_W-1:0] cref = '0;
  logic              empty = 1;
  request_t          head = '0, req_o, held;
  int checks = 0, failures = 0, n_start = 0, n_run = 0;

  next_cr dut (.clk, .rst_n, .state_i(state), .cref_i(cref), .empty_i(empty),
               .data_i(head), .request_o(req_o));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    request_t exp;
    held = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      logic start;
      @(negedge clk);
      state = ctrl_state_t'($urandom_range(0, 2));
      cref  = CREF_W'(($urandom_range(0, 3) == 0) ? $urandom_range(2440, 2599) : $urandom_range(0, 2599));
      empty = $urandom_range(0, 1);
      head  = request_t'($urandom);
      #1;
      start = (state == ST_IDLE) && !empty && (cref <= 2458);
      if (start)                   exp = head;
      else if (state == ST_RUNNING) exp = held;
      else                         exp = '0;
      checks++;
      if (req_o != exp) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d state=%0d req=%h exp=%h", cyc, state, req_o, exp);
      end
      if (start) begin held = head; n_start++; end
      if (state == ST_RUNNING) n_run++;
    end
    checks++;
    if (n_start == 0 || n_run == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
