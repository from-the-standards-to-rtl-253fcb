// tb_cava_fifo_ctrl: cycle-exact check of the FIFO controller.
//
// Random requests arrive at a rate that changes in phases, so the queue (8
// entries here, to make it fill) runs empty, fills and stalls the host. The
// testbench keeps its own cycle count since reset, from which it knows the
// refresh-counter value, and a list of accepted requests with their
// acceptance cycle. It predicts, independently of the design:
//   - the cycle of each PRE: the first cycle that is after the acceptance,
//     at least SLOT_LEN (20) after the previous PRE, and at a counter value
//     where a whole slot still ends before the PREA (counter <= 2458);
//   - ACT T_RP (5) cycles and the CAS T_RP + T_RCD (10) cycles after the PRE,
//     all with the request on request_o, and RD or WR by its we bit;
//   - PREA exactly at counter 2478, REF exactly at 2483, with the null request;
//   - NOP in every other cycle.
// Mechanisms counted: host stalls (queue full), refreshes, slot starts
// delayed by the refresh window, back-to-back slots, reads and writes.
module tb_cava_fifo_ctrl;
  import cava_dram_pkg::*;

  localparam int QD         = 8;
  localparam int SLOT       = 20;
  localparam int REFI       = 2600;
  localparam int PREA_AT    = 2478;
  localparam int REF_AT     = 2483;
  localparam int LAST_START = 2458;
  localparam int NCYC       = 3 * REFI + 500;

  logic     clk = 0, rst_n = 0;
  logic     pending = 0, ack;
  request_t req_in = '0, req_out;
  command_t cmd;
  int checks = 0, failures = 0;

  typedef struct { request_t r; int acc; } entry_t;
  entry_t q[$];

  cava_fifo_ctrl #(.QUEUE_DEPTH(QD)) dut (
    .clk, .rst_n, .pending_i(pending), .request_i(req_in), .ack_o(ack),
    .request_o(req_out), .command_o(cmd)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int next_start(int t);
    while ((t % REFI) > LAST_START) t++;
    return t;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  initial begin
    int n = 0;              // posedges since reset release = cycle index
    int last_pre = -1000;
    int pre_at = -1, exp_pre;
    bit in_slot = 0;
    request_t cur = '0;
    int n_stall = 0, n_ref = 0, n_delayed = 0, n_b2b = 0, n_rd = 0, n_wr = 0, n_acc = 0, n_cas = 0;
    int rate;
    logic ack_s;

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (n = 0; n < NCYC; n++) begin
      // ---- drive inputs for cycle n
      case ((n / 700) % 4)
        0: rate = 3;     // light load: queue empties
        1: rate = 80;    // heavy load: queue fills, host stalls
        2: rate = 10;
        default: rate = 40;
      endcase
      if (n > NCYC - 400) rate = 0;   // let the queue drain at the end
      pending = ($urandom_range(0, 99) < rate);
      req_in  = request_t'($urandom);
      #1;
      // ---- handshake: ack is "queue not full"; the model's queue holds
      // the requests whose slot has not started
      checks++;
      if (ack != (q.size() < QD)) fail($sformatf("cycle %0d: ack=%0b with %0d queued", n, ack, q.size()));
      if (pending && !ack) n_stall++;
      // ---- check outputs of cycle n
      exp_pre = -1;
      if (!in_slot && q.size() != 0) begin
        exp_pre = next_start((q[0].acc + 1 > last_pre + SLOT) ? q[0].acc + 1 : last_pre + SLOT);
      end
      checks++;
      if ((n % REFI) == PREA_AT) begin
        if (cmd != CMD_PREA || req_out != REQUEST_NIL) fail($sformatf("cycle %0d: expected PREA, got %s", n, cmd.name()));
      end else if ((n % REFI) == REF_AT) begin
        if (cmd != CMD_REF || req_out != REQUEST_NIL) fail($sformatf("cycle %0d: expected REF, got %s", n, cmd.name()));
        n_ref++;
      end else if (exp_pre == n) begin
        if (cmd != CMD_PRE || req_out != q[0].r) fail($sformatf("cycle %0d: expected PRE of %h, got %s %h", n, q[0].r, cmd.name(), req_out));
        if (n > q[0].acc + 1 && last_pre + SLOT < n) n_delayed++;
        if (last_pre + SLOT == n) n_b2b++;
        cur = q[0].r; pre_at = n; last_pre = n; in_slot = 1;
        void'(q.pop_front());
      end else if (in_slot && n == pre_at + 5) begin
        if (cmd != CMD_ACT || req_out != cur) fail($sformatf("cycle %0d: expected ACT, got %s", n, cmd.name()));
      end else if (in_slot && n == pre_at + 10) begin
        if (cmd != (cur.we ? CMD_WR : CMD_RD) || req_out != cur) fail($sformatf("cycle %0d: expected CAS, got %s", n, cmd.name()));
        if (cur.we) n_wr++; else n_rd++;
        n_cas++;
      end else begin
        if (cmd != CMD_NOP) fail($sformatf("cycle %0d: expected NOP, got %s", n, cmd.name()));
      end
      if (in_slot && n == pre_at + SLOT - 1) in_slot = 0;
      ack_s = ack;
      @(posedge clk);
      if (pending && ack_s) begin q.push_back('{r: req_in, acc: n}); n_acc++; end
      @(negedge clk);
    end
    $display("accepted %0d, served %0d (rd %0d wr %0d), stalls %0d, refreshes %0d, delayed starts %0d, back-to-back %0d",
             n_acc, n_cas, n_rd, n_wr, n_stall, n_ref, n_delayed, n_b2b);
    checks += 6;
    if (n_cas != n_acc)              fail("not every accepted request was served");
    if (n_stall == 0)                fail("host never stalled");
    if (n_ref != 3)                  fail("expected 3 refreshes");
    if (n_delayed == 0)              fail("no slot start was held back by the refresh window");
    if (n_b2b == 0)                  fail("no back-to-back slots");
    if (n_rd == 0 || n_wr == 0)      fail("reads or writes missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
