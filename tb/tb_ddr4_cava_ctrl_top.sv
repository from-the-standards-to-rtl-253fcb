// tb_ddr4_cava_ctrl_top: end-to-end run of the controller at its default
// parameters (256-entry queue, DDR4-2666 timing, refresh every 2600 cycles).
//
// A host model sends random reads and writes to random byte addresses, in
// load phases that leave the queue empty, fill all 256 entries (the host is
// stalled by ack low) and drain it. On the PHY side, ddr4_cmd_monitor decodes
// the command pins of the four slots and checks DDR4 timing and bank state.
// The testbench checks that every accepted request comes out as exactly one
// RD/WR on the pins, in acceptance order, with the bank group, bank, row and
// column the address maps to; that only slot 0 is ever used; that an
// isolated request's CAS reaches the pins T_RP + T_RCD + 1 = 11 cycles after
// it was accepted; and that under a backlog CASes are one slot (20 cycles)
// apart. Mechanisms counted, each must occur: host stall on a full queue,
// refresh (PREA and REF), a slot start held back by the refresh, back-to-back
// slots, idle cycles with an empty queue, reads and writes.
module tb_ddr4_cava_ctrl_top;
  import cava_dram_pkg::*;

  localparam int NCYC = 4 * 2600 + 6000;

  logic              clk = 0, rst_n = 0;
  logic              pend = 0, wr = 0, ack;
  logic [ADDR_W-1:0] addr = '0;
  command_t          cmd;
  request_t          req;
  phy_slot_t         slots [PHY_SLOTS];
  logic              cas_v;
  request_t          cas;
  int                mon_err, n_ref, n_prea;
  int checks = 0, failures = 0;

  typedef struct { request_t r; int acc; } entry_t;
  entry_t sb[$];

  ddr4_cava_ctrl_top dut (
    .clk, .rst_n, .req_pending_i(pend), .req_write_i(wr), .req_addr_i(addr),
    .req_ack_o(ack), .command_o(cmd), .request_o(req), .phy_slot_o(slots)
  );

  ddr4_cmd_monitor mon (
    .clk, .rst_n, .slot_i(slots), .cas_valid_o(cas_v), .cas_o(cas),
    .errors_o(mon_err), .n_ref_o(n_ref), .n_prea_o(n_prea)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    if (failures < 15) $display("FAIL %s", m);
  endtask

  initial begin
    int n, rate, last_cas = -1000;
    int n_stall = 0, n_acc = 0, n_cas = 0, n_rd = 0, n_wr = 0, n_idle = 0;
    int n_held = 0, n_b2b = 0, n_iso = 0, n_multi = 0;
    logic ack_s;
    request_t exp;

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (n = 0; n < NCYC; n++) begin
      case ((n / 1500) % 4)
        0: rate = 2;
        1: rate = 90;
        2: rate = 20;
        default: rate = 60;
      endcase
      if (n >= NCYC - 6000) rate = 0;     // drain: 256 slots take 5120 cycles
      pend = ($urandom_range(0, 99) < rate);
      wr   = $urandom_range(0, 1);
      addr = ADDR_W'($urandom);
      #1;
      ack_s = ack;
      if (pend && !ack) n_stall++;
      if (dut.u_ctrl.state_q == ST_IDLE && dut.u_ctrl.empty) n_idle++;
      if (dut.u_ctrl.state_q == ST_IDLE && !dut.u_ctrl.empty && cmd == CMD_NOP) n_held++;
      for (int s = 1; s < PHY_SLOTS; s++) begin
        checks++;
        if (!slots[s].cs_n) fail($sformatf("cycle %0d: slot %0d used", n, s));
      end
      @(posedge clk);
      if (pend && ack_s) begin
        exp.we  = wr;
        exp.col = addr[9:0];
        exp.bg  = addr[11:10];
        exp.ba  = addr[13:12];
        exp.row = addr[29:14];
        sb.push_back('{r: exp, acc: n});
        n_acc++;
      end
      #1;
      // the monitor has decoded this cycle's slots at the edge
      if (cas_v) begin
        checks++;
        if (sb.size() == 0) fail($sformatf("cycle %0d: CAS with nothing outstanding", n));
        else begin
          if (cas != sb[0].r) fail($sformatf("cycle %0d: CAS %h, expected %h", n, cas, sb[0].r));
          if (n - sb[0].acc == 11) n_iso++;
          else begin
            checks++;
            if (n - sb[0].acc < 11) fail($sformatf("cycle %0d: CAS %0d cycles after acceptance", n, n - sb[0].acc));
          end
          if (sb[0].acc < last_cas - 9) begin   // was waiting behind the previous one
            checks++;
            if (n - last_cas == 20) n_b2b++;
            else if (n - last_cas < 20) fail($sformatf("cycle %0d: CASes %0d cycles apart", n, n - last_cas));
            else n_multi++;
          end
          void'(sb.pop_front());
        end
        if (cas.we) n_wr++; else n_rd++;
        n_cas++;
        last_cas = n;
      end
      @(negedge clk);
    end
    $display("accepted %0d, served %0d (rd %0d, wr %0d), host stalls %0d, REF %0d, PREA %0d",
             n_acc, n_cas, n_rd, n_wr, n_stall, n_ref, n_prea);
    $display("idle-empty cycles %0d, starts held by refresh (cycles) %0d, back-to-back %0d, isolated 11-cycle %0d, spaced >20 %0d",
             n_idle, n_held, n_b2b, n_iso, n_multi);
    checks += 10;
    if (mon_err != 0)             fail($sformatf("%0d DDR4 protocol errors", mon_err));
    if (n_cas != n_acc || sb.size() != 0) fail("accepted and served requests differ");
    if (n_stall == 0)             fail("mechanism never seen: host stall on full queue");
    if (n_ref < 4 || n_prea < 4)  fail("mechanism never seen: refresh");
    if (n_held == 0)              fail("mechanism never seen: start held by refresh");
    if (n_b2b == 0)               fail("mechanism never seen: back-to-back slots");
    if (n_iso == 0)               fail("mechanism never seen: isolated request latency");
    if (n_idle == 0)              fail("mechanism never seen: idle with empty queue");
    if (n_rd == 0)                fail("mechanism never seen: read");
    if (n_wr == 0)                fail("mechanism never seen: write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
