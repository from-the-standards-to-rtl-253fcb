// tb_request_queue: random pushes and pops against a queue model.
//
// Checks, every cycle: empty_o and ack_o (= not full) against the model's
// occupancy, and data_o against the model's head while not empty. The push
// rate is varied so the queue runs empty, fills to all 256 entries (ack_o
// low, extra pushes refused) and drains again; both extremes must be seen.
module tb_request_queue;
  localparam int DEPTH = 256;
  localparam int W     = cava_dram_pkg::REQ_W;

  logic         clk = 0, rst_n = 0;
  logic         push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic         empty, ack;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_refused = 0;

  request_queue #(.DEPTH(DEPTH), .WIDTH(W)) dut (
    .clk, .rst_n, .push_i(push), .data_i(din), .pop_i(pop),
    .data_o(dout), .empty_o(empty), .ack_o(ack)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int push_pct, pop_pct;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // phases: fill fast, drain fast, mixed
      case ((cyc / 1000) % 3)
        0: begin push_pct = 90; pop_pct = 20; end
        1: begin push_pct = 10; pop_pct = 80; end
        default: begin push_pct = 50; pop_pct = 50; end
      endcase
      @(negedge clk);
      push = ($urandom_range(0, 99) < push_pct);
      din  = W'({$urandom, $urandom});
      pop  = ($urandom_range(0, 99) < pop_pct) && (model.size() != 0) && !empty;
      #1;
      checks++;
      if (empty != (model.size() == 0) || ack != (model.size() < DEPTH)) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d size=%0d empty=%0b ack=%0b", cyc, model.size(), empty, ack);
      end
      if (model.size() != 0) begin
        checks++;
        if (dout != model[0]) begin
          failures++;
          if (failures < 10) $display("FAIL cyc %0d head %h exp %h", cyc, dout, model[0]);
        end
      end
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      if (push && !ack) n_refused++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push && (model.size() + (pop ? 1 : 0)) < DEPTH) model.push_back(din);
    end
    checks += 3;
    if (n_full == 0)    begin failures++; $display("FAIL queue never full"); end
    if (n_empty == 0)   begin failures++; $display("FAIL queue never empty"); end
    if (n_refused == 0) begin failures++; $display("FAIL no push refused"); end
    $display("full cycles %0d, empty cycles %0d, refused pushes %0d", n_full, n_empty, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
