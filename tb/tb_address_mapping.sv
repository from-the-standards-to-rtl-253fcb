// tb_address_mapping: random byte addresses against the field split
// addr = {row[15:0], bank[1:0], bank group[1:0], column[9:0]}.
module tb_address_mapping;
  import cava_dram_pkg::*;

  logic              wr;
  logic [ADDR_W-1:0] addr;
  request_t          req;
  int checks = 0, failures = 0;

  address_mapping dut (.write_i(wr), .addr_i(addr), .request_o(req));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int unsigned a;
      a = $urandom;
      addr = a[29:0];
      wr = a[31];
      #1;
      checks++;
      if (req.we != a[31] || req.col != 10'(a & 32'h3ff) || req.bg != 2'((a >> 10) & 3) ||
          req.ba != 2'((a >> 12) & 3) || req.row != 16'((a >> 14) & 32'hffff)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h req=%p", addr, req);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
