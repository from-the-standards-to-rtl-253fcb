// ddr4_cmd_monitor: pin-level DDR4 command checker for testbenches.
//
// Watches the four command slots the PHY receives each system clock, numbers
// the DRAM clocks (nCK = 4 * system cycle + slot), decodes each slot with the
// DDR4 command truth table and keeps the open/closed state and open row of
// every bank. It checks, in DRAM clocks and with the DDR4-2666 values of
// cava_dram_pkg:
//   ACT only to a closed bank, tRP after its precharge, tRFC after REF;
//   RD/WR only to an open bank, tRCD after its ACT;
//   PRE tRAS after ACT, tRTP after RD, CWL + BL/2 + tWR after WR;
//   REF only with all banks closed, tRP after the PREA, and consecutive REFs
//   at most tREFI apart.
// Every decoded RD/WR is reported on cas_valid_o with its bank, row (from the
// bank's ACT) and column, for a scoreboard. A violation increments errors_o.
module ddr4_cmd_monitor
  import cava_dram_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  phy_slot_t        slot_i [PHY_SLOTS],
  output logic             cas_valid_o,
  output request_t         cas_o,
  output int               errors_o,
  output int               n_ref_o,
  output int               n_prea_o
);
  localparam int NB = 16;
  // signed copies of the package's unsigned timing values
  localparam longint RP = NCK_RP, RCD = NCK_RCD, RAS = NCK_RAS, RTP = NCK_RTP;
  localparam longint WR2PRE = NCK_CWL + NCK_BURST + NCK_WR, RFC = NCK_RFC, REFI = NCK_REFI;
  longint nck;                       // DRAM clock of slot 0 of this cycle
  logic   open_b  [NB];
  logic [ROW_W-1:0] row_b [NB];
  longint t_act [NB], t_pre [NB], t_rd [NB], t_wr [NB];
  longint t_ref, t_prea;

  task automatic err(string m);
    errors_o++;
    if (errors_o < 10) $display("DDR4 MONITOR nCK %0d: %s", nck, m);
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      nck = 0; errors_o = 0; n_ref_o = 0; n_prea_o = 0;
      cas_valid_o = 1'b0; cas_o = '0;
      t_ref = -1; t_prea = -100000;
      for (int b = 0; b < NB; b++) begin
        open_b[b] = 1'b0; row_b[b] = '0;
        t_act[b] = -100000; t_pre[b] = -100000; t_rd[b] = -100000; t_wr[b] = -100000;
      end
    end else begin
      cas_valid_o = 1'b0;
      for (int s = 0; s < PHY_SLOTS; s++) begin
        longint t;
        int b;
        phy_slot_t x;
        x = slot_i[s];
        t = nck + s;
        b = {x.bg, x.ba};
        if (!x.cs_n) begin
          if (t_ref >= 0 && t < t_ref + RFC) err("command inside tRFC");
          if (!x.act_n) begin                                   // ACT
            if (open_b[b]) err($sformatf("ACT to open bank %0d", b));
            if (t < t_pre[b] + RP) err($sformatf("tRP violated on bank %0d", b));
            open_b[b] = 1'b1;
            row_b[b]  = {x.cas_n, x.we_n, x.adr};
            t_act[b]  = t;
          end else begin
            case ({x.ras_n, x.cas_n, x.we_n})
              3'b010: begin                                     // PRE / PREA
                for (int k = 0; k < NB; k++) begin
                  if (x.adr[10] || k == b) begin
                    if (open_b[k]) begin
                      if (t < t_act[k] + RAS) err($sformatf("tRAS violated on bank %0d", k));
                      if (t < t_rd[k] + RTP) err($sformatf("tRTP violated on bank %0d", k));
                      if (t < t_wr[k] + WR2PRE) err($sformatf("tWR violated on bank %0d", k));
                    end
                    open_b[k] = 1'b0;
                    t_pre[k]  = t;
                  end
                end
                if (x.adr[10]) begin t_prea = t; n_prea_o++; end
              end
              3'b001: begin                                     // REF
                for (int k = 0; k < NB; k++) begin
                  if (open_b[k]) err("REF with a bank open");
                  if (t < t_pre[k] + RP) err("REF inside tRP");
                end
                if (t_ref >= 0 && t - t_ref > REFI) err($sformatf("REF interval %0d > tREFI", t - t_ref));
                if (t_ref < 0 && t > REFI) err("first REF later than tREFI");
                t_ref = t;
                n_ref_o++;
              end
              3'b100, 3'b101: begin                             // WR / RD
                if (!open_b[b]) err($sformatf("CAS to closed bank %0d", b));
                if (t < t_act[b] + RCD) err($sformatf("tRCD violated on bank %0d", b));
                if (x.we_n) t_rd[b] = t; else t_wr[b] = t;
                cas_valid_o = 1'b1;
                cas_o.we  = !x.we_n;
                cas_o.bg  = x.bg;
                cas_o.ba  = x.ba;
                cas_o.row = row_b[b];
                cas_o.col = x.adr[COL_W-1:0];
              end
              3'b111: ;                                         // NOP
              default: err($sformatf("unexpected command %b", {x.ras_n, x.cas_n, x.we_n}));
            endcase
          end
        end
      end
      nck += PHY_SLOTS;
    end
  end
endmodule
