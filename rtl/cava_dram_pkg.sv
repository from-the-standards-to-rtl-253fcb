// cava_dram_pkg: types and constants shared by the FIFO DRAM controller.
//
// The controller runs on the system clock, which is one quarter of the DDR4
// clock. Every command it issues goes into the first of the four command
// slots the PHY accepts per system clock, so a spacing of k controller cycles
// is a spacing of 4k DRAM clocks (nCK). A JEDEC lower bound of n nCK is
// therefore met with ceil(n/4) controller cycles, and the refresh interval,
// an upper bound, is floor(tREFI/4) controller cycles.
//
// The DRAM-clock timing values below are those of a DDR4-2666 x8 8 Gb part
// (speed bin 18-18-18, tCK = 0.75 ns); they are this design's choice, taken
// from the JEDEC DDR4 standard, as are the address widths of such a part
// (4 bank groups, 4 banks, 65536 rows, 1024 columns). The slot layout
// (PRE, then ACT, then CAS), the three controller states and the refresh
// sequence (PREA, REF) follow the FIFO controller the design implements.
package cava_dram_pkg;

  // ---------------------------------------------------------------- address
  localparam int unsigned BG_W  = 2;   // bank-group bits
  localparam int unsigned BA_W  = 2;   // bank bits within a group
  localparam int unsigned ROW_W = 16;  // row bits
  localparam int unsigned COL_W = 10;  // column bits

  // A request as it sits in the queue and leaves on request_o.
  typedef struct packed {
    logic             we;   // 1: write (CAS is WR), 0: read (CAS is RD)
    logic [BG_W-1:0]  bg;
    logic [BA_W-1:0]  ba;
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
  } request_t;

  localparam int unsigned REQ_W = $bits(request_t);
  localparam request_t REQUEST_NIL = '0;

  // Address width of a byte address covering one device (column, bank
  // group, bank, row).
  localparam int unsigned ADDR_W = COL_W + BG_W + BA_W + ROW_W;  // 30

  // One DDR4 command/address slot of the PHY interface. When act_n is high,
  // ras_n, cas_n and we_n are the command pins; when act_n is low (ACT) they
  // carry row address bits A16, A15 and A14. adr holds A13..A0; A10 is the
  // all-bank flag of a precharge and A12 the burst-chop pin (high = BL8).
  typedef struct packed {
    logic            cs_n;
    logic            act_n;
    logic            ras_n;
    logic            cas_n;
    logic            we_n;
    logic [BG_W-1:0] bg;
    logic [BA_W-1:0] ba;
    logic [13:0]     adr;
  } phy_slot_t;

  localparam int unsigned PHY_SLOTS = 4;

  // Deselect: no command in this DRAM clock.
  localparam phy_slot_t PHY_DES = '{cs_n: 1'b1, act_n: 1'b1, ras_n: 1'b1, cas_n: 1'b1,
                                    we_n: 1'b1, bg: '0, ba: '0, adr: '0};

  // ---------------------------------------------------------------- state
  typedef enum logic [1:0] {
    ST_IDLE       = 2'd0,
    ST_RUNNING    = 2'd1,
    ST_REFRESHING = 2'd2
  } ctrl_state_t;

  // ---------------------------------------------------------------- command
  typedef enum logic [2:0] {
    CMD_NOP  = 3'd0,
    CMD_PRE  = 3'd1,
    CMD_ACT  = 3'd2,
    CMD_RD   = 3'd3,
    CMD_WR   = 3'd4,
    CMD_PREA = 3'd5,
    CMD_REF  = 3'd6
  } command_t;

  // ---------------------------------------------------------------- timing
  // Ratio of DRAM clock to controller (system) clock.
  localparam int unsigned CLK_RATIO = 4;

  // DDR4-2666, 8 Gb, x8, in DRAM clocks (nCK).
  localparam int unsigned NCK_RP    = 18;     // PRE to ACT
  localparam int unsigned NCK_RCD   = 18;     // ACT to CAS
  localparam int unsigned NCK_RAS   = 43;     // ACT to PRE
  localparam int unsigned NCK_RTP   = 10;     // RD to PRE
  localparam int unsigned NCK_WR    = 20;     // end of write burst to PRE
  localparam int unsigned NCK_CWL   = 14;     // write latency
  localparam int unsigned NCK_BURST = 4;      // BL8 on a DDR bus
  localparam int unsigned NCK_WTR   = 10;     // end of write burst to RD (same group)
  localparam int unsigned NCK_FAW   = 28;     // four-activate window
  localparam int unsigned NCK_RFC   = 467;    // REF to next valid command
  localparam int unsigned NCK_REFI  = 10400;  // average refresh interval (upper bound)

  // Lower bound of n nCK expressed in controller cycles.
  function automatic int unsigned lb_cyc(input int unsigned n);
    return (n + CLK_RATIO - 1) / CLK_RATIO;
  endfunction

  function automatic int unsigned max2(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Controller-cycle values used as parameter defaults.
  localparam int unsigned DEF_T_RP   = lb_cyc(NCK_RP);                          // 5
  localparam int unsigned DEF_T_RCD  = lb_cyc(NCK_RCD);                         // 5
  localparam int unsigned DEF_T_RAS  = lb_cyc(NCK_RAS);                         // 11
  localparam int unsigned DEF_T_RD2PRE = lb_cyc(NCK_RTP);                       // 3
  localparam int unsigned DEF_T_WR2PRE = lb_cyc(NCK_CWL + NCK_BURST + NCK_WR);  // 10
  localparam int unsigned DEF_T_WR2RD  = lb_cyc(NCK_CWL + NCK_BURST + NCK_WTR); // 7
  localparam int unsigned DEF_T_FAW  = lb_cyc(NCK_FAW);                         // 7
  localparam int unsigned DEF_T_RFC  = lb_cyc(NCK_RFC);                         // 117
  localparam int unsigned DEF_T_REFI = NCK_REFI / CLK_RATIO;                    // 2600

  // Slot length: cycles from the PRE of one request to the PRE of the next.
  // PRE sits at slot cycle 0, ACT at T_RP, CAS at T_RP + T_RCD; the slot must
  // cover tRAS after the ACT, the CAS-to-PRE gap of either CAS kind, the
  // write-to-read turnaround between CASes of successive slots, and a quarter
  // of the four-activate window (one ACT per slot).
  function automatic int unsigned slot_len(input int unsigned rp, input int unsigned rcd,
                                           input int unsigned ras, input int unsigned rd2pre,
                                           input int unsigned wr2pre, input int unsigned wr2rd,
                                           input int unsigned faw);
    int unsigned s;
    s = rp + ras;                                   // tRC: ACT to next ACT
    s = max2(s, rp + rcd + max2(rd2pre, wr2pre));   // CAS to next PRE
    s = max2(s, wr2rd);                             // WR to next slot's RD
    s = max2(s, (faw + 3) / 4);                     // four ACTs in tFAW
    return s;
  endfunction

  localparam int unsigned DEF_SLOT_LEN = slot_len(DEF_T_RP, DEF_T_RCD, DEF_T_RAS, DEF_T_RD2PRE,
                                              DEF_T_WR2PRE, DEF_T_WR2RD, DEF_T_FAW);  // 20

  // Counter width able to count 0 .. n-1.
  function automatic int unsigned cnt_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
