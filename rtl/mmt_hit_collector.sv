// mmt_hit_collector: gathers TDC hits, sorts them into time pages and replays
// them in overlapping two-page windows on the TDC hit bus.
//
// Paged scheme. Time is cut into pages of PAGE_BX crossings (mmt_synch). A
// window is two consecutive pages; consecutive windows overlap by one page.
// All hits of one muon lie within one maximum drift time (~16 BX) after its
// crossing, so as long as a page is at least that long, every muon has all
// its hits together in at least one window ("time-hermetic" scheduling).
//
// Decoding: an incoming word carries channel, BX and a 1/32-BX fine time. It
// is turned into a time in 3.125 ns units (bx*8 + fine/4), compared with the
// start of the current page modulo the orbit, and filed in the buffer of the
// current page (age 0) or of the previous one (age 1): hits may arrive up to
// one page after their page ended. Older hits, hits from the future and
// channels >= NCH are dropped and counted. Each page buffer holds DEPTH hits;
// further hits are dropped and counted.
//
// Four page buffers rotate. At the first cycle of page c (page_tick) the
// window made of pages c-3 and c-2 is closed and, during page c, replayed:
//   cycle 1:            win_start   (win_bx = first BX of page c-3)
//   cycles 2 ..:        one hit per cycle, time relative to the window start
//   cycle 2*DEPTH+2:    win_end
// win_end comes at a fixed cycle so that windows reach the super-layer
// processors exactly once per page. Needs 2*DEPTH+3 <= PAGE_BX*CLK_PER_BX;
// DEPTH = 30 keeps that true at 160 MHz (4 cycles per BX) as well.
//
// Only the function of the block (gather, decode, paged scheduling) is given
// by the description; buffer depth, page length, arrival tolerance and the bus
// protocol are this design's choices.
module mmt_hit_collector
  import mmt_pkg::*;
#(
  parameter int unsigned NCH        = 68,
  parameter int unsigned PAGE_BX    = 16,
  parameter int unsigned CLK_PER_BX = 5,
  parameter int unsigned DEPTH      = 30,
  localparam int unsigned CH_W      = 8
) (
  input  logic            clk,
  input  logic            rst,
  // from the front-end link
  input  logic            in_valid,
  input  tdc_word_t       in_word,
  // from mmt_synch
  input  logic [BX_W-1:0] page_start,
  input  logic            page_tick,
  // TDC hit bus
  output logic            win_start,
  output logic [BX_W-1:0] win_bx,
  output logic            hit_valid,
  output logic [CH_W-1:0] hit_channel,
  output logic [WT_W-1:0] hit_t,
  output logic            win_end,
  // monitoring
  output logic [15:0]     n_late,
  output logic [15:0]     n_overflow,
  output logic [15:0]     n_bad_channel
);

  localparam int unsigned PL    = PAGE_BX * LSB_PER_BX;   // page length, LSB
  localparam int unsigned OFF_W = $clog2(PL);
  localparam int unsigned D_W   = $clog2(DEPTH + 1);
  localparam int unsigned IDX_W = $clog2(2 * DEPTH + 1);
  localparam int unsigned EOW_CYC = 2 * DEPTH + 2;

  typedef struct packed {
    logic [CH_W-1:0]  ch;
    logic [OFF_W-1:0] off;
  } entry_t;

  entry_t         mem [4][DEPTH];
  logic [D_W-1:0] cnt [4];
  logic [1:0]     cur_q;

  // ------------------------------------------------------ classify the hit
  logic [1:0] cur_now;
  int         t_hit, d;
  logic       age0, age1, ok_ch;
  logic [1:0] wr_pg;
  logic [OFF_W-1:0] wr_off;

  always_comb begin
    cur_now = page_tick ? cur_q + 2'd1 : cur_q;
    t_hit   = int'(in_word.bx) * LSB_PER_BX + int'(in_word.fine[FINE_W-1:2]);
    d       = t_hit - int'(page_start) * LSB_PER_BX;
    if (d >= int'(ORBIT_LSB / 2))  d = d - int'(ORBIT_LSB);
    if (d < -int'(ORBIT_LSB / 2))  d = d + int'(ORBIT_LSB);
    age0   = (d >= 0) && (d < int'(PL));
    age1   = (d < 0) && (d >= -int'(PL));
    ok_ch  = (int'(in_word.channel) < int'(NCH));
    wr_pg  = age0 ? cur_now : cur_now - 2'd1;
    wr_off = age0 ? OFF_W'(d) : OFF_W'(d + int'(PL));
  end

  wire accept = in_valid && ok_ch && (age0 || age1);
  wire [D_W-1:0] wr_cnt = (page_tick && age0) ? '0 : cnt[wr_pg];
  wire room = (wr_cnt < D_W'(DEPTH));

  // ------------------------------------------------------------ write side
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < 4; p++) cnt[p] <= '0;
      cur_q         <= '0;
      n_late        <= '0;
      n_overflow    <= '0;
      n_bad_channel <= '0;
    end else begin
      if (page_tick) begin
        cur_q        <= cur_now;
        cnt[cur_now] <= '0;
      end
      if (accept && room) begin
        mem[wr_pg][wr_cnt[$clog2(DEPTH)-1:0]] <= '{ch: in_word.channel, off: wr_off};
        cnt[wr_pg] <= wr_cnt + 1'b1;
      end
      if (in_valid && !ok_ch)                n_bad_channel <= n_bad_channel + 1'b1;
      if (in_valid && ok_ch && !(age0 || age1)) n_late     <= n_late + 1'b1;
      if (accept && !room)                   n_overflow    <= n_overflow + 1'b1;
    end
  end

  // ------------------------------------------------------------- read side
  logic [1:0]       pa, pb;          // buffers of the window being replayed
  logic [D_W-1:0]   na, nb;
  logic [IDX_W-1:0] rd_idx;
  logic             rd_act;
  logic [15:0]      cyc;
  logic             rd_vld;
  entry_t           rd_e;
  logic             rd_second;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_act    <= 1'b0;
      rd_idx    <= '0;
      cyc       <= 16'hFFFF;
      na        <= '0;
      nb        <= '0;
      pa        <= '0;
      pb        <= '0;
      win_start <= 1'b0;
      win_end   <= 1'b0;
      win_bx    <= '0;
      rd_vld    <= 1'b0;
      rd_second <= 1'b0;
      rd_e      <= '0;
    end else begin
      win_start <= 1'b0;
      win_end   <= 1'b0;
      rd_vld    <= 1'b0;
      if (cyc != 16'hFFFF) cyc <= cyc + 16'd1;
      if (cyc == 16'(EOW_CYC - 1)) begin
        win_end <= 1'b1;
        cyc     <= 16'hFFFF;
      end
      if (page_tick) begin
        pa        <= cur_now - 2'd3;
        pb        <= cur_now - 2'd2;
        na        <= cnt[cur_now - 2'd3];
        nb        <= cnt[cur_now - 2'd2];
        rd_idx    <= '0;
        rd_act    <= 1'b1;
        cyc       <= 16'd1;
        win_start <= 1'b1;
        win_bx    <= (int'(page_start) >= 3 * int'(PAGE_BX))
                     ? BX_W'(int'(page_start) - 3 * int'(PAGE_BX))
                     : BX_W'(int'(page_start) + int'(ORBIT_BX) - 3 * int'(PAGE_BX));
      end else if (rd_act) begin
        if (rd_idx >= IDX_W'(na) + IDX_W'(nb)) begin
          rd_act <= 1'b0;
        end else begin
          rd_vld    <= 1'b1;
          rd_second <= (rd_idx >= IDX_W'(na));
          rd_e      <= (rd_idx < IDX_W'(na))
                       ? mem[pa][rd_idx[$clog2(DEPTH)-1:0]]
                       : mem[pb][$clog2(DEPTH)'(rd_idx - IDX_W'(na))];
          rd_idx    <= rd_idx + 1'b1;
        end
      end
    end
  end

  assign hit_valid   = rd_vld;
  assign hit_channel = rd_e.ch;
  assign hit_t       = rd_second ? WT_W'(rd_e.off) + WT_W'(PL) : WT_W'(rd_e.off);

  initial begin
    assert (EOW_CYC + 1 <= PAGE_BX * CLK_PER_BX)
      else $error("window replay does not fit in one page");
    assert (2 * PL <= (1 << WT_W))
      else $error("window time does not fit in WT_W bits");
  end

endmodule
