// mmt_top: Majority Mean-Timer parent bunch crossing identification for one
// drift-tube super-layer.
//
// Chain (one clock domain):
//   TDC words -> mmt_hit_collector (paging, two-page windows)
//             -> TDC hit bus -> mmt_hit_driver (hits to macro-cell positions)
//             -> mapped hits -> N_MC x mmt_sl_processor (patterns, equations,
//                               histogram: t0 and quality per macro-cell)
//             -> t0 / quality buses -> mmt_payload_builder -> payload words
// mmt_synch supplies BX and page timing to the collector.
//
// Defaults: 200 MHz processing clock (5 cycles per BX), 16-BX pages, 7
// macro-cells of 18 wires overlapping by half (a super-layer of 4 layers x
// 17 wires, channels numbered layer*17 + cell). CLK_PER_BX = 4 gives the
// 160 MHz setting of the cosmic-ray demonstrator with nothing else changed.
// Throughput: one window per page. Each window's replay takes 2*DEPTH+3
// cycles and each super-layer processor NSTEP+5 cycles, NSTEP =
// ceil(72 / LANES); both must fit in PAGE_BX*CLK_PER_BX cycles (63 and 23
// against 80 at 200 MHz and 64 at 160 MHz), which assertions check at the
// start of simulation.
// Latency from the end of a window's second page to its payload header:
// 2*DEPTH+3 + NSTEP+5 + 2 cycles (88 cycles: 440 ns at 200 MHz, 550 ns at
// 160 MHz; the published implementation reports less than 500 ns).
//
// The block chain is the one of the design description; the widths, page
// length, macro-cell overlap and formats are this design's own (see each
// block). The front-end link (GBT) receiver is outside this design: the top
// takes decoded TDC words.
module mmt_top
  import mmt_pkg::*;
#(
  parameter int unsigned N_MC       = 7,
  parameter int unsigned MC_STRIDE  = 2,
  parameter int unsigned CLK_PER_BX = 5,
  parameter int unsigned PAGE_BX    = 16,
  parameter int unsigned DEPTH      = 30,
  parameter int unsigned TMAX       = 124,
  parameter int unsigned TOL        = 4,
  parameter int unsigned NBINS      = 50,
  parameter int unsigned BIN_NEG    = 18,
  parameter int unsigned LANES      = 4,
  localparam int unsigned NSTEP     = (NCOMBO + LANES - 1) / LANES,
  localparam int unsigned WPL       = MC_STRIDE * (N_MC - 1) + 5,
  localparam int unsigned NCH       = MC_LAYERS * WPL
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            bc0,
  // TDC words from the front-end link
  input  logic            in_valid,
  input  tdc_word_t       in_word,
  // trigger payload
  output logic            pl_valid,
  output logic            pl_first,
  output logic            pl_last,
  output logic [31:0]     pl_word,
  // t0 and quality buses, one result per macro-cell and window
  output logic [N_MC-1:0] mc_valid,
  output mc_result_t      mc_res [N_MC],
  // monitoring
  output logic [BX_W-1:0] bx,
  output logic [31:0]     n_payloads,
  output logic [15:0]     n_late,
  output logic [15:0]     n_overflow,
  output logic [15:0]     n_bad_channel,
  output logic [15:0]     n_overrun
);

  // ------------------------------------------------------------ timing
  logic            bx_strobe, page_tick;
  logic [BX_W-1:0] page_start;
  logic [15:0]     cycle_in_page;

  mmt_synch #(.CLK_PER_BX(CLK_PER_BX), .PAGE_BX(PAGE_BX)) u_synch (
    .clk, .rst, .bc0,
    .bx, .bx_strobe, .page_start, .page_tick, .cycle_in_page
  );

  // ------------------------------------------------------- hit collector
  logic            hb_start, hb_valid, hb_end;
  logic [BX_W-1:0] hb_bx;
  logic [7:0]      hb_ch;
  logic [WT_W-1:0] hb_t;

  mmt_hit_collector #(
    .NCH(NCH), .PAGE_BX(PAGE_BX), .CLK_PER_BX(CLK_PER_BX), .DEPTH(DEPTH)
  ) u_coll (
    .clk, .rst,
    .in_valid, .in_word,
    .page_start, .page_tick,
    .win_start(hb_start), .win_bx(hb_bx),
    .hit_valid(hb_valid), .hit_channel(hb_ch), .hit_t(hb_t),
    .win_end(hb_end),
    .n_late, .n_overflow, .n_bad_channel
  );

  // ---------------------------------------------------------- hit driver
  logic            fr_valid;
  logic [BX_W-1:0] fr_bx;
  mc_hit_t         fr [N_MC][MC_WIRES];

  mmt_hit_driver #(.N_MC(N_MC), .MC_STRIDE(MC_STRIDE), .WPL(WPL)) u_drv (
    .clk, .rst,
    .win_start(hb_start), .win_bx(hb_bx),
    .hit_valid(hb_valid), .hit_channel(hb_ch), .hit_t(hb_t),
    .win_end(hb_end),
    .frame_valid(fr_valid), .frame_bx(fr_bx), .frame(fr)
  );

  // -------------------------------------------- super-layer processors
  logic [BX_W-1:0] win_bx [N_MC];
  logic [15:0]     ovr    [N_MC];

  for (genvar m = 0; m < N_MC; m++) begin : g_mc
    logic [$clog2(8 * NCOMBO + 1)-1:0] cnt;
    logic ready;
    mmt_sl_processor #(
      .TMAX(TMAX), .TOL(TOL), .NBINS(NBINS), .BIN_NEG(BIN_NEG), .LANES(LANES)
    ) u_slp (
      .clk, .rst,
      .frame_valid(fr_valid), .frame_bx(fr_bx), .frame(fr[m]),
      .ready,
      .res_valid(mc_valid[m]), .res(mc_res[m]), .res_win_bx(win_bx[m]),
      .res_count(cnt),
      .n_overrun(ovr[m])
    );
  end

  always_comb begin
    n_overrun = '0;
    for (int m = 0; m < N_MC; m++) n_overrun = n_overrun + ovr[m];
  end

  // ------------------------------------------------------ payload builder
  mmt_payload_builder #(.N_MC(N_MC)) u_pl (
    .clk, .rst,
    .res_valid(mc_valid), .res(mc_res), .res_win_bx(win_bx[0]),
    .pl_valid, .pl_first, .pl_last, .pl_word, .n_payloads
  );

  initial begin
    assert (NSTEP + 5 <= PAGE_BX * CLK_PER_BX)
      else $error("super-layer processor does not finish within one page");
    assert (N_MC <= 16) else $error("macro-cell index must fit in 4 bits");
    assert (NCH <= 256) else $error("channel number must fit in 8 bits");
  end

endmodule
