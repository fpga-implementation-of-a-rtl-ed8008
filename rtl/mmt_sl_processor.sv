// mmt_sl_processor: super-layer processor of one macro-cell.
//
// Takes the mapped hits of one window (18 positions, each with a valid bit and
// a window time), runs through every three-hit pattern of the macro-cell (the
// NCOMBO entries of the table built in mmt_pkg), LANES patterns per cycle,
// lets LANES copies of mmt_equations compute the t0 candidates of all eight
// side assumptions of each and lets mmt_histogram count them. After the last pattern the most frequent bin
// becomes the output t0, in BX of the orbit, with its quality.
//
// Interface: frame_valid with frame/frame_bx starts a window when ready is 1;
// a frame that arrives while busy is dropped and counted in n_overrun.
// res_valid pulses once per accepted frame with res.found, res.hq and
// res.t0_bx = frame_bx + bin - BIN_NEG (modulo the orbit); res_win_bx
// repeats frame_bx so results can be matched to their window.
// Timing: res_valid comes NSTEP + 5 cycles after frame_valid, with
// NSTEP = ceil(NCOMBO / LANES) (18 + 5 = 23 cycles by default); ready is low
// in between. That must not exceed one page of clock cycles, which the top
// checks.
//
// The pattern-and-histogram method follows the design description; the degree
// of parallelism (LANES patterns per cycle, sides in parallel) is this
// design's, chosen so that the whole chain stays under 500 ns at 200 MHz.
// The description's corrections for the non-uniform drift field are not
// included: their form is not given.
module mmt_sl_processor
  import mmt_pkg::*;
#(
  parameter int unsigned TMAX    = 124,
  parameter int unsigned TOL     = 4,
  parameter int unsigned NBINS   = 50,
  parameter int unsigned BIN_NEG = 18,
  parameter int unsigned LANES   = 4,
  localparam int unsigned NSTEP  = (NCOMBO + LANES - 1) / LANES,
  localparam int unsigned BIN_W  = $clog2(NBINS),
  localparam int unsigned CNT_W  = $clog2(8 * NCOMBO + 1)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            frame_valid,
  input  logic [BX_W-1:0] frame_bx,
  input  mc_hit_t         frame [MC_WIRES],
  output logic            ready,
  output logic            res_valid,
  output mc_result_t      res,
  output logic [BX_W-1:0] res_win_bx,
  output logic [CNT_W-1:0] res_count,
  output logic [15:0]     n_overrun
);

  localparam int unsigned K_W = $clog2(NSTEP + 1);

  typedef combo_t [NCOMBO-1:0] table_t;
  function automatic table_t build_table();
    table_t t;
    for (int k = 0; k < int'(NCOMBO); k++) t[k] = combo_entry(k);
    return t;
  endfunction
  localparam table_t TABLE = build_table();

  typedef enum logic [1:0] {IDLE, RUN, DRAIN, PICK} state_t;
  state_t          state;
  logic [K_W-1:0]  k;
  logic [2:0]      drain;
  mc_hit_t         hits [MC_WIRES];
  logic [BX_W-1:0] bx_q;

  // patterns presented to the equations this cycle: k*LANES + u
  logic   feed;
  assign feed = (state == RUN);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      k         <= '0;
      drain     <= '0;
      bx_q      <= '0;
      n_overrun <= '0;
      for (int p = 0; p < MC_WIRES; p++) hits[p] <= '0;
    end else begin
      if (frame_valid && state != IDLE) n_overrun <= n_overrun + 1'b1;
      unique case (state)
        IDLE: if (frame_valid) begin
          hits  <= frame;
          bx_q  <= frame_bx;
          k     <= '0;
          state <= RUN;
        end
        RUN: begin
          if (k == K_W'(NSTEP - 1)) begin
            state <= DRAIN;
            drain <= '0;
          end
          k <= k + 1'b1;
        end
        DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 3'd2) state <= PICK;
        end
        PICK: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign ready = (state == IDLE);

  logic [LANES-1:0]     eq_valid;
  logic [MC_LAYERS-1:0] eq_lmask [LANES];
  logic [7:0]           eq_ok    [LANES];
  logic [BIN_W-1:0]     eq_bin   [LANES][8];

  for (genvar u = 0; u < LANES; u++) begin : g_lane
    localparam int unsigned IDX_W = $clog2(NSTEP * LANES + 1);
    logic [IDX_W-1:0] idx;
    logic             used;
    combo_t           cur;
    assign idx  = IDX_W'(k) * IDX_W'(LANES) + IDX_W'(u);
    assign used = (idx < IDX_W'(NCOMBO));
    assign cur  = used ? TABLE[idx[$clog2(NCOMBO)-1:0]] : TABLE[0];

    mmt_equations #(
      .TMAX(TMAX), .TOL(TOL), .NBINS(NBINS), .BIN_NEG(BIN_NEG)
    ) u_eq (
      .clk, .rst,
      .in_valid (feed && used),
      .in_combo (cur),
      .in_h0    (hits[cur.pos0]),
      .in_h1    (hits[cur.pos1]),
      .in_h2    (hits[cur.pos2]),
      .out_valid(eq_valid[u]),
      .out_lmask(eq_lmask[u]),
      .cand_ok  (eq_ok[u]),
      .cand_bin (eq_bin[u])
    );
  end

  // flatten the lanes into one candidate vector for the histogram
  logic [8*LANES-1:0]   c_ok;
  logic [BIN_W-1:0]     c_bin   [8*LANES];
  logic [MC_LAYERS-1:0] c_lmask [8*LANES];
  always_comb begin
    for (int u = 0; u < LANES; u++)
      for (int j = 0; j < 8; j++) begin
        c_ok[8*u + j]    = eq_ok[u][j];
        c_bin[8*u + j]   = eq_bin[u][j];
        c_lmask[8*u + j] = eq_lmask[u];
      end
  end

  logic             h_valid, h_found, h_hq;
  logic [BIN_W-1:0] h_bin;

  mmt_histogram #(.NBINS(NBINS), .NCAND(8 * LANES), .CNT_W(CNT_W)) u_hist (
    .clk, .rst,
    .clear     (state == IDLE && frame_valid),
    .in_valid  (eq_valid != '0),
    .cand_ok   (c_ok),
    .cand_bin  (c_bin),
    .cand_lmask(c_lmask),
    .finish   (state == PICK),
    .res_valid(h_valid),
    .res_found(h_found),
    .res_hq   (h_hq),
    .res_bin  (h_bin),
    .res_count(res_count)
  );

  // absolute BX of the winning bin
  always_comb begin
    automatic int t = int'(bx_q) + int'(h_bin) - int'(BIN_NEG);
    if (t < 0) t = t + int'(ORBIT_BX);
    if (t >= int'(ORBIT_BX)) t = t - int'(ORBIT_BX);
    res_valid = h_valid;
    res.found = h_found;
    res.hq    = h_hq;
    res.t0_bx = BX_W'(t);
    res_win_bx = bx_q;
  end

endmodule
