// mmt_equations: mean-timer equations of one three-hit pattern, evaluated for
// all eight side assumptions in parallel.
//
// For hits t1, t2, t3 (window time, 3.125 ns units) in three layers of a
// macro-cell and a choice of side s_j = +1/-1 for each, a straight track
// obeys a1*T1 + a2*T2 + a3*T3 = b*TMAX with T_j = t_j - t0, a_j = c_j*s_j
// (c_j and b from the pattern table in mmt_pkg). Hence
//     (a1 + a2 + a3) * t0 = a1*t1 + a2*t2 + a3*t3 - b*TMAX = num.
// With den = a1 + a2 + a3 (made positive by flipping the sign of both) the
// candidate is kept only if den != 0, all three hits are present and every
// implied drift time lies in [-TOL, TMAX + TOL]; the check is done exactly on
// integers as  -den*TOL <= den*t_j - num <= den*(TMAX + TOL).
// The candidate's histogram bin is floor(t0 / 8) + BIN_NEG, i.e. its BX
// relative to the window start, offset so that bins start BIN_NEG BX before
// the window; candidates outside 0..NBINS-1 are dropped.
//
// Lane k uses side s_j = -1 where bit j of k is 1.
// Timing: two register stages; out_* follow in_valid by two cycles and a new
// pattern can enter every cycle.
//
// The equation is the one of the design description; the geometry behind the
// coefficients, TMAX, TOL and the binning are this design's. The drift-field
// corrections the description mentions are not included (not specified).
module mmt_equations
  import mmt_pkg::*;
#(
  parameter int unsigned TMAX    = 124,
  parameter int unsigned TOL     = 4,
  parameter int unsigned NBINS   = 50,
  parameter int unsigned BIN_NEG = 18,
  localparam int unsigned BIN_W  = $clog2(NBINS)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  combo_t                in_combo,
  input  mc_hit_t               in_h0,
  input  mc_hit_t               in_h1,
  input  mc_hit_t               in_h2,
  output logic                  out_valid,
  output logic [MC_LAYERS-1:0]  out_lmask,
  output logic [7:0]            cand_ok,
  output logic [BIN_W-1:0]      cand_bin [8]
);

  typedef logic signed [17:0] s18_t;

  // ------------------------------------------------------------ stage 1
  logic       s1_valid;
  logic [MC_LAYERS-1:0] s1_lmask;
  logic       s1_hits;
  s18_t       s1_num [8];
  logic [2:0] s1_den [8];
  logic       s1_nz  [8];
  s18_t       s1_dt  [8][3];

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_lmask <= '0;
      s1_hits  <= 1'b0;
      for (int k = 0; k < 8; k++) begin
        s1_num[k] <= '0;
        s1_den[k] <= '0;
        s1_nz[k]  <= 1'b0;
        for (int j = 0; j < 3; j++) s1_dt[k][j] <= '0;
      end
    end else begin
      s1_valid <= in_valid;
      s1_lmask <= in_combo.lmask;
      s1_hits  <= in_h0.valid && in_h1.valid && in_h2.valid;
      for (int k = 0; k < 8; k++) begin
        automatic s18_t a0  = ((k & 1) != 0) ? -s18_t'(in_combo.c0) : s18_t'(in_combo.c0);
        automatic s18_t a1  = ((k & 2) != 0) ? -s18_t'(in_combo.c1) : s18_t'(in_combo.c1);
        automatic s18_t a2  = ((k & 4) != 0) ? -s18_t'(in_combo.c2) : s18_t'(in_combo.c2);
        automatic s18_t t0  = s18_t'({1'b0, in_h0.t});
        automatic s18_t t1  = s18_t'({1'b0, in_h1.t});
        automatic s18_t t2  = s18_t'({1'b0, in_h2.t});
        automatic s18_t den = a0 + a1 + a2;
        automatic s18_t num = a0 * t0 + a1 * t1 + a2 * t2
                              - s18_t'(in_combo.b) * s18_t'(TMAX);
        if (den < 0) begin
          den = -den;
          num = -num;
        end
        s1_num[k]    <= num;
        s1_den[k]    <= den[2:0];
        s1_nz[k]     <= (den != 0);
        s1_dt[k][0]  <= den * t0 - num;
        s1_dt[k][1]  <= den * t1 - num;
        s1_dt[k][2]  <= den * t2 - num;
      end
    end
  end

  // ------------------------------------------------------------ stage 2
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_lmask <= '0;
      cand_ok   <= '0;
      for (int k = 0; k < 8; k++) cand_bin[k] <= '0;
    end else begin
      out_valid <= s1_valid;
      out_lmask <= s1_lmask;
      for (int k = 0; k < 8; k++) begin
        automatic s18_t dn   = s18_t'({15'd0, s1_den[k]});
        automatic s18_t lo   = -dn * s18_t'(TOL);
        automatic s18_t hi   = dn * s18_t'(TMAX + TOL);
        automatic s18_t sh   = s1_num[k] + dn * s18_t'(BIN_NEG * LSB_PER_BX);
        automatic logic in_range = 1'b1;
        automatic logic [16:0] q = '0;
        for (int j = 0; j < 3; j++)
          if (s1_dt[k][j] < lo || s1_dt[k][j] > hi) in_range = 1'b0;
        if (s1_nz[k] && sh >= 0) q = 17'(sh[16:0] / 17'(s1_den[k])) >> 3;
        cand_ok[k]  <= s1_valid && s1_hits && s1_nz[k] && in_range &&
                       (sh >= 0) && (q < 17'(NBINS));
        cand_bin[k] <= BIN_W'(q);
      end
    end
  end

endmodule
