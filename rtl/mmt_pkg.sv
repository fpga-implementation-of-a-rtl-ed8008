// mmt_pkg: types, constants and the macro-cell pattern table shared by the
// Majority Mean-Timer (MMT) parent bunch crossing identification.
//
// Time unit: one LSB is 3.125 ns, one eighth of the 25 ns bunch crossing
// (BX), as the algorithm specifies. Times are kept in the LHC orbit frame
// (3564 BX per orbit) until the hit collector turns them into times relative
// to the start of a two-page window.
//
// Macro-cell geometry (this design's reading of the 18-wire macro-cell):
// four staggered layers, layers 0 and 2 with 5 cells, layers 1 and 3 with 4
// cells shifted by half a cell. Wire positions are measured in half cells
// (the drift distance covered in the maximum drift time TMAX), so a wire of
// cell i sits at x = 2*i (even layer) or x = 2*i + 1 (odd layer).
//
// Pattern table: a pattern is three hits in three different layers, one cell
// in each, such that the wire positions of any two of them differ by no more
// than their layer distance (a straight track of at most one half cell per
// layer). For layers l1<l2<l3 and hit positions x = xw + s*T/TMAX (s = +1 or
// -1 for the side of the wire), collinearity gives
//   c1*x1 + c2*x2 + c3*x3 = 0,  c1 = -(l3-l2), c2 = (l3-l1), c3 = -(l2-l1)
// hence  sum(a_j*T_j) = b*TMAX  with  a_j = c_j*s_j  and  b = -sum(c_j*xw_j).
// All coefficients are integers; b does not depend on the sides.
package mmt_pkg;

  // ---------------------------------------------------------------- timing
  localparam int unsigned ORBIT_BX     = 3564;  // BX per LHC orbit
  localparam int unsigned LSB_PER_BX   = 8;     // 3.125 ns LSB
  localparam int unsigned ORBIT_LSB    = ORBIT_BX * LSB_PER_BX;
  localparam int unsigned BX_W         = 12;
  localparam int unsigned FINE_W       = 5;     // TDC fine time, 1/32 BX

  // ------------------------------------------------------------ macro-cell
  localparam int unsigned MC_LAYERS    = 4;
  localparam int unsigned MC_WIRES     = 18;
  localparam int unsigned POS_W        = 5;     // position index 0..17

  function automatic int unsigned cells_in_layer(input int l);
    return (l % 2 == 0) ? 5 : 4;
  endfunction

  function automatic int unsigned layer_offset(input int l);
    int unsigned o;
    o = 0;
    for (int k = 0; k < l; k++) o += cells_in_layer(k);
    return o;
  endfunction

  // wire position in half cells
  function automatic int wire_x(input int l, input int ci);
    return 2 * ci + (l % 2);
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // ------------------------------------------------------------- hit types
  // decoded TDC word as it arrives from the front-end link
  typedef struct packed {
    logic [7:0]        channel;  // layer*WIRES_PER_LAYER + cell
    logic [BX_W-1:0]   bx;       // BX in orbit, 0..3563
    logic [FINE_W-1:0] fine;     // 1/32 BX
  } tdc_word_t;

  // hit in a two-page window, time relative to the window start
  localparam int unsigned WT_W = 9;  // window time width (LSB)
  typedef struct packed {
    logic            valid;
    logic [WT_W-1:0] t;
  } mc_hit_t;

  // ---------------------------------------------------------- pattern table
  typedef struct packed {
    logic [POS_W-1:0] pos0, pos1, pos2;   // positions in the macro-cell
    logic signed [3:0] c0, c1, c2;        // geometric coefficients
    logic signed [7:0] b;                 // b of sum(a*T) = b*TMAX
    logic [MC_LAYERS-1:0] lmask;          // layers used by the pattern
  } combo_t;

  typedef struct packed {
    logic [15:0] n;   // number of patterns
    combo_t      e;   // the requested entry
  } walk_t;

  // walks all patterns; returns their count and the entry numbered want
  function automatic walk_t combo_walk(input int want);
    walk_t r;
    int    x0, x1, x2, c0, c1, c2;
    r = '0;
    for (int l0 = 0; l0 < MC_LAYERS; l0++)
      for (int l1 = l0 + 1; l1 < MC_LAYERS; l1++)
        for (int l2 = l1 + 1; l2 < MC_LAYERS; l2++)
          for (int i0 = 0; i0 < int'(cells_in_layer(l0)); i0++)
            for (int i1 = 0; i1 < int'(cells_in_layer(l1)); i1++)
              for (int i2 = 0; i2 < int'(cells_in_layer(l2)); i2++) begin
                x0 = wire_x(l0, i0);
                x1 = wire_x(l1, i1);
                x2 = wire_x(l2, i2);
                if (iabs(x1 - x0) <= l1 - l0 &&
                    iabs(x2 - x1) <= l2 - l1 &&
                    iabs(x2 - x0) <= l2 - l0) begin
                  if (int'(r.n) == want) begin
                    c0 = -(l2 - l1);
                    c1 = l2 - l0;
                    c2 = -(l1 - l0);
                    r.e.pos0  = POS_W'(int'(layer_offset(l0)) + i0);
                    r.e.pos1  = POS_W'(int'(layer_offset(l1)) + i1);
                    r.e.pos2  = POS_W'(int'(layer_offset(l2)) + i2);
                    r.e.c0    = 4'(c0);
                    r.e.c1    = 4'(c1);
                    r.e.c2    = 4'(c2);
                    r.e.b     = 8'(-(c0 * x0 + c1 * x1 + c2 * x2));
                    r.e.lmask = MC_LAYERS'((1 << l0) | (1 << l1) | (1 << l2));
                  end
                  r.n = r.n + 16'd1;
                end
              end
    return r;
  endfunction

  localparam int unsigned NCOMBO = int'(combo_walk(-1).n);

  function automatic combo_t combo_entry(input int k);
    walk_t r;
    r = combo_walk(k);
    return r.e;
  endfunction

  // ------------------------------------------------------ trigger output
  typedef struct packed {
    logic            found;    // a t0 was identified in this window
    logic            hq;       // high quality: 4 aligned layers
    logic [BX_W-1:0] t0_bx;    // parent BX in the orbit frame
  } mc_result_t;

endpackage
