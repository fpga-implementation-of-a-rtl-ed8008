// tb_mmt_ref_pkg: reference model of the mean-timer t0 search, written from
// the geometry rather than from the coefficient table used by the RTL.
//
// A macro-cell has four layers (y = 0..3); layers 0 and 2 hold 5 cells with
// wires at x = 0, 2, 4, 6, 8 half cells, layers 1 and 3 hold 4 cells with
// wires at x = 1, 3, 5, 7. Positions are numbered layer by layer (0..17).
// For three hits and a side for each, the hit positions depend linearly on
// the unknown crossing time t0:  x_j = xw_j + s_j*(t_j - t0)/TMAX.  Requiring
// them to lie on a straight line in (x, y) fixes t0. Everything is scaled by
// TMAX so the coefficients are exact integers held in reals.
package tb_mmt_ref_pkg;

  function automatic int ref_layer(input int pos);
    if (pos < 5) return 0;
    if (pos < 9) return 1;
    if (pos < 14) return 2;
    return 3;
  endfunction

  function automatic int ref_cell(input int pos);
    int start[4] = '{0, 5, 9, 14};
    return pos - start[ref_layer(pos)];
  endfunction

  function automatic int ref_x(input int pos);
    return 2 * ref_cell(pos) + (ref_layer(pos) % 2);
  endfunction

  function automatic int ref_abs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // candidate of three positions with given sides (+1/-1);
  // returns 1 and the bin when the candidate is accepted
  function automatic bit ref_candidate(
      input int p[3], input int t[3], input int s[3],
      input int tmax, input int tol, input int nbins, input int bin_neg,
      output int bin);
    real x0[3], xs[3], y[3];
    real a, b, t0;
    bin = 0;
    // X_j = TMAX*x_j = (TMAX*xw_j + s_j*t_j) - s_j*t0  =  x0 + xs*t0
    for (int j = 0; j < 3; j++) begin
      x0[j] = real'(tmax * ref_x(p[j]) + s[j] * t[j]);
      xs[j] = real'(-s[j]);
      y[j]  = real'(ref_layer(p[j]));
    end
    // (X1-X0)*(y2-y1) - (X2-X1)*(y1-y0) = a + b*t0 = 0
    a = (x0[1] - x0[0]) * (y[2] - y[1]) - (x0[2] - x0[1]) * (y[1] - y[0]);
    b = (xs[1] - xs[0]) * (y[2] - y[1]) - (xs[2] - xs[1]) * (y[1] - y[0]);
    if (b == 0.0) return 0;
    t0 = -a / b;
    for (int j = 0; j < 3; j++) begin
      real dt = real'(t[j]) - t0;
      if (dt < -real'(tol) || dt > real'(tmax + tol)) return 0;
    end
    bin = int'($floor(t0 / 8.0)) + bin_neg;
    return (bin >= 0 && bin < nbins);
  endfunction

  // three positions form a pattern: different layers, wires no further
  // apart (in half cells) than the layers
  function automatic bit ref_pattern(input int p[3]);
    for (int i = 0; i < 3; i++)
      for (int j = i + 1; j < 3; j++) begin
        if (ref_layer(p[i]) >= ref_layer(p[j])) return 0;
        if (ref_abs(ref_x(p[i]) - ref_x(p[j])) > ref_layer(p[j]) - ref_layer(p[i])) return 0;
      end
    return 1;
  endfunction

  typedef struct {
    bit found;
    bit hq;
    int bin;
    int count;
  } ref_result_t;

  // full macro-cell: histogram of all accepted candidates, fullest bin
  // (lowest on a tie), quality from the layers feeding that bin
  function automatic ref_result_t ref_macrocell(
      input bit hv[18], input int ht[18],
      input int tmax, input int tol, input int nbins, input int bin_neg);
    ref_result_t r;
    int cnt[];
    int msk[];
    int p[3], t[3], s[3];
    int bin;
    cnt = new[nbins];
    msk = new[nbins];
    foreach (cnt[i]) begin cnt[i] = 0; msk[i] = 0; end
    for (int p0 = 0; p0 < 18; p0++)
      for (int p1 = p0 + 1; p1 < 18; p1++)
        for (int p2 = p1 + 1; p2 < 18; p2++) begin
          p = '{p0, p1, p2};
          if (!ref_pattern(p)) continue;
          if (!(hv[p0] && hv[p1] && hv[p2])) continue;
          t = '{ht[p0], ht[p1], ht[p2]};
          for (int k = 0; k < 8; k++) begin
            s = '{(k & 1) != 0 ? -1 : 1, (k & 2) != 0 ? -1 : 1, (k & 4) != 0 ? -1 : 1};
            if (ref_candidate(p, t, s, tmax, tol, nbins, bin_neg, bin)) begin
              cnt[bin]++;
              msk[bin] |= (1 << ref_layer(p0)) | (1 << ref_layer(p1)) | (1 << ref_layer(p2));
            end
          end
        end
    r.bin = 0;
    for (int i = 1; i < nbins; i++) if (cnt[i] > cnt[r.bin]) r.bin = i;
    r.count = cnt[r.bin];
    r.found = (r.count != 0);
    r.hq    = r.found && (msk[r.bin] == 15);
    return r;
  endfunction

endpackage
