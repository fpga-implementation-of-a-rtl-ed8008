// tb_mmt_sl_processor: checks one macro-cell's t0 search end to end.
//
// Each window holds a simulated muon: a straight line x = x0 + m*y through
// the four layers (x in half cells, y in layers), crossing time t0. In every
// layer the cell whose wire is within one half cell of the track fires with
// drift time |x - x_wire| * TMAX. Some windows drop one layer (three hits),
// add noise hits or hold no muon at all. The result is compared with
//  - the brute-force reference model (tb_mmt_ref_pkg): same t0 BX, count,
//    found flag and quality, exactly;
//  - the muon itself: at least 95% of clean four-hit tracks must get high
//    quality and a t0 within one BX of the true one (rounding can move it by
//    one; a ghost side combination can, rarely, collect more votes).
// The result must come ceil(NCOMBO / LANES) + 5 cycles after the frame. A
// second processor with LANES = 5 (last step only partly used) sees the same
// frames and must give the same results after its own latency.
module tb_mmt_sl_processor;
  import mmt_pkg::*;
  import tb_mmt_ref_pkg::*;

  localparam int TMAX = 124, TOL = 4, NBINS = 50, BIN_NEG = 18;
  localparam int LAT4 = (int'(NCOMBO) + 3) / 4 + 5, LAT5 = (int'(NCOMBO) + 4) / 5 + 5;
  localparam int CNT_W = $clog2(8 * NCOMBO + 1);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic frame_valid = 0;
  logic [BX_W-1:0] frame_bx = '0;
  mc_hit_t frame [MC_WIRES];
  logic ready, res_valid;
  mc_result_t res;
  logic [BX_W-1:0] res_win_bx;
  logic [CNT_W-1:0] res_count;
  logic [15:0] n_overrun;

  mmt_sl_processor #(.TMAX(TMAX), .TOL(TOL), .NBINS(NBINS), .BIN_NEG(BIN_NEG)) dut (
    .clk, .rst, .frame_valid, .frame_bx, .frame, .ready,
    .res_valid, .res, .res_win_bx, .res_count, .n_overrun);

  logic ready5, res_valid5;
  mc_result_t res5;
  logic [BX_W-1:0] res_win_bx5;
  logic [CNT_W-1:0] res_count5;
  logic [15:0] n_overrun5;

  mmt_sl_processor #(.TMAX(TMAX), .TOL(TOL), .NBINS(NBINS), .BIN_NEG(BIN_NEG), .LANES(5)) dut5 (
    .clk, .rst, .frame_valid, .frame_bx, .frame, .ready(ready5),
    .res_valid(res_valid5), .res(res5), .res_win_bx(res_win_bx5), .res_count(res_count5),
    .n_overrun(n_overrun5));

  // the LANES = 5 result of the current frame, and when it came
  mc_result_t got5;
  logic [CNT_W-1:0] got5_count;
  int lat5 = 0, cyc_since = 0;
  always @(posedge clk) begin
    cyc_since <= frame_valid ? 0 : cyc_since + 1;
    if (res_valid5) begin
      got5       <= res5;
      got5_count <= res_count5;
      lat5       <= cyc_since + 1;
    end
  end

  int checks = 0, failures = 0;
  int n_hq = 0, n_lq = 0, n_none = 0, n_true = 0, n_clean = 0, n_clean_hq = 0, n_near = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int start[4] = '{0, 5, 9, 14};
    automatic int ncell[4] = '{5, 4, 5, 4};
    for (int p = 0; p < MC_WIRES; p++) frame[p] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int w = 0; w < 400; w++) begin
      bit hv[18];
      int ht[18];
      int t0, kind, drop, bxv, lat, exp_bx;
      real x0, m;
      ref_result_t r;
      foreach (hv[p]) begin hv[p] = 0; ht[p] = 0; end
      kind = w % 8;          // 0..4 clean 4 hits, 5 three hits, 6 noise, 7 empty
      t0 = $urandom_range(0, 255);
      x0 = real'($urandom_range(100, 700)) / 100.0;
      m  = (real'($urandom_range(0, 120)) - 60.0) / 100.0;
      drop = (kind == 5) ? $urandom_range(0, 3) : -1;
      if (kind <= 6)
        for (int l = 0; l < 4; l++) begin
          real x, d;
          int best;
          x = x0 + m * real'(l);
          best = -1;
          for (int i = 0; i < ncell[l]; i++) begin
            d = x - real'(2 * i + l % 2);
            if (d < 0) d = -d;
            if (d <= 1.0) best = i;
          end
          if (best >= 0 && l != drop) begin
            d = x - real'(2 * best + l % 2);
            if (d < 0) d = -d;
            hv[start[l] + best] = 1;
            ht[start[l] + best] = t0 + int'($floor(d * TMAX + 0.5));
          end
        end
      if (kind == 6)
        repeat (3) begin
          automatic int p = $urandom_range(0, 17);
          hv[p] = 1;
          ht[p] = $urandom_range(0, 400);
        end
      r = ref_macrocell(hv, ht, TMAX, TOL, NBINS, BIN_NEG);
      bxv = $urandom_range(0, 3563);
      for (int p = 0; p < MC_WIRES; p++) frame[p] <= '{valid: hv[p], t: WT_W'(ht[p])};
      frame_bx    <= BX_W'(bxv);
      frame_valid <= 1;
      @(posedge clk);
      frame_valid <= 0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!res_valid && lat < 200);
      check(lat == LAT4, $sformatf("latency %0d", lat));
      #1;
      check(lat5 == LAT5, $sformatf("latency with 5 lanes %0d", lat5));
      check(got5 == res && got5_count == res_count, $sformatf("w%0d 5 lanes differ", w));
      exp_bx = (bxv + r.bin - BIN_NEG + int'(ORBIT_BX)) % int'(ORBIT_BX);
      check(res.found == r.found, $sformatf("w%0d found %0b exp %0b", w, res.found, r.found));
      check(int'(res_count) == r.count, $sformatf("w%0d count %0d exp %0d", w, res_count, r.count));
      check(int'(res_win_bx) == bxv, "window BX");
      if (r.found) begin
        check(int'(res.t0_bx) == exp_bx, $sformatf("w%0d t0 %0d exp %0d", w, res.t0_bx, exp_bx));
        check(res.hq == r.hq, $sformatf("w%0d hq %0b exp %0b", w, res.hq, r.hq));
      end
      if (!res.found) n_none++;
      else if (res.hq) n_hq++;
      else n_lq++;
      // the muon itself
      if (kind <= 4) begin
        automatic int cnt4 = 0;
        foreach (hv[p]) cnt4 += hv[p];
        if (cnt4 == 4) begin
          automatic int true_bx = (bxv + t0 / 8) % int'(ORBIT_BX);
          automatic int diff = int'(res.t0_bx) - true_bx;
          n_clean++;
          if (res.found && res.hq) n_clean_hq++;
          if (diff >= -1 && diff <= 1) n_near++;
          if (diff == 0) n_true++;
        end
      end
      check(ready, "ready after the result");
    end
    // a frame during processing is an overrun
    frame_valid <= 1;
    @(posedge clk);
    frame_valid <= 1;
    @(posedge clk);
    frame_valid <= 0;
    repeat (LAT5 + 10) @(posedge clk);
    check(n_overrun == 16'd1, $sformatf("overrun %0d", n_overrun));
    check(n_overrun5 == 16'd1, $sformatf("overrun with 5 lanes %0d", n_overrun5));
    $display("results: hq=%0d lq=%0d none=%0d; clean tracks %0d: high quality %0d, BX within 1 %0d, exact BX %0d",
             n_hq, n_lq, n_none, n_clean, n_clean_hq, n_near, n_true);
    // a ghost pattern can occasionally outvote the true one
    check(n_clean > 100, "enough clean tracks");
    check(n_clean_hq * 100 >= n_clean * 95, "clean tracks found with high quality");
    check(n_near * 100 >= n_clean * 95, "clean tracks within one BX");
    check(n_hq > 0 && n_lq > 0 && n_none > 0, "all result kinds seen");
    check(n_true * 10 >= n_clean * 7, "most clean tracks get the exact BX");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
