// tb_mmt_equations: checks the mean-timer equations of single patterns.
//
// Feeds every entry of the pattern table with random hit times (and, for a
// third of the entries, times built from a real straight track so that many
// candidates are accepted), one pattern per cycle, and compares the eight
// lanes two cycles later with the geometric reference model. Also checks the
// table itself: 72 patterns, each obeying the neighbouring-wire rule.
module tb_mmt_equations;
  import mmt_pkg::*;
  import tb_mmt_ref_pkg::*;

  localparam int TMAX = 124, TOL = 4, NBINS = 50, BIN_NEG = 18;
  localparam int BIN_W = $clog2(NBINS);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0;
  combo_t in_combo = '0;
  mc_hit_t h0 = '0, h1 = '0, h2 = '0;
  logic out_valid;
  logic [3:0] out_lmask;
  logic [7:0] cand_ok;
  logic [BIN_W-1:0] cand_bin [8];

  mmt_equations #(.TMAX(TMAX), .TOL(TOL), .NBINS(NBINS), .BIN_NEG(BIN_NEG)) dut (
    .clk, .rst, .in_valid, .in_combo, .in_h0(h0), .in_h1(h1), .in_h2(h2),
    .out_valid, .out_lmask, .cand_ok, .cand_bin);

  int checks = 0, failures = 0, accepted = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // expected lanes, queued per fed pattern
  typedef struct { bit ok[8]; int bin[8]; int lmask; } exp_t;
  exp_t q[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare outputs
  always @(posedge clk) if (!rst && out_valid) begin
    exp_t e;
    e = q.pop_front();
    check(out_lmask == 4'(e.lmask), "layer mask");
    for (int k = 0; k < 8; k++) begin
      check(cand_ok[k] == e.ok[k], $sformatf("lane %0d ok %0b exp %0b", k, cand_ok[k], e.ok[k]));
      if (e.ok[k]) begin
        accepted++;
        check(int'(cand_bin[k]) == e.bin[k],
              $sformatf("lane %0d bin %0d exp %0d", k, cand_bin[k], e.bin[k]));
      end
    end
  end

  initial begin
    combo_t e;
    int p[3], t[3], s[3], bin;
    bit v[3];
    // table structure
    check(NCOMBO == 72, $sformatf("pattern count %0d", NCOMBO));
    for (int k = 0; k < int'(NCOMBO); k++) begin
      e = combo_entry(k);
      p = '{int'(e.pos0), int'(e.pos1), int'(e.pos2)};
      check(ref_pattern(p), $sformatf("pattern %0d geometry", k));
      check(int'(e.lmask) == ((1 << ref_layer(p[0])) | (1 << ref_layer(p[1])) | (1 << ref_layer(p[2]))),
            "pattern layer mask");
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int round = 0; round < 60; round++)
      for (int k = 0; k < int'(NCOMBO); k++) begin
        exp_t x;
        e = combo_entry(k);
        p = '{int'(e.pos0), int'(e.pos1), int'(e.pos2)};
        if (round % 3 == 0) begin
          // hits of a real track: random t0, crossing point and slope
          real x0, m, xx, dd;
          automatic int t0r = 60 + $urandom_range(0, 200);
          x0 = real'($urandom_range(0, 800)) / 100.0;
          m  = (real'($urandom_range(0, 200)) - 100.0) / 100.0;
          for (int j = 0; j < 3; j++) begin
            xx = x0 + m * real'(ref_layer(p[j]));
            dd = xx - real'(ref_x(p[j]));
            if (dd < 0) dd = -dd;
            t[j] = t0r + int'($floor(dd * TMAX + 0.5));
            if (t[j] > 511) t[j] = 511;
          end
        end else begin
          for (int j = 0; j < 3; j++) t[j] = $urandom_range(0, 300);
        end
        for (int j = 0; j < 3; j++) v[j] = ($urandom_range(0, 15) != 0);
        x.lmask = int'(e.lmask);
        for (int l = 0; l < 8; l++) begin
          s = '{(l & 1) != 0 ? -1 : 1, (l & 2) != 0 ? -1 : 1, (l & 4) != 0 ? -1 : 1};
          x.ok[l]  = v[0] && v[1] && v[2] &&
                     ref_candidate(p, t, s, TMAX, TOL, NBINS, BIN_NEG, bin);
          x.bin[l] = bin;
        end
        q.push_back(x);
        in_valid <= 1;
        in_combo <= e;
        h0 <= '{valid: v[0], t: WT_W'(t[0])};
        h1 <= '{valid: v[1], t: WT_W'(t[1])};
        h2 <= '{valid: v[2], t: WT_W'(t[2])};
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    check(q.size() == 0, "every pattern produced an output");
    check(accepted > 100, $sformatf("accepted candidates %0d", accepted));
    $display("accepted candidates: %0d", accepted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
