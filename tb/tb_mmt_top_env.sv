// tb_mmt_top_env: stimulus and checking for an end-to-end run of mmt_top,
// shared by the full-size run (tb_mmt_top, 200 MHz) and the 160 MHz
// demonstrator setting (tb_mmt_top_160). The enclosing testbench holds the
// mmt_top instance, a watchdog and the final report; this module drives the
// clock, reset and TDC words and, when all checks are done, raises done with
// the number of checks and failures on n_checks / n_failures.
//
// Simulated muons cross the super-layer along straight lines at random
// times; each layer's cell within one half cell of the track fires with the
// drift time |x - x_wire| * TMAX (a few hits are lost). Noise hits, hits
// delayed by more than a page (late), bursts that overflow a page buffer and
// words with an unknown channel are mixed in. Words are sent at most one per
// cycle, in order of arrival time.
//
// The expected payloads are computed from the generated hits alone: the
// page rule of the collector on unwrapped page numbers, the macro-cell map
// from the chamber geometry, and the brute-force t0 search of tb_mmt_ref_pkg
// for every macro-cell. Every payload word is compared. The run crosses the
// orbit wrap. Each mechanism (high- and low-quality triggers, empty windows,
// late / overflow / unknown-channel drops, a wire shared by two macro-cells,
// a wire hit twice in a window, a window across the orbit wrap) is counted
// and must occur at least once. Latency from the end of a window to its
// payload header is checked against 2*DEPTH+3 + ceil(NCOMBO/4)+5 + 2 cycles.
//
// CPB (clock cycles per BX) and DEPTH (page buffer depth) must match the
// CLK_PER_BX and DEPTH of the mmt_top under test; the other sizes are the
// defaults of mmt_top.
module tb_mmt_top_env
  import mmt_pkg::*;
  import tb_mmt_ref_pkg::*;
#(
  parameter int CPB   = 5,
  parameter int DEPTH = 30
) (
  output logic        clk,
  output logic        rst,
  output logic        in_valid,
  output tdc_word_t   in_word,
  input  logic        pl_valid,
  input  logic        pl_first,
  input  logic [31:0] pl_word,
  input  logic [31:0] n_payloads,
  input  logic [15:0] n_late,
  input  logic [15:0] n_overflow,
  input  logic [15:0] n_bad_channel,
  input  logic [15:0] n_overrun,
  output logic        done,
  output int          n_checks,
  output int          n_failures
);

  localparam int PAGE = 16, N_MC = 7, STRIDE = 2, WPL = 17;
  localparam int NCH = 4 * WPL;
  localparam int TMAX = 124, TOL = 4, NBINS = 50, BIN_NEG = 18;
  localparam int PCYC = CPB * PAGE, PL = PAGE * 8;
  localparam int NCYC = 19000;
  localparam int NWIN = NCYC / PCYC - 3;   // windows whose payload is checked

  initial begin
    clk      = 1'b0;
    rst      = 1'b1;
    in_valid = 1'b0;
    in_word  = '0;
    done     = 1'b0;
  end
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  assign n_checks   = checks;
  assign n_failures = failures;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ------------------------------------------------------------ generator
  typedef struct { int arrive; int t; int ch; } hit_t;
  hit_t pending[$];
  int exp_late = 0, exp_ovf = 0, exp_bad = 0;
  int stored_cnt[int];
  int stored[int][$];        // per page: ch*65536 + unwrapped time

  function automatic void add_muon(int t0);
    real x0, m, x, d;
    x0 = real'($urandom_range(0, 3300)) / 100.0;
    m  = (real'($urandom_range(0, 120)) - 60.0) / 100.0;
    for (int l = 0; l < 4; l++) begin
      x = x0 + m * real'(l);
      for (int c = 0; c < WPL; c++) begin
        d = x - real'(2 * c + l % 2);
        if (d < 0) d = -d;
        if (d <= 1.0) begin
          if ($urandom_range(0, 19) != 0) begin
            hit_t h;
            h.t  = t0 + int'($floor(d * TMAX + 0.5));
            h.ch = l * WPL + c;
            h.arrive = h.t + $urandom_range(0, 40);
            if ($urandom_range(0, 40) == 0) h.arrive += 2 * PL;   // late
            pending.push_back(h);
          end
          break;
        end
      end
    end
  endfunction

  function automatic void add_noise(int t, int n);
    for (int i = 0; i < n; i++) begin
      hit_t h;
      h.t  = t + $urandom_range(0, PL - 1);
      h.ch = $urandom_range(0, NCH - 1);
      if ($urandom_range(0, 30) == 0) h.ch = 200;             // unknown channel
      h.arrive = h.t + $urandom_range(0, 40);
      pending.push_back(h);
    end
  endfunction

  bit started = 0;
  initial begin
    // plan the traffic page by page (times in 3.125 ns units)
    for (int pg = 1; pg < NCYC / PCYC; pg++) begin
      if ($urandom_range(0, 2) != 0) add_muon(pg * PL + $urandom_range(0, PL - 1));
      if ($urandom_range(0, 4) == 0) add_muon(pg * PL + $urandom_range(0, PL - 1));
      add_noise(pg * PL, $urandom_range(0, 2));
      if (pg % 61 == 7) add_noise(pg * PL, 45);                 // overflow burst
    end
    pending.sort(h) with (h.arrive);
    repeat (3) @(posedge clk);
    rst <= 0;
    started <= 1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      int now_t, c, pg;
      bit v;
      hit_t h;
      now_t = (cyc / CPB) * 8 + 7;     // latest time known in this BX
      c = cyc / PCYC;
      v = (pending.size() > 0 && pending[0].arrive <= now_t);
      if (v) begin
        h  = pending.pop_front();
        pg = h.t / PL;
        if (h.ch >= NCH) exp_bad++;
        else if (c - pg > 1) exp_late++;
        else begin
          if (!stored_cnt.exists(pg)) stored_cnt[pg] = 0;
          if (stored_cnt[pg] >= DEPTH) exp_ovf++;
          else begin
            stored_cnt[pg]++;
            stored[pg].push_back(h.ch * 65536 + h.t);
          end
        end
        in_word.channel <= 8'(h.ch);
        in_word.bx      <= BX_W'((h.t / 8) % int'(ORBIT_BX));
        in_word.fine    <= FINE_W'((h.t % 8) * 4 + $urandom_range(0, 3));
      end
      in_valid <= v;
      @(posedge clk);
    end
    in_valid <= 0;
    finish_checks();
  end

  // ---------------------------------------------------------- expectation
  int n_hq = 0, n_lq = 0, n_empty = 0, n_shared = 0, n_dup = 0, n_wrap = 0;

  function automatic void expected_payload(int wc, ref logic [31:0] words[$]);
    bit hv[N_MC][18];
    int ht[N_MC][18];
    int start[4] = '{0, 5, 9, 14};
    int ncell[4] = '{5, 4, 5, 4};
    int seen[int];
    int ntrig = 0, wbx;
    ref_result_t r[N_MC];
    foreach (hv[m, p]) begin hv[m][p] = 0; ht[m][p] = 0; end
    for (int pg = wc - 3; pg <= wc - 2; pg++)
      if (pg >= 0 && stored.exists(pg)) begin
        int q[$];
        q = stored[pg];
        foreach (q[i]) begin
          int ch = q[i] / 65536;
          int t  = q[i] % 65536 - (wc - 3) * PL;
          int l = ch / WPL, cc = ch % WPL;
          if (seen.exists(ch)) n_dup++;
          seen[ch] = 1;
          for (int m = 0; m < N_MC; m++) begin
            int i2 = cc - STRIDE * m;
            if (i2 >= 0 && i2 < ncell[l]) begin
              if (!hv[m][start[l] + i2] || t < ht[m][start[l] + i2]) ht[m][start[l] + i2] = t;
              hv[m][start[l] + i2] = 1;
            end
          end
        end
      end
    for (int m = 0; m < N_MC; m++) begin
      r[m] = ref_macrocell(hv[m], ht[m], TMAX, TOL, NBINS, BIN_NEG);
      if (r[m].found) begin
        ntrig++;
        if (r[m].hq) n_hq++; else n_lq++;
        if (m > 0 && r[m - 1].found) n_shared++;
      end
    end
    if (ntrig == 0) n_empty++;
    wbx = (PAGE * (wc - 3) + int'(ORBIT_BX)) % int'(ORBIT_BX);
    if (wbx + 2 * PAGE > int'(ORBIT_BX)) n_wrap++;
    words.push_back({4'hA, BX_W'(wbx), 8'(ntrig), 8'(wc)});
    for (int m = 0; m < N_MC; m++)
      if (r[m].found) begin
        int t0bx = (wbx + r[m].bin - BIN_NEG + int'(ORBIT_BX)) % int'(ORBIT_BX);
        words.push_back({4'h5, 4'(m), r[m].hq, 11'd0, BX_W'(t0bx)});
      end
  endfunction

  // -------------------------------------------------------------- monitor
  int mcyc = 0, n_words = 0, n_pl = 0;
  logic [31:0] got[$];
  int hdr_cycle[$];
  always @(posedge clk) if (started) begin
    if (pl_valid) begin
      got.push_back(pl_word);
      if (pl_first) hdr_cycle.push_back(mcyc);
    end
    mcyc++;
  end

  task automatic finish_checks();
    logic [31:0] ex[$];
    int k = 0;
    for (int wc = 0; wc < NWIN; wc++) expected_payload(wc, ex);
    check(got.size() >= ex.size(), $sformatf("%0d payload words, expected at least %0d", got.size(), ex.size()));
    foreach (ex[i])
      if (i < got.size())
        check(got[i] == ex[i], $sformatf("word %0d: %h exp %h", i, got[i], ex[i]));
    // header of window c: win_end at 80c+2*DEPTH+2, frame +1, result ceil(NCOMBO/4)+5,
    // header +2
    foreach (hdr_cycle[i])
      if (i < NWIN)
        check(hdr_cycle[i] == i * PCYC + 2 * DEPTH + 3 + (int'(NCOMBO) + 3) / 4 + 5 + 2,
              $sformatf("payload %0d header at cycle %0d", i, hdr_cycle[i]));
    check(int'(n_late) == exp_late, $sformatf("late %0d exp %0d", n_late, exp_late));
    check(int'(n_overflow) == exp_ovf, $sformatf("overflow %0d exp %0d", n_overflow, exp_ovf));
    check(int'(n_bad_channel) == exp_bad, $sformatf("bad %0d exp %0d", n_bad_channel, exp_bad));
    check(n_overrun == 0, "no super-layer processor overrun");
    check(int'(n_payloads) >= NWIN, "payload count");
    $display("windows %0d: hq triggers %0d, lq triggers %0d, empty %0d, neighbouring macro-cells %0d,",
             NWIN, n_hq, n_lq, n_empty, n_shared);
    $display("  repeated wires %0d, orbit-wrap windows %0d, late %0d, overflow %0d, unknown channel %0d",
             n_dup, n_wrap, exp_late, exp_ovf, exp_bad);
    check(n_hq > 0, "high-quality trigger seen");
    check(n_lq > 0, "low-quality trigger seen");
    check(n_empty > 0, "empty window seen");
    check(n_shared > 0, "triggers in neighbouring macro-cells seen");
    check(n_dup > 0, "wire hit twice in a window seen");
    check(n_wrap > 0, "window across the orbit wrap seen");
    check(exp_late > 0, "late hit seen");
    check(exp_ovf > 0, "page overflow seen");
    check(exp_bad > 0, "unknown channel seen");
    done = 1'b1;
  endtask
endmodule
