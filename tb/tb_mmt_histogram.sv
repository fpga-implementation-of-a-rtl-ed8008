// tb_mmt_histogram: checks the t0 histogram and its winner search.
//
// For several windows: clear, then a random number of cycles with random
// candidates (32 per cycle, four groups of eight as from four patterns, each
// group with its own layer mask) and bins, then finish. A plain array model
// gives the expected fullest bin (lowest on a tie), its count, whether any
// candidate was seen and the quality (layers of the winning bin = all four).
// Windows are biased so that high- and low-quality winners, empty windows
// and ties all occur; the result must come one cycle after finish.
module tb_mmt_histogram;
  import mmt_pkg::*;

  localparam int NBINS = 50, NCAND = 32, CNT_W = 10, BIN_W = $clog2(NBINS);

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic clear = 0, in_valid = 0, finish = 0;
  logic [NCAND-1:0] cand_ok = '0;
  logic [BIN_W-1:0] cand_bin   [NCAND];
  logic [3:0]       cand_lmask [NCAND];
  logic res_valid, res_found, res_hq;
  logic [BIN_W-1:0] res_bin;
  logic [CNT_W-1:0] res_count;

  mmt_histogram #(.NBINS(NBINS), .NCAND(NCAND), .CNT_W(CNT_W)) dut (
    .clk, .rst, .clear, .in_valid, .cand_ok, .cand_bin, .cand_lmask, .finish,
    .res_valid, .res_found, .res_hq, .res_bin, .res_count);

  int checks = 0, failures = 0;
  int n_hq = 0, n_lq = 0, n_empty = 0, n_tie = 0;
  int cnt[NBINS], msk[NBINS];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NCAND; k++) begin cand_bin[k] = '0; cand_lmask[k] = '0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 300; w++) begin
      int ncyc, focus, best, ties;
      foreach (cnt[i]) begin cnt[i] = 0; msk[i] = 0; end
      clear <= 1;
      @(posedge clk);
      clear <= 0;
      ncyc  = (w % 10 == 0) ? 0 : (w % 10 == 5) ? 1 : $urandom_range(1, 18);
      focus = $urandom_range(0, NBINS - 1);
      for (int c = 0; c < ncyc; c++) begin
        logic [NCAND-1:0] ok;
        logic [3:0] lm [NCAND/8];
        ok = NCAND'($urandom()) & NCAND'($urandom());
        if (w % 4 == 0) ok = ok & NCAND'(32'h0F0F_0F0F);
        for (int g = 0; g < NCAND / 8; g++) begin
          lm[g] = 4'b0111 << $urandom_range(0, 1);
          if (w % 2 == 1 && $urandom_range(0, 3) == 0) lm[g] = 4'b1011;
          if (w % 3 == 2) lm[g] = 4'b0111;
        end
        if (w % 10 == 5) ok = NCAND'(32'h0000_0101);   // a tie, see below
        for (int k = 0; k < NCAND; k++) begin
          automatic int b = ($urandom_range(0, 2) == 0) ? focus : $urandom_range(0, NBINS - 1);
          // tie: one candidate in each of two bins, from different groups
          if (w % 10 == 5) b = (k < 8) ? focus : (focus + 7) % NBINS;
          cand_bin[k]   <= BIN_W'(b);
          cand_lmask[k] <= lm[k / 8];
          if (ok[k]) begin
            cnt[b]++;
            msk[b] |= int'(lm[k / 8]);
          end
        end
        cand_ok  <= ok;
        in_valid <= 1;
        @(posedge clk);
      end
      in_valid <= 0;
      cand_ok  <= '0;
      finish   <= 1;
      @(posedge clk);
      finish <= 0;
      best = 0;
      ties = 0;
      for (int i = 1; i < NBINS; i++) if (cnt[i] > cnt[best]) best = i;
      for (int i = 0; i < NBINS; i++) if (cnt[i] == cnt[best]) ties++;
      #1;
      check(res_valid, "result one cycle after finish");
      check(res_found == (cnt[best] != 0), "found");
      check(int'(res_count) == cnt[best], $sformatf("count %0d exp %0d", res_count, cnt[best]));
      check(int'(res_bin) == best, $sformatf("bin %0d exp %0d", res_bin, best));
      check(res_hq == (cnt[best] != 0 && msk[best] == 15), "quality");
      if (cnt[best] == 0) n_empty++;
      else if (msk[best] == 15) n_hq++;
      else n_lq++;
      if (cnt[best] != 0 && ties > 1) n_tie++;
      @(posedge clk);
      #1;
      check(!res_valid, "result lasts one cycle");
    end
    $display("winners: hq=%0d lq=%0d empty=%0d ties=%0d", n_hq, n_lq, n_empty, n_tie);
    check(n_hq > 0 && n_lq > 0 && n_empty > 0 && n_tie > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
