// tb_mmt_hit_collector: checks paging, decoding and window replay.
//
// The page timing comes from mmt_synch (5 cycles per BX, 16-BX pages, so a
// page is 80 cycles and page c starts at cycle 80c). Hits are generated with
// an unwrapped time in 3.125 ns units (BX = time/8, fine = (time mod 8)*4 +
// 0..3, the BX wrapped at 3564) and a random arrival delay. The model works on
// unwrapped page numbers: a hit of page p arriving during page c is stored if
// c - p is 0 or 1 and fewer than DEPTH hits of page p were stored before;
// otherwise it counts as late or as overflow. Channels >= 68 count as bad.
// The window replayed during page c must hold exactly the stored hits of
// pages c-3 and c-2, with times relative to the start of page c-3, between
// win_start (cycle 80c+1, win_bx = 16(c-3) mod 3564) and win_end (cycle
// 80c+66). The run crosses the orbit wrap; one page gets a burst of hits
// that overflows its buffer.
module tb_mmt_hit_collector;
  import mmt_pkg::*;

  localparam int CPB = 5, PAGE = 16, DEPTH = 30, NCH = 68;
  localparam int PCYC = CPB * PAGE, PL = PAGE * 8;
  localparam int NCYC = 20000;
  localparam int BURST_PAGE = 40;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [BX_W-1:0] bx, page_start;
  logic bx_strobe, page_tick;
  logic [15:0] cycle_in_page;
  mmt_synch #(.CLK_PER_BX(CPB), .PAGE_BX(PAGE)) u_synch (
    .clk, .rst, .bc0(1'b0), .bx, .bx_strobe, .page_start, .page_tick, .cycle_in_page);

  logic in_valid = 0;
  tdc_word_t in_word = '0;
  logic win_start, hit_valid, win_end;
  logic [BX_W-1:0] win_bx;
  logic [7:0] hit_channel;
  logic [WT_W-1:0] hit_t;
  logic [15:0] n_late, n_overflow, n_bad_channel;

  mmt_hit_collector #(.NCH(NCH), .PAGE_BX(PAGE), .CLK_PER_BX(CPB), .DEPTH(DEPTH)) dut (
    .clk, .rst, .in_valid, .in_word, .page_start, .page_tick,
    .win_start, .win_bx, .hit_valid, .hit_channel, .hit_t, .win_end,
    .n_late, .n_overflow, .n_bad_channel);

  int checks = 0, failures = 0;
  int exp_late = 0, exp_ovf = 0, exp_bad = 0, n_windows = 0, n_hits_seen = 0;
  int stored_cnt[int];        // per page: hits stored
  int stored[int][$];         // per page: {channel, time} packed as ch*65536 + abs time

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------------------------- stimulus
  bit started = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    started <= 1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      int c, now_bx, pg, ch, t, delay;
      bit v;
      c = cyc / PCYC;
      now_bx = cyc / CPB;
      v = ($urandom_range(0, 4) == 0);
      if (c == BURST_PAGE && (cyc % PCYC) < 45) v = 1;   // overflow burst
      delay = ($urandom_range(0, 9) == 0) ? $urandom_range(0, 3 * PL) : $urandom_range(0, PL / 2);
      if (c == BURST_PAGE) delay = 0;
      t = now_bx * 8 + $urandom_range(0, 7) - delay;
      if (t < 0) v = 0;
      ch = ($urandom_range(0, 30) == 0) ? $urandom_range(NCH, 255) : $urandom_range(0, NCH - 1);
      if (v) begin
        pg = t / PL;
        if (ch >= NCH) exp_bad++;
        else if (c - pg > 1) exp_late++;
        else begin
          if (!stored_cnt.exists(pg)) stored_cnt[pg] = 0;
          if (stored_cnt[pg] >= DEPTH) exp_ovf++;
          else begin
            stored_cnt[pg]++;
            stored[pg].push_back(ch * 65536 + t);
          end
        end
        in_word.channel <= 8'(ch);
        in_word.bx      <= BX_W'((t / 8) % int'(ORBIT_BX));
        in_word.fine    <= FINE_W'((t % 8) * 4 + $urandom_range(0, 3));
      end
      in_valid <= v;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    check(int'(n_late) == exp_late, $sformatf("late %0d exp %0d", n_late, exp_late));
    check(int'(n_overflow) == exp_ovf, $sformatf("overflow %0d exp %0d", n_overflow, exp_ovf));
    check(int'(n_bad_channel) == exp_bad, $sformatf("bad %0d exp %0d", n_bad_channel, exp_bad));
    check(exp_late > 0 && exp_ovf > 0 && exp_bad > 0, "late, overflow and bad hits occurred");
    check(n_windows > NCYC / PCYC - 5, $sformatf("windows %0d", n_windows));
    $display("windows %0d, hits replayed %0d, late %0d, overflow %0d, bad %0d",
             n_windows, n_hits_seen, exp_late, exp_ovf, exp_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------------- monitor
  int mcyc = 0, wc = -1;
  int got[$];
  always @(posedge clk) if (started) begin
    if (win_start) begin
      wc = (mcyc - 1) / PCYC;
      check((mcyc - 1) % PCYC == 0, $sformatf("win_start at cycle %0d", mcyc));
      if (wc >= 3)
        check(int'(win_bx) == (PAGE * (wc - 3)) % int'(ORBIT_BX),
              $sformatf("win_bx %0d page %0d", win_bx, wc));
      got.delete();
    end
    if (hit_valid) begin
      got.push_back(int'(hit_channel) * 65536 + int'(hit_t));
      n_hits_seen++;
    end
    if (win_end) begin
      automatic int ex[$];
      check(mcyc == wc * PCYC + 2 * DEPTH + 2, $sformatf("win_end at cycle %0d", mcyc));
      for (int pg = wc - 3; pg <= wc - 2; pg++)
        if (pg >= 0 && stored.exists(pg)) begin
          automatic int q[$] = stored[pg];
          foreach (q[i]) ex.push_back((q[i] / 65536) * 65536 + (q[i] % 65536) - (wc - 3) * PL);
        end
      ex.sort();
      got.sort();
      check(ex.size() == got.size(), $sformatf("window %0d: %0d hits exp %0d", wc, got.size(), ex.size()));
      if (ex.size() == got.size())
        foreach (ex[i]) check(ex[i] == got[i], $sformatf("window %0d hit %0d: %h exp %h", wc, i, got[i], ex[i]));
      n_windows++;
    end
    mcyc++;
  end
endmodule
