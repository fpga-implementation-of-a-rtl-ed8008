// tb_mmt_hit_driver: checks the mapping of hits onto macro-cell positions.
//
// Sends windows of random hits (some channels fired twice, some on wires
// shared by two macro-cells) on the TDC hit bus. The expected maps are built
// from the chamber geometry: channel -> layer = ch / 17, cell = ch mod 17;
// macro-cell m holds cells 2m .. 2m+4 (even layers) or 2m .. 2m+3 (odd
// layers); the earliest time of a wire is kept. frame_valid must follow
// win_end by one cycle and carry the window BX.
module tb_mmt_hit_driver;
  import mmt_pkg::*;

  localparam int N_MC = 7, STRIDE = 2, WPL = 17;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic win_start = 0, hit_valid = 0, win_end = 0;
  logic [BX_W-1:0] win_bx = '0;
  logic [7:0] hit_channel = '0;
  logic [WT_W-1:0] hit_t = '0;
  logic frame_valid;
  logic [BX_W-1:0] frame_bx;
  mc_hit_t frame [N_MC][MC_WIRES];

  mmt_hit_driver #(.N_MC(N_MC), .MC_STRIDE(STRIDE)) dut (
    .clk, .rst, .win_start, .win_bx, .hit_valid, .hit_channel, .hit_t, .win_end,
    .frame_valid, .frame_bx, .frame);

  int checks = 0, failures = 0, n_dup = 0, n_shared = 0;
  int ev [N_MC][MC_WIRES];   // expected earliest time, -1 = none

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
    automatic int start[4] = '{0, 5, 9, 14};
    automatic int ncell[4] = '{5, 4, 5, 4};
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 200; w++) begin
      int nh, bxv;
      int seen[int];
      foreach (ev[m, p]) ev[m][p] = -1;
      bxv = $urandom_range(0, 3563);
      win_start <= 1;
      win_bx    <= BX_W'(bxv);
      @(posedge clk);
      win_start <= 0;
      nh = $urandom_range(0, 40);
      for (int h = 0; h < nh; h++) begin
        int ch, t, l, c, owners;
        ch = (h > 0 && $urandom_range(0, 4) == 0) ? int'(hit_channel) : $urandom_range(0, 4 * WPL - 1);
        t  = $urandom_range(0, 255);
        if (seen.exists(ch)) n_dup++;
        seen[ch] = 1;
        l = ch / WPL;
        c = ch % WPL;
        owners = 0;
        for (int m = 0; m < N_MC; m++) begin
          automatic int i = c - STRIDE * m;
          if (i >= 0 && i < ncell[l]) begin
            owners++;
            if (ev[m][start[l] + i] < 0 || t < ev[m][start[l] + i]) ev[m][start[l] + i] = t;
          end
        end
        if (owners > 1) n_shared++;
        hit_valid   <= 1;
        hit_channel <= 8'(ch);
        hit_t       <= WT_W'(t);
        @(posedge clk);
        // idle cycles in between
        if ($urandom_range(0, 3) == 0) begin
          hit_valid <= 0;
          @(posedge clk);
        end
      end
      hit_valid <= 0;
      #1;
      check(!frame_valid, "no frame before win_end");
      win_end   <= 1;
      @(posedge clk);
      win_end <= 0;
      #1;
      check(frame_valid, "frame_valid in the cycle after win_end");
      check(int'(frame_bx) == bxv, "frame BX");
      for (int m = 0; m < N_MC; m++)
        for (int p = 0; p < MC_WIRES; p++) begin
          check(frame[m][p].valid == (ev[m][p] >= 0), $sformatf("w%0d mc%0d pos%0d valid", w, m, p));
          if (ev[m][p] >= 0)
            check(int'(frame[m][p].t) == ev[m][p], $sformatf("w%0d mc%0d pos%0d t=%0d exp %0d",
                  w, m, p, frame[m][p].t, ev[m][p]));
        end
    end
    $display("repeated wires %0d, hits on shared wires %0d", n_dup, n_shared);
    check(n_dup > 0 && n_shared > 0, "repeated and shared wires seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
