// tb_mmt_payload_builder: checks the payload written for each window.
//
// Each window, the seven macro-cell results arrive with random found /
// quality / t0 values, either all in one cycle or spread over a few cycles.
// The expected burst is built independently: a header word
// {4'hA, window BX, number of triggers, sequence number} followed by one
// word {4'h5, macro-cell, hq, 11'b0, t0 BX} per macro-cell that found a t0,
// with first/last flags on the first and last word. Empty payloads (header
// only) and full ones (seven triggers) are both forced to occur.
module tb_mmt_payload_builder;
  import mmt_pkg::*;

  localparam int N_MC = 7;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [N_MC-1:0] res_valid = '0;
  mc_result_t res [N_MC];
  logic [BX_W-1:0] res_win_bx = '0;
  logic pl_valid, pl_first, pl_last;
  logic [31:0] pl_word, n_payloads;

  mmt_payload_builder #(.N_MC(N_MC)) dut (
    .clk, .rst, .res_valid, .res, .res_win_bx,
    .pl_valid, .pl_first, .pl_last, .pl_word, .n_payloads);

  int checks = 0, failures = 0, n_empty = 0, n_full = 0;
  logic [31:0] expq[$];
  int nwords_exp = 0;

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

  // output side: compare words in order, check flags
  logic [31:0] first_seen = 0;
  always @(posedge clk) if (!rst && pl_valid) begin
    logic [31:0] e;
    check(expq.size() > 0, "unexpected payload word");
    if (expq.size() > 0) begin
      e = expq.pop_front();
      check(pl_word == e, $sformatf("word %h exp %h", pl_word, e));
      check(pl_first == (e[31:28] == 4'hA), "first flag");
      check(pl_last == (expq.size() == 0 || expq[0][31:28] == 4'hA), "last flag");
    end
  end

  initial begin
    for (int m = 0; m < N_MC; m++) res[m] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 300; w++) begin
      mc_result_t r [N_MC];
      int ntrig, bxv;
      bxv = $urandom_range(0, 3563);
      ntrig = 0;
      for (int m = 0; m < N_MC; m++) begin
        r[m].found = (w % 7 == 0) ? 1'b0 : (w % 7 == 1) ? 1'b1 : 1'($urandom_range(0, 1));
        r[m].hq    = 1'($urandom_range(0, 1));
        r[m].t0_bx = BX_W'($urandom_range(0, 3563));
        if (r[m].found) ntrig++;
      end
      if (ntrig == 0) n_empty++;
      if (ntrig == N_MC) n_full++;
      expq.push_back({4'hA, BX_W'(bxv), 8'(ntrig), 8'(w)});
      for (int m = 0; m < N_MC; m++)
        if (r[m].found) expq.push_back({4'h5, 4'(m), r[m].hq, 11'd0, r[m].t0_bx});
      // deliver: all at once or in two groups
      if (w % 2 == 0) begin
        for (int m = 0; m < N_MC; m++) res[m] <= r[m];
        res_valid  <= '1;
        res_win_bx <= BX_W'(bxv);
        @(posedge clk);
        res_valid <= '0;
      end else begin
        for (int m = 0; m < N_MC; m++) res[m] <= r[m];
        res_valid  <= 7'b0001111;
        res_win_bx <= BX_W'(bxv);
        @(posedge clk);
        res_valid <= '0;
        repeat ($urandom_range(0, 2)) @(posedge clk);
        res_valid <= 7'b1110000;
        @(posedge clk);
        res_valid <= '0;
      end
      repeat (N_MC + 3) @(posedge clk);
      check(expq.size() == 0, $sformatf("window %0d: %0d words missing", w, expq.size()));
      expq.delete();
    end
    check(int'(n_payloads) == 300, "payload count");
    check(n_empty > 0 && n_full > 0, "empty and full payloads seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
