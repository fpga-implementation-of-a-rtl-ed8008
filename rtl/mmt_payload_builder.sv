// mmt_payload_builder: gathers the t0 and quality of every macro-cell for one
// window and writes them out as a trigger payload.
//
// Each super-layer processor reports once per window (res_valid[m]). When all
// N_MC have reported, the results are frozen and a payload is sent as a burst
// of 32-bit words on pl_valid/pl_word, one word per cycle:
//   header   [31:28]=4'hA  [27:16]=window BX  [15:8]=number of triggers
//            [7:0]=payload sequence number
//   trigger  [31:28]=4'h5  [27:24]=macro-cell  [23]=high quality
//            [22:12]=0     [11:0]=t0 BX in the orbit
// one trigger word per macro-cell that found a t0, in macro-cell order.
// pl_first/pl_last mark the first and last word of a payload; a payload
// without triggers is a lone header. A burst lasts at most N_MC+1 cycles
// and must end before the next window's results arrive (one page later).
// n_payloads counts the payloads written.
//
// The description names the block and what it receives (t0 and quality of a
// number of macro-cells); the word format is this design's own.
module mmt_payload_builder
  import mmt_pkg::*;
#(
  parameter int unsigned N_MC = 7
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_MC-1:0] res_valid,
  input  mc_result_t      res [N_MC],
  input  logic [BX_W-1:0] res_win_bx,
  output logic            pl_valid,
  output logic            pl_first,
  output logic            pl_last,
  output logic [31:0]     pl_word,
  output logic [31:0]     n_payloads
);

  localparam int unsigned M_W = $clog2(N_MC + 1);

  logic [N_MC-1:0] got;
  mc_result_t      r    [N_MC];
  logic [BX_W-1:0] wbx;
  logic [7:0]      seq;
  logic            busy;
  logic            hdr;
  logic [M_W-1:0]  m;

  // number of triggers and index of the last one among the frozen results
  logic [7:0]     ntrig;
  logic [M_W-1:0] last_m;
  always_comb begin
    ntrig  = '0;
    last_m = '0;
    for (int i = 0; i < N_MC; i++)
      if (r[i].found) begin
        ntrig  = ntrig + 8'd1;
        last_m = M_W'(i);
      end
  end

  wire [N_MC-1:0] got_now = got | res_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      got        <= '0;
      wbx        <= '0;
      seq        <= '0;
      busy       <= 1'b0;
      hdr        <= 1'b0;
      m          <= '0;
      pl_valid   <= 1'b0;
      pl_first   <= 1'b0;
      pl_last    <= 1'b0;
      pl_word    <= '0;
      n_payloads <= '0;
      for (int i = 0; i < N_MC; i++) r[i] <= '0;
    end else begin
      pl_valid <= 1'b0;
      pl_first <= 1'b0;
      pl_last  <= 1'b0;
      for (int i = 0; i < N_MC; i++)
        if (res_valid[i] && !busy) r[i] <= res[i];
      if (res_valid != 0 && !busy) wbx <= res_win_bx;
      if (!busy) begin
        got <= got_now;
        if (got_now == '1) begin
          got  <= '0;
          busy <= 1'b1;
          hdr  <= 1'b1;
          m    <= '0;
        end
      end else if (hdr) begin
        pl_valid   <= 1'b1;
        pl_first   <= 1'b1;
        pl_last    <= (ntrig == 0);
        pl_word    <= {4'hA, wbx, ntrig, seq};
        hdr        <= 1'b0;
        seq        <= seq + 8'd1;
        n_payloads <= n_payloads + 32'd1;
        if (ntrig == 0) busy <= 1'b0;
      end else begin
        if (r[m].found) begin
          pl_valid <= 1'b1;
          pl_last  <= (m == last_m);
          pl_word  <= {4'h5, 4'(m), r[m].hq, 11'd0, r[m].t0_bx};
        end
        if (m == M_W'(N_MC - 1) || (r[m].found && m == last_m)) busy <= 1'b0;
        m <= m + 1'b1;
      end
    end
  end

  // results of the next window may not arrive during a burst
  assert property (@(posedge clk) disable iff (rst) busy |-> res_valid == '0)
    else $error("macro-cell result arrived while a payload was being written");

endmodule
