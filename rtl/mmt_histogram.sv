// mmt_histogram: one-dimensional t0 histogram of a macro-cell, filled in real
// time, and its most frequent bin.
//
// Each bin counts the t0 candidates that fell into one BX. Every cycle up to
// NCAND candidates arrive (eight side assumptions for each pattern evaluated
// in that cycle); each bin adds the number of candidates that name it. Each
// bin also remembers which layers the candidates it received were built from.
//
//   clear      empties all bins (start of a window)
//   in_valid   adds the candidates cand_ok/cand_bin, each built from the
//              layers in cand_lmask
//   finish     picks the winner; one cycle later res_valid is high with
//              res_bin    the fullest bin (lowest bin on a tie)
//              res_count  its count (0: no candidate at all, res_found = 0)
//              res_hq     1 when the candidates of that bin cover all four
//                         layers, i.e. the t0 is backed by four aligned hits
//                         (high quality); otherwise three (low quality)
//
// The description gives the function (real-time histogram, most frequent t0,
// high/low quality for 4/3 aligned hits); the bin width of one BX follows its
// 25 ns output precision. The layer-mask test for quality and the tie rule are
// this design's choices. NCAND = 32 serves four patterns per cycle (see
// mmt_sl_processor). Counters are wide enough that they cannot overflow
// for the pattern count of one window.
module mmt_histogram
  import mmt_pkg::*;
#(
  parameter int unsigned NBINS  = 50,
  parameter int unsigned NCAND  = 32,
  parameter int unsigned CNT_W  = 10,
  localparam int unsigned BIN_W = $clog2(NBINS),
  localparam int unsigned ADD_W = $clog2(NCAND + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic [NCAND-1:0]     cand_ok,
  input  logic [BIN_W-1:0]     cand_bin   [NCAND],
  input  logic [MC_LAYERS-1:0] cand_lmask [NCAND],
  input  logic                 finish,
  output logic                 res_valid,
  output logic                 res_found,
  output logic                 res_hq,
  output logic [BIN_W-1:0]     res_bin,
  output logic [CNT_W-1:0]     res_count
);

  logic [CNT_W-1:0]     count [NBINS];
  logic [MC_LAYERS-1:0] lmask [NBINS];

  // candidates per bin this cycle, and the layers they use
  logic [ADD_W-1:0]     add  [NBINS];
  logic [MC_LAYERS-1:0] addm [NBINS];
  always_comb begin
    for (int i = 0; i < NBINS; i++) begin
      add[i]  = '0;
      addm[i] = '0;
      for (int k = 0; k < NCAND; k++)
        if (cand_ok[k] && cand_bin[k] == BIN_W'(i)) begin
          add[i]  = add[i] + 1'b1;
          addm[i] = addm[i] | cand_lmask[k];
        end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int i = 0; i < NBINS; i++) begin
        count[i] <= '0;
        lmask[i] <= '0;
      end
    end else if (in_valid) begin
      for (int i = 0; i < NBINS; i++)
        if (add[i] != 0) begin
          count[i] <= count[i] + CNT_W'(add[i]);
          lmask[i] <= lmask[i] | addm[i];
        end
    end
  end

  // most frequent bin
  logic [BIN_W-1:0] best;
  always_comb begin
    best = '0;
    for (int i = 1; i < NBINS; i++)
      if (count[i] > count[best]) best = BIN_W'(i);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      res_valid <= 1'b0;
      res_found <= 1'b0;
      res_hq    <= 1'b0;
      res_bin   <= '0;
      res_count <= '0;
    end else begin
      res_valid <= finish;
      if (finish) begin
        res_bin   <= best;
        res_count <= count[best];
        res_found <= (count[best] != 0);
        res_hq    <= (count[best] != 0) && (lmask[best] == '1);
      end
    end
  end

endmodule
