// mmt_hit_driver: places the hits of a window at their positions within the
// macro-cells.
//
// The super-layer is covered by N_MC overlapping macro-cells of 18 wires
// (mmt_pkg). Macro-cell m starts at cell m*MC_STRIDE of every layer; wire
// channels are numbered layer*WPL + cell. Every hit on the TDC hit bus is
// compared with the channel of each position of each macro-cell, so a wire
// shared by two macro-cells is written into both. When a wire fires more
// than once in a window the earliest time is kept.
//
// Protocol: win_start clears all maps and latches the window BX; hits update
// the maps one per cycle; win_end raises frame_valid for one cycle, one cycle
// later, with the maps complete. The maps hold until the next win_start.
//
// The description names the block and its function (assigning hits to their
// position in a macro-cell); the macro-cell overlap (MC_STRIDE), the channel
// numbering and the keep-earliest rule are this design's choices.
module mmt_hit_driver
  import mmt_pkg::*;
#(
  parameter int unsigned N_MC      = 7,
  parameter int unsigned MC_STRIDE = 2,
  parameter int unsigned WPL       = MC_STRIDE * (N_MC - 1) + 5,
  localparam int unsigned CH_W     = 8
) (
  input  logic            clk,
  input  logic            rst,
  // TDC hit bus
  input  logic            win_start,
  input  logic [BX_W-1:0] win_bx,
  input  logic            hit_valid,
  input  logic [CH_W-1:0] hit_channel,
  input  logic [WT_W-1:0] hit_t,
  input  logic            win_end,
  // mapped TDC hits
  output logic            frame_valid,
  output logic [BX_W-1:0] frame_bx,
  output mc_hit_t         frame [N_MC][MC_WIRES]
);

  // channel read by position p of macro-cell m
  function automatic int pos_channel(input int m, input int p);
    int l;
    l = 0;
    while (l < int'(MC_LAYERS) - 1 && p >= int'(layer_offset(l + 1))) l++;
    return l * int'(WPL) + m * int'(MC_STRIDE) + (p - int'(layer_offset(l)));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      frame_valid <= 1'b0;
      frame_bx    <= '0;
      for (int m = 0; m < N_MC; m++)
        for (int p = 0; p < MC_WIRES; p++)
          frame[m][p] <= '0;
    end else begin
      frame_valid <= win_end;
      if (win_start) begin
        frame_bx <= win_bx;
        for (int m = 0; m < N_MC; m++)
          for (int p = 0; p < MC_WIRES; p++)
            frame[m][p] <= '0;
      end else if (hit_valid) begin
        for (int m = 0; m < N_MC; m++)
          for (int p = 0; p < MC_WIRES; p++)
            if (int'(hit_channel) == pos_channel(m, p) &&
                (!frame[m][p].valid || hit_t < frame[m][p].t))
              frame[m][p] <= '{valid: 1'b1, t: hit_t};
      end
    end
  end

  initial assert (MC_STRIDE * (N_MC - 1) + 5 <= WPL)
    else $error("macro-cells do not fit in WPL wires per layer");

endmodule
