// mmt_synch: timing generator of the trigger.
//
// Counts processing-clock cycles into bunch crossings (CLK_PER_BX cycles per
// BX: 5 at 200 MHz), BX into the LHC orbit (0..3563, wrapping) and BX into
// pages of PAGE_BX crossings. Pages run freely across the orbit wrap, so the
// start of the current page is given as a BX number in the orbit.
//
// Outputs, all registered:
//   bx           current BX in the orbit
//   bx_strobe    1 in the first clock cycle of each BX
//   page_start   BX number of the first crossing of the current page
//   page_tick    1 in the first clock cycle of each page
//   cycle_in_page clock cycles since the start of the current page
// bc0 (optional resynchronisation, e.g. the orbit signal of the link) forces
// BX 0 and a new page on the next cycle.
//
// The block appears only by name in the design description, as the source of
// timing for all others; its counters and the page length are this design's.
module mmt_synch
  import mmt_pkg::*;
#(
  parameter int unsigned CLK_PER_BX = 5,
  parameter int unsigned PAGE_BX    = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            bc0,
  output logic [BX_W-1:0] bx,
  output logic            bx_strobe,
  output logic [BX_W-1:0] page_start,
  output logic            page_tick,
  output logic [15:0]     cycle_in_page
);

  localparam int unsigned SUB_W = $clog2(CLK_PER_BX + 1);
  localparam int unsigned PG_W  = $clog2(PAGE_BX + 1);

  logic [SUB_W-1:0] sub;
  logic [PG_W-1:0]  bx_in_page;

  wire last_sub  = (sub == SUB_W'(CLK_PER_BX - 1));
  wire last_bx   = (bx_in_page == PG_W'(PAGE_BX - 1));

  always_ff @(posedge clk) begin
    if (rst || bc0) begin
      sub           <= '0;
      bx            <= '0;
      bx_in_page    <= '0;
      page_start    <= '0;
      bx_strobe     <= 1'b1;
      page_tick     <= 1'b1;
      cycle_in_page <= '0;
    end else begin
      bx_strobe     <= last_sub;
      page_tick     <= last_sub && last_bx;
      cycle_in_page <= (last_sub && last_bx) ? '0 : cycle_in_page + 16'd1;
      if (last_sub) begin
        sub <= '0;
        bx  <= (bx == BX_W'(ORBIT_BX - 1)) ? '0 : bx + 1'b1;
        if (last_bx) begin
          bx_in_page <= '0;
          page_start <= (bx == BX_W'(ORBIT_BX - 1)) ? '0 : bx + 1'b1;
        end else begin
          bx_in_page <= bx_in_page + 1'b1;
        end
      end else begin
        sub <= sub + 1'b1;
      end
    end
  end

endmodule
