// tb_mmt_top_160: end-to-end test of the trigger in the setting of the
// cosmic-ray demonstrator: the same 7 macro-cells, but a 160 MHz processing
// clock (4 cycles per BX, 64 cycles per 16-BX page), set by CLK_PER_BX = 4
// with every other parameter at its default. The window replay of the
// default 30-hit page buffers (2*30+3 = 63 cycles) fits in such a page.
// Stimulus and checks are those of tb_mmt_top (see tb_mmt_top_env). Prints
// the result line and stops.
module tb_mmt_top_160;
  import mmt_pkg::*;

  localparam int N_MC = 7;

  logic clk, rst, in_valid;
  tdc_word_t in_word;
  logic pl_valid, pl_first, pl_last;
  logic [31:0] pl_word, n_payloads;
  logic [N_MC-1:0] mc_valid;
  mc_result_t mc_res [N_MC];
  logic [BX_W-1:0] bx;
  logic [15:0] n_late, n_overflow, n_bad_channel, n_overrun;
  logic done;
  int checks, failures;

  mmt_top #(.CLK_PER_BX(4)) dut (
    .clk, .rst, .bc0(1'b0), .in_valid, .in_word,
    .pl_valid, .pl_first, .pl_last, .pl_word,
    .mc_valid, .mc_res,
    .bx, .n_payloads, .n_late, .n_overflow, .n_bad_channel, .n_overrun);

  tb_mmt_top_env #(.CPB(4), .DEPTH(30)) env (
    .clk, .rst, .in_valid, .in_word,
    .pl_valid, .pl_first, .pl_word, .n_payloads,
    .n_late, .n_overflow, .n_bad_channel, .n_overrun,
    .done, .n_checks(checks), .n_failures(failures));

  // report when the checks are done, or after the watchdog time
  initial begin
    bit expired;
    expired = 1'b0;
    fork
      wait (done === 1'b1);
      begin
        repeat (25000) @(posedge clk);
        expired = 1'b1;
      end
    join_any
    if (expired && done !== 1'b1) $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks,
             failures + ((expired && done !== 1'b1) ? 1 : 0));
    $finish;
  end
endmodule
