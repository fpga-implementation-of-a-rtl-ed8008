// tb_mmt_synch: checks the BX, orbit and page counters.
//
// After reset the generator is compared every clock cycle, for more than a
// full orbit, with values computed from the cycle number n alone:
//   bx = (n / 5) mod 3564, bx_strobe = (n mod 5 == 0),
//   page_tick = (n mod 80 == 0), page_start = (16 * (n / 80)) mod 3564,
//   cycle_in_page = n mod 80.
// Then bc0 is raised mid-page and the count must restart from zero.
module tb_mmt_synch;
  import mmt_pkg::*;

  localparam int CPB = 5, PAGE = 16;

  logic clk = 0, rst = 1, bc0 = 0;
  always #5 clk = ~clk;

  logic [BX_W-1:0] bx, page_start;
  logic bx_strobe, page_tick;
  logic [15:0] cycle_in_page;

  mmt_synch #(.CLK_PER_BX(CPB), .PAGE_BX(PAGE)) dut (
    .clk, .rst, .bc0, .bx, .bx_strobe, .page_start, .page_tick, .cycle_in_page);

  int checks = 0, failures = 0, wraps = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic compare(input int n);
    check(int'(bx) == (n / CPB) % int'(ORBIT_BX), $sformatf("n=%0d bx=%0d", n, bx));
    check(bx_strobe == (n % CPB == 0), $sformatf("n=%0d strobe", n));
    check(page_tick == (n % (CPB * PAGE) == 0), $sformatf("n=%0d tick", n));
    check(int'(page_start) == (PAGE * (n / (CPB * PAGE))) % int'(ORBIT_BX),
          $sformatf("n=%0d page_start=%0d", n, page_start));
    check(int'(cycle_in_page) == n % (CPB * PAGE), $sformatf("n=%0d cycle_in_page", n));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    #1;
    for (int n = 0; n < int'(ORBIT_BX) * CPB + 1000; n++) begin
      compare(n);
      if (n > 0 && bx == 0 && bx_strobe) wraps++;
      @(posedge clk);
      #1;
    end
    check(wraps == 1, "one orbit wrap seen");
    bc0 <= 1;
    @(posedge clk);
    bc0 <= 0;
    #1;
    for (int n = 0; n < 500; n++) begin
      compare(n);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
