// tb_pm_ctrl: self-checking test of the tile sleep controller: core
// start/stop by PEWAKE, PESLEEP and HALT; FPMAC nap and wake with a one-cycle
// effect; static control through the scan chain (shift, update, bit order,
// forced sleep, port disables) and activity-based port sleep.
module tb_pm_ctrl;
  import polaris_pkg::*;
  logic clk = 1'b0, rst_n, scan_clk = 1'b0;
  logic [1:0] nap, wake, fpmac_sleep;
  logic pesleep, pewake, halt, scan_en, scan_in, scan_update, scan_out, core_run;
  logic [NPORTS-1:0] port_active, port_en;
  logic [7:0] sleep_region;
  int checks = 0, failures = 0;

  pm_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask


  task automatic scan_shift(input logic [7:0] v);
    for (int b = 0; b < 8; b++) begin
      scan_in = v[b]; scan_en = 1;
      #2 scan_clk = 1; #2 scan_clk = 0;
    end
    scan_en = 0;
    #2 scan_update = 1; #2 scan_clk = 1; #2 scan_clk = 0; scan_update = 0;
  endtask

  initial begin
    nap = 0; wake = 0; pesleep = 0; pewake = 0; halt = 0;
    scan_en = 0; scan_in = 0; scan_update = 0; port_active = '0;
    // asynchronous reset: a falling edge, then release
    rst_n = 1; #1 rst_n = 0; #11 rst_n = 1;
    @(negedge clk);
    check(!core_run && fpmac_sleep == 2'b00 && port_en == 5'h1f, "reset state");
    @(negedge clk); pewake = 1; @(negedge clk); pewake = 0;
    check(core_run && !sleep_region[2], "PEWAKE starts core");
    @(negedge clk); halt = 1; @(negedge clk); halt = 0;
    check(!core_run && sleep_region[2], "HALT sleeps core");
    @(negedge clk); pewake = 1; @(negedge clk); pewake = 0;
    @(negedge clk); pesleep = 1; @(negedge clk); pesleep = 0;
    check(!core_run, "PESLEEP sleeps core");
    @(negedge clk); pewake = 1; @(negedge clk); pewake = 0;
    @(negedge clk); nap = 2'b10; @(posedge clk); #1;
    check(fpmac_sleep == 2'b10, "NAP1 effective after one edge");
    @(negedge clk); nap = 0; wake = 2'b10; @(posedge clk); #1;
    check(fpmac_sleep == 2'b00, "WAKE1 effective after one edge");
    @(negedge clk); wake = 0; nap = 2'b01; @(negedge clk); nap = 0;
    check(fpmac_sleep == 2'b01 && sleep_region[1:0] == 2'b01, "NAP0");
    @(negedge clk); wake = 2'b01; @(negedge clk); wake = 0;
    // activity based port sleep
    port_active = 5'b00101; #1;
    check(sleep_region[7:3] == 5'b11010, "idle ports asleep");
    // static: disable ports 1 and 4, force FPMAC1 asleep
    scan_shift(8'b1001_0100);
    @(negedge clk);
    check(port_en == 5'b01101, "scan port disables");
    check(fpmac_sleep == 2'b10 && core_run, "scan FPMAC1 sleep");
    check(sleep_region[7:3] == 5'b11010, "disabled port asleep");
    // static core sleep; scan_out shows the previous pattern's bit order
    begin
      logic [7:0] seen;
      for (int b = 0; b < 8; b++) begin
        seen[b] = scan_out;
        scan_in = (b == 0); scan_en = 1;
        #2 scan_clk = 1; #2 scan_clk = 0;
      end
      scan_en = 0;
      check(seen == 8'b1001_0100, "scan out order");
      #2 scan_update = 1; #2 scan_clk = 1; #2 scan_clk = 0; scan_update = 0;
    end
    @(negedge clk);
    check(!core_run && fpmac_sleep == 2'b11 && port_en == 5'h1f, "scan core sleep");
    scan_shift(8'h00);
    @(negedge clk);
    check(core_run, "core resumes when static sleep cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
