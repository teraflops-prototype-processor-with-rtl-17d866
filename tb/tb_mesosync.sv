// tb_mesosync: self-checking test of the mesochronous link synchronizer.
//
// Three synchronizers share one write clock; their read clocks have the same
// period but phase offsets of 0.5, 4.5 and 9.5 ns of a 10 ns period. A random
// flit stream (with idle gaps) is written every write cycle; each read side
// must deliver exactly the same sequence of valid flits, in order, none lost
// or duplicated, each within 1 to 4 clock periods from write edge to the read edge that
// samples it. The stop bits must cross
// back to the write side within three write cycles.
module tb_mesosync;
  import polaris_pkg::*;
  localparam int NS = 3;

  logic wclk = 1'b0, rst_n = 1'b0;
  logic [NS-1:0] rclk = '0;
  flit_t wflit;
  logic [NLANES-1:0] wstop [NS];
  flit_t rflit [NS];
  logic [NLANES-1:0] rstop;

  int checks = 0, failures = 0;

  always #5 wclk = ~wclk;
  initial begin #0.5; forever #5 rclk[0] = ~rclk[0]; end
  initial begin #4.5; forever #5 rclk[1] = ~rclk[1]; end
  initial begin #9.5; forever #5 rclk[2] = ~rclk[2]; end

  for (genvar i = 0; i < NS; i++) begin : g_s
    mesosync u (.wclk, .wrst_n(rst_n), .wflit, .wstop(wstop[i]),
                .rclk(rclk[i]), .rrst_n(rst_n), .rflit(rflit[i]), .rstop);

    logic [31:0] exp_q[$];
    realtime     t_q[$];
    always @(posedge wclk) if (rst_n && wflit.valid) begin exp_q.push_back(wflit.data); t_q.push_back($realtime); end
    always @(posedge rclk[i]) begin
      if (rst_n && rflit[i].valid) begin
        realtime dt;
        checks++;
        if (exp_q.size() == 0 || exp_q[0] != rflit[i].data) begin
          failures++; $display("FAIL sync %0d data order", i);
        end else begin
          void'(exp_q.pop_front());
          dt = $realtime - t_q.pop_front();
          checks++;
          if (dt < 10.0 || dt > 40.0) begin failures++; $display("FAIL sync %0d latency %0t", i, dt); end
        end
      end
    end
  end

  initial begin
    wflit = FLIT_IDLE; rstop = '0;
    #22 rst_n = 1'b1;
    repeat (2000) begin
      @(posedge wclk); #1;
      wflit = FLIT_IDLE;
      if ($urandom % 4 != 0) begin
        wflit.valid = 1; wflit.data = $urandom; wflit.lane = 1'($urandom);
      end
    end
    @(posedge wclk); #1 wflit = FLIT_IDLE;
    // stop crosses back
    rstop = 2'b10;
    repeat (3) @(posedge wclk);
    #1;
    for (int i = 0; i < NS; i++) begin
      checks++;
      if (wstop[i] != 2'b10) begin failures++; $display("FAIL stop crossing %0d", i); end
    end
    repeat (5) @(posedge wclk);
    for (int i = 0; i < NS; i++) begin
      checks++;
      if (g_s[0].exp_q.size() != 0) begin failures++; $display("FAIL flits lost"); end
    end
    checks++;
    if (g_s[1].exp_q.size() != 0 || g_s[2].exp_q.size() != 0) begin failures++; $display("FAIL flits lost"); end
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
