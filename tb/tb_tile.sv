// tb_tile: self-checking test of one complete tile, driven through its mesh
// links as a neighbour would drive them.
// Through the west link the testbench loads a short program and its data
// (IMEM and DMEM write packets) and starts the core with a PEWAKE packet.
// The program loads two numbers, multiplies them on FPMAC 0, waits out the
// FPU latency, sends the product back west and halts. The testbench checks
// the product packet (route spent, command and value), that the core ran
// and halted, that one FPU operation issued, and that a packet passing
// through (north in, south out) is not disturbed and takes the router's
// 5-cycle latency. It also scans a static pattern into the sleep control
// register that switches the east port off and checks that traffic to it
// is held until the port is switched on again.
module tb_tile;
  import polaris_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n, scan_clk = 1'b0;
  flit_t             link_in   [NPORTS];
  logic [NLANES-1:0] link_in_stop  [NPORTS];
  flit_t             link_out  [NPORTS];
  logic [NLANES-1:0] link_out_stop [NPORTS];
  logic scan_en, scan_in, scan_update, scan_out, core_run;
  logic [7:0] sleep_region;
  logic [1:0] fpu_issue;
  int checks = 0, failures = 0;
  int cyc = 0;

  tile dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // injection queues per input link; a flit is sent when its lane is not
  // stopped
  flit_t inq [NPORTS][$];
  int    inj_t [NPORTS][$];
  always @(negedge clk) begin
    for (int p = 1; p < int'(NPORTS); p++) begin
      link_in[p] = FLIT_IDLE;
      if (rst_n && inq[p].size() != 0 && !link_in_stop[p][inq[p][0].lane]) begin
        link_in[p] = inq[p].pop_front();
        inj_t[p].push_back(cyc);
      end
    end
  end

  // what leaves on each output link
  flit_t outq [NPORTS][$];
  int    out_t [NPORTS][$];
  always @(posedge clk) if (rst_n)
    for (int p = 1; p < int'(NPORTS); p++)
      if (link_out[p].valid) begin outq[p].push_back(link_out[p]); out_t[p].push_back(cyc); end

  int n_fpu = 0, n_run = 0;
  always @(posedge clk) if (rst_n) begin
    n_fpu += int'(fpu_issue[0]) + int'(fpu_issue[1]);
    if (core_run) n_run++;
  end

  task automatic scan_word(input logic [7:0] v);
    for (int b = 0; b < 8; b++) begin
      scan_in = v[b]; scan_en = 1;
      #3 scan_clk = 1; #3 scan_clk = 0;
    end
    scan_en = 0;
    #3 scan_update = 1; #3 scan_clk = 1; #3 scan_clk = 0; scan_update = 0;
  endtask

  function automatic logic [31:0] w(input instr_t i, input int part);
    return i[32*part +: 32];
  endfunction

  initial begin
    instr_t prog [$];
    instr_t i;
    word_q_t d;
    rst_n = 1; #1 rst_n = 0;
    for (int p = 0; p < int'(NPORTS); p++) begin link_in[p] = FLIT_IDLE; link_out_stop[p] = '0; end
    scan_en = 0; scan_in = 0; scan_update = 0;
    // the scan registers reset like the rest but only act on scan_clk edges
    // in this two-state simulation: give them two during reset
    #3 scan_clk = 1; #3 scan_clk = 0; #3 scan_clk = 1; #3 scan_clk = 0;
    #9 rst_n = 1;

    // program: R1 = DMEM[0], R2 = DMEM[1], R20 = route, R21 = command,
    // R3 = R1*R2, wait, send R3, halt
    i = nop(); i.fl = flow(FL_LI, 0, 10); prog.push_back(i);
    i = nop(); i.ld = mop(1, 10, 1); prog.push_back(i);
    i = nop(); i.ld = mop(2, 10, 1); prog.push_back(i);
    i = nop(); i.ld = mop(20, 10, 1); prog.push_back(i);
    i = nop(); i.ld = mop(21, 10, 1); prog.push_back(i);
    i = nop(); prog.push_back(i);
    i = nop(); i.fpu0 = fpu(1, 2, 1, 1, 3); prog.push_back(i);
    i = nop(); i.fl = flow(FL_STALL, 9); prog.push_back(i);
    i = nop(); i.net.op = NET_SND; i.net.rs = 3; i.net.rh = 20; prog.push_back(i);
    i = nop(); i.fl = flow(FL_HALT, 0); prog.push_back(i);
    d.delete();
    foreach (prog[k]) for (int part = 0; part < 3; part++) d.push_back(w(prog[k], part));
    packet(inq[4], host_to_tile(0, 0), {CMD_IMEM_WR, 28'd0}, d, 1'b0);
    d = '{32'h40400000, 32'hc0a00000, 32'(P_WEST), {CMD_DMEM_WR, 28'd300}};  // 3.0, -5.0
    packet(inq[4], host_to_tile(0, 0), {CMD_DMEM_WR, 28'd0}, d, 1'b1);
    d.delete();
    packet(inq[4], host_to_tile(0, 0), {CMD_PEWAKE, 28'd0}, d, 1'b0);

    // through traffic: north in, south out
    repeat (5) @(negedge clk);
    d = '{32'h1234_5678, 32'h9abc_def0};
    packet(inq[1], '{32'(P_SOUTH)}, 32'h0000_0001, d, 1'b0);

    while (outq[4].size() < 3) @(negedge clk);
    repeat (5) @(negedge clk);
    check(outq[4].size() == 3, "one product packet");
    check(outq[4][0].head && outq[4][0].data == 32'h0, "route spent");
    check(outq[4][1].data == {CMD_DMEM_WR, 28'd300}, "command word");
    check(outq[4][2].tail && outq[4][2].data == 32'hc1700000, "product 3.0 * -5.0 = -15.0");
    check(!core_run && n_run > 0, "core ran and halted");
    check(n_fpu == 1, "one FPU operation");
    check(sleep_region[2] == 1'b1, "halted core region asleep");
    check(outq[3].size() == 4 && outq[3][3].data == 32'h9abc_def0 && outq[3][0].data == 32'h0,
          "through packet intact");
    check(out_t[3][0] - inj_t[1][0] == 5, $sformatf("router latency %0d", out_t[3][0] - inj_t[1][0]));

    // static sleep: east port (router port 2, scan bit 5) off
    scan_word(8'b0010_0000);
    d = '{32'hdead_beef};
    packet(inq[4], '{32'(P_EAST)}, 32'h0, d, 1'b0);
    repeat (30) @(negedge clk);
    check(outq[2].size() == 0 && sleep_region[5], "disabled east port holds traffic");
    scan_word(8'b0000_0000);
    repeat (20) @(negedge clk);
    check(outq[2].size() == 3 && outq[2][2].data == 32'hdead_beef, "east port switched on again");
    check(scan_out == 1'b0, "scan out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
