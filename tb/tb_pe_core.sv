// tb_pe_core: self-checking test of the VLIW processing engine on its own.
// The testbench stands in for the network interface and the sleep
// controller: it writes the program and data through the memory write
// ports, drives core_run, answers send requests (with req_ready low for a
// while to force a stall) and pulses rx_pkt.
// Checked against values worked out here: load latency 2 cycles and FPU
// latency 9 cycles (edges from the issuing edge to the register write),
// post-increment addressing, a 2-term multiply-accumulate, a counted LOOP
// (body runs count+1 times), JMP taking effect on the next cycle, STALL n,
// RCV waiting for an arrived packet, SND/SNDI request contents including a
// two-word route, NAP/WAKE/HALT outputs and PEWAKE restart at wake_pc.
module tb_pe_core;
  import polaris_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n;
  logic core_run, pewake, rx_pkt, im_we, dm_we, req_ready;
  logic [1:0] fpmac_sleep, nap, wake, fpu_issue;
  logic halt, req_valid, req_has_route2, req_has_data;
  logic [7:0] wake_pc, im_addr, pc;
  logic [95:0] im_wdata;
  logic [8:0] dm_addr;
  logic [31:0] dm_wdata, req_route, req_route2, req_cmd, req_data;
  int checks = 0, failures = 0;
  int cyc = 0;

  pe_core dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  instr_t prog [$];

  task automatic load_prog();
    foreach (prog[i]) begin
      @(negedge clk); im_we = 1; im_addr = 8'(i); im_wdata = prog[i];
    end
    @(negedge clk); im_we = 0;
  endtask

  task automatic load_word(input int a, input logic [31:0] d);
    @(negedge clk); dm_we = 1; dm_addr = 9'(a); dm_wdata = d;
    @(negedge clk); dm_we = 0;
  endtask

  int t_issue;
  logic [31:0] seen_route, seen_route2, seen_cmd, seen_data;
  logic seen_r2, seen_hd;
  int n_req = 0, n_stall_cycles = 0;

  // record send requests: accepted when req_valid (req_ready is then high)
  always @(posedge clk) if (rst_n && req_valid) begin
    n_req <= n_req + 1;
    seen_route <= req_route; seen_route2 <= req_route2; seen_cmd <= req_cmd;
    seen_data <= req_data; seen_r2 <= req_has_route2; seen_hd <= req_has_data;
  end

  // pc and stall counter after every edge
  logic [7:0]  pc_tr [$];
  logic [10:0] st_tr [$];
  always @(negedge clk) if (rst_n) begin pc_tr.push_back(dut.pc); st_tr.push_back(dut.stall_cnt); end

  instr_t i;
  localparam int B = 6;                  // first instruction after the setup
  logic [4:0] setup_regs [5] = '{5'd20, 5'd21, 5'd24, 5'd25, 5'd26};
  initial begin
    rst_n = 1; #1 rst_n = 0;
    core_run = 0; pewake = 0; rx_pkt = 0; im_we = 0; dm_we = 0; req_ready = 1;
    fpmac_sleep = 0; wake_pc = 0; im_addr = 0; im_wdata = 0; dm_addr = 0; dm_wdata = 0;
    #11 rst_n = 1;

    // ---------------- program ----------------
    // 0..5: LI R10 = 3 ; load the route and command registers from DMEM 3..7
    i = nop(); i.fl = flow(FL_LI, 3, 10); prog.push_back(i);
    foreach (setup_regs[k]) begin
      i = nop(); i.ld = mop(setup_regs[k], 10, 1); prog.push_back(i);
    end
    // B+0: LD R1,[R0]++
    i = nop(); i.ld = mop(1, 0, 1); prog.push_back(i);
    // B+1: LD R2,[R0]++
    i = nop(); i.ld = mop(2, 0, 1); prog.push_back(i);
    // B+2: LD R4,[R0]++  ; R2 not yet written here (2-cycle latency)
    i = nop(); i.ld = mop(4, 0, 1); prog.push_back(i);
    // B+3: FPU0 R3 = R1*R2 (clr), FPU1 R5 = R1*R1 (clr)
    i = nop(); i.fpu0 = fpu(1, 2, 1, 0, 3); i.fpu1 = fpu(1, 1, 1, 1, 5); prog.push_back(i);
    // B+4: FPU0 R3 = acc + R4*R4, write back
    i = nop(); i.fpu0 = fpu(4, 4, 0, 1, 3); prog.push_back(i);
    // B+5: LI R7 = 100 ; SETLC is next
    i = nop(); i.fl = flow(FL_LI, 100, 7); prog.push_back(i);
    // B+6: SETLC 4
    i = nop(); i.fl = flow(FL_SETLC, 4); prog.push_back(i);
    // B+7: loop body: ST R7,[R7]++ ; LOOP B+7
    i = nop(); i.st = mop(7, 7, 1); i.fl = flow(FL_LOOP, B + 7); prog.push_back(i);
    // B+8: JMP B+10
    i = nop(); i.fl = flow(FL_JMP, B + 10); prog.push_back(i);
    // B+9: LI R8 = 1 (skipped)
    i = nop(); i.fl = flow(FL_LI, 1, 8); prog.push_back(i);
    // B+10: STALL 5
    i = nop(); i.fl = flow(FL_STALL, 5); prog.push_back(i);
    // B+11: RCV
    i = nop(); i.net.op = NET_RCV; prog.push_back(i);
    // B+12: SNDI R1 via R20 (route), R21 (command)
    i = nop(); i.net.op = NET_SNDI; i.net.rs = 1; i.net.rh = 20; prog.push_back(i);
    // B+13: SND R2 via R24 (chained route R24, R25; command R26)
    i = nop(); i.net.op = NET_SND; i.net.rs = 2; i.net.rh = 24; prog.push_back(i);
    // B+14: NAP1
    i = nop(); i.sl.op = SL_NAP1; prog.push_back(i);
    // B+15: PESLEEP via R20
    i = nop(); i.sl.op = SL_PESLEEP; i.net.rh = 20; prog.push_back(i);
    // B+16: WAKE1 + HALT
    i = nop(); i.sl.op = SL_WAKE1; i.fl = flow(FL_HALT, 0); prog.push_back(i);
    // B+17: entry point for PEWAKE: LI R9 = 77 ; HALT
    i = nop(); i.fl = flow(FL_LI, 77, 9); prog.push_back(i);
    i = nop(); i.fl = flow(FL_HALT, 0); prog.push_back(i);
    load_prog();
    load_word(0, 32'h40000000);   // 2.0
    load_word(1, 32'h40400000);   // 3.0
    load_word(2, 32'h3f000000);   // 0.5
    load_word(3, 32'h8000_0012);                       // R20: lane 1, hops E, LOCAL
    load_word(4, {CMD_DMEM_WR, 28'd40});               // R21
    load_word(5, {2'b00, HOP_CHAIN, 27'h0492492});     // R24: nine hops, then chain
    load_word(6, 32'h0000_0003);                       // R25: rest of the route
    load_word(7, {CMD_DMEM_WR, 28'd50});               // R26

    // ---------------- run ----------------
    @(negedge clk); core_run = 1;
    // latency: edges from the issuing edge up to and including the
    // register write (the result is usable that many cycles after issue)
    wait (dut.pc == 8'(B)); @(negedge clk); t_issue = cyc;
    wait (dut.rf[1] == 32'h40000000); @(negedge clk);
    check(cyc - t_issue == 2, $sformatf("load latency %0d", cyc - t_issue));
    check(dut.rf[0] == 32'd3 || dut.rf[0] == 32'd2, "post increment");
    // FPU issue at pc 3
    wait (dut.pc == 8'(B + 3)); @(negedge clk); t_issue = cyc;
    wait (dut.rf[5] != 0); @(negedge clk);
    check(cyc - t_issue == 9, $sformatf("FPU latency %0d", cyc - t_issue));
    check(dut.rf[5] == 32'h40800000, "R5 = 2.0*2.0");
    wait (dut.rf[3] != 0); @(negedge clk);
    check(dut.rf[3] == 32'h40c80000, "R3 = 2*3 + 0.5*0.5 = 6.25");
    check(dut.rf[0] == 32'd3, "three post increments");
    // the core has run on meanwhile; it waits at RCV (B+11) for a packet
    wait (dut.pc == 8'(B + 11));
    repeat (12) @(posedge clk);
    #1 check(dut.pc == 8'(B + 11), "RCV waits for packet");
    // loop: 5 stores of R7 (100..104) at addresses 100..104
    for (int a = 100; a < 105; a++)
      check(dut.u_dmem.mem[a] == 32'(a), $sformatf("loop store %0d", a));
    check(dut.u_dmem.mem[105] != 32'd105 && dut.rf[7] == 32'd105, "loop ran 5 times");
    // from the pc trace: the loop body repeats at B+7, JMP goes from B+8 to
    // B+10 in one cycle, STALL 5 holds B+11 for five cycles with a running
    // stall counter before RCV starts waiting
    begin
      int k8, k11, nbody;
      k8 = -1; k11 = -1; nbody = 0;
      foreach (pc_tr[k]) begin
        if (pc_tr[k] == 8'(B + 7)) nbody++;
        if (pc_tr[k] == 8'(B + 8) && k8 < 0) k8 = k;
        if (pc_tr[k] == 8'(B + 11) && k11 < 0) k11 = k;
      end
      check(nbody == 5, $sformatf("loop body cycles %0d", nbody));
      check(k8 >= 0 && pc_tr[k8 + 1] == 8'(B + 10), "JMP next cycle");
      check(k11 == k8 + 2 && st_tr[k11] == 11'd5 && st_tr[k11 + 5] == 11'd0 &&
            st_tr[k11 + 4] == 11'd1, "STALL 5 counts five cycles");
    end
    // make the send queue refuse, then deliver a packet
    @(negedge clk); req_ready = 0; rx_pkt = 1; @(negedge clk); rx_pkt = 0;
    @(negedge clk);
    check(dut.pc == 8'(B + 12), "RCV done after packet");
    repeat (4) begin @(negedge clk); if (dut.pc == 8'(B + 12)) n_stall_cycles++; end
    check(n_stall_cycles == 4 && n_req == 0, "send stalls while queue full");
    req_ready = 1;
    @(negedge clk);
    check(n_req == 1 && seen_route == 32'h8000_0012 && seen_cmd == {CMD_DMEM_WR, 28'd40} &&
          seen_data == 32'h40000000 && seen_hd && !seen_r2, "SNDI request");
    @(negedge clk);
    check(dut.rf[21] == {CMD_DMEM_WR, 28'd41}, "SNDI increments command");
    check(n_req == 2 && seen_r2 && seen_route2 == 32'h3 && seen_cmd == {CMD_DMEM_WR, 28'd50} &&
          seen_data == 32'h40400000, "SND with chained route");
    // NAP1, PESLEEP, WAKE1 + HALT
    check(nap == 2'b10 && wake == 2'b00, "NAP1 output");
    @(negedge clk);
    check(wake == 2'b00 && req_valid && req_cmd[31:28] == CMD_PESLEEP && !req_has_data &&
          req_route == 32'h8000_0012, "PESLEEP request");
    @(negedge clk);
    check(halt && wake == 2'b10, "WAKE1 and HALT outputs");
    repeat (3) @(negedge clk);
    check(dut.pc == 8'(B + 16), "halted pc holds");
    // PEWAKE restarts at 17
    core_run = 0; wake_pc = 8'(B + 17); pewake = 1; @(negedge clk); pewake = 0; core_run = 1;
    repeat (3) @(negedge clk);
    check(dut.rf[9] == 32'd77 && dut.pc == 8'(B + 18), "PEWAKE restart at wake_pc");
    check(dut.rf[8] == 32'd0, "skipped instruction not executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
