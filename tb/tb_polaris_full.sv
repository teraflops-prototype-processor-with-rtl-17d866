// tb_polaris_full: end-to-end test of the mesh processor at its full size,
// 8 x 10 tiles, with every parameter of the top at its default. Otherwise the
// same test as tb_polaris_top.
//
// Every tile gets its own clock phase (mesochronous clocking). From the host
// port the testbench loads every tile's instruction memory and data memory
// with write packets and starts the cores with PEWAKE packets, except tile 1,
// which tile 0 wakes by a PEWAKE packet of its own. Each tile runs a
// weighted-sum kernel (the spreadsheet kernel: sum of x[i]*w[i]) on both
// FPMACs, combines the two partial sums and sends the result to the host.
// Tile 0 then spins until tile 1, after sending its result, puts it to sleep
// with a PESLEEP packet. The checks:
//   * every tile's result against a double-precision reference;
//   * the number of FPU operations issued against the program's count;
//   * tile 0 asleep at the end, all other cores halted;
//   * the static scan chain: a pattern shifted through all tiles comes out
//     unchanged, and its update puts every core to sleep.
// Each mechanism must have happened at least once: wait for data (RCV), the
// STALL instruction, FPMAC nap, PE-to-PE wake and sleep, chained routes,
// on/off flow-control stops, lane and port arbitration conflicts, router port
// activity gating, static scan sleep.
module tb_polaris_full;
  import polaris_pkg::*;
  import tb_util_pkg::*;

  localparam int COLS = 8;
  localparam int ROWS = 10;
  localparam int NT   = COLS * ROWS;
  localparam int N    = 32;          // vector length per tile (even)
  localparam longint WATCHDOG = 400000;

  logic              clk [NT];
  logic              rst_n = 1'b0;
  flit_t             host_in_flit;
  logic [NLANES-1:0] host_in_stop;
  flit_t             host_out_flit;
  logic [NLANES-1:0] host_out_stop;
  logic              scan_clk = 1'b0, scan_en = 1'b0, scan_in = 1'b0, scan_update = 1'b0;
  logic              scan_out;
  logic [NT-1:0]     core_run;
  logic [7:0]        sleep_region [NT];
  logic [1:0]        fpu_issue    [NT];

  polaris_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // mesochronous clocks: same period, phase step per tile
  logic [NT-1:0] clkv;
  for (genvar t = 0; t < NT; t++) begin : g_clk
    initial begin
      clkv[t] = 1'b0;
      #((t * 7) % 10);
      forever #5 clkv[t] = ~clkv[t];
    end
    assign clk[t] = clkv[t];
  end

  longint cyc = 0;
  always @(posedge clk[0]) cyc <= cyc + 1;

  // ---------------- host port ----------------
  flit_t host_q[$];
  always @(posedge clk[0]) begin
    #1;
    host_in_flit = FLIT_IDLE;
    if (rst_n && host_q.size() != 0 && !host_in_stop[host_q[0].lane])
      host_in_flit = host_q.pop_front();
  end

  logic [31:0] result [NT];
  bit          got    [NT];
  int          rx_idx [NLANES];
  logic [31:0] rx_cmd [NLANES];
  int          n_results = 0;
  always @(posedge clk[0]) begin
    if (rst_n && host_out_flit.valid) begin
      automatic int l = host_out_flit.lane;
      if (host_out_flit.head) rx_idx[l] = 0;
      else begin
        rx_idx[l]++;
        if (rx_idx[l] == 1) rx_cmd[l] = host_out_flit.data;
        else if (rx_idx[l] == 2) begin
          automatic int t = int'(rx_cmd[l][27:0]);
          if (t < NT) begin result[t] = host_out_flit.data; got[t] = 1; n_results++; end
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_rcv_wait = 0, n_stall = 0, n_nap = 0, n_chain = 0, n_stop = 0;
  int n_lane_conf = 0, n_port_conf = 0, n_port_idle = 0, n_pe_wake = 0, n_pe_sleep = 0;
  longint n_fpu_ops = 0;

  for (genvar t = 0; t < NT; t++) begin : g_mon
    always @(posedge clkv[t]) begin
      if (rst_n) begin
        if (dut.g_tile[t].u_tile.u_pe.core_run && !dut.g_tile[t].u_tile.u_pe.exec) begin
          if (dut.g_tile[t].u_tile.u_pe.rx_take && dut.g_tile[t].u_tile.u_pe.rx_cnt == 0) n_rcv_wait++;
          if (dut.g_tile[t].u_tile.u_pe.stall_cnt != 0) n_stall++;
        end
        if (core_run[t] && sleep_region[t][1]) n_nap++;
        n_fpu_ops += int'(fpu_issue[t][0]) + int'(fpu_issue[t][1]);
        if (dut.g_tile[t].u_tile.pesleep && t == 0) n_pe_sleep++;
        if (dut.g_tile[t].u_tile.pewake && t == 1) n_pe_wake++;
        if (sleep_region[t][7:3] != 5'h1f) n_port_idle++;
        for (int p = 0; p < NPORTS; p++) begin
          for (int l = 0; l < NLANES; l++)
            if (dut.g_tile[t].u_tile.u_router.q_drop[p][l] && dut.g_tile[t].u_tile.u_router.pend_load[p][l]) n_chain++;
          if (dut.g_tile[t].u_tile.u_router.in_stop[p] != 0 && dut.g_tile[t].u_tile.u_router.port_en[p] && p != 0) n_stop++;
          if (dut.g_tile[t].u_tile.u_router.elig[p][0] && dut.g_tile[t].u_tile.u_router.elig[p][1]) n_lane_conf++;
        end
        for (int a = 0; a < NPORTS; a++)
          for (int b = a + 1; b < NPORTS; b++)
            if (dut.g_tile[t].u_tile.u_router.in_req[a] && dut.g_tile[t].u_tile.u_router.in_req[b] &&
                dut.g_tile[t].u_tile.u_router.in_out[a] == dut.g_tile[t].u_tile.u_router.in_out[b]) n_port_conf++;
      end
    end
  end

  // ---------------- program ----------------
  // kind 0: tile 0 (wakes tile 1, then spins), 1: tile 1 (sleeps tile 0), 2: others
  function automatic void build_prog(ref instr_t p[$], input int kind);
    instr_t i;
    p.delete();
    i = nop(); i.net.op = NET_RCV; i.sl.op = SL_NAP1;          p.push_back(i); // 0
    i = nop(); i.fl = flow(FL_LI, 0, 5'd1);                    p.push_back(i); // 1
    i = nop(); i.fl = flow(FL_LI, 64, 5'd2);                   p.push_back(i); // 2
    i = nop(); i.fl = flow(FL_LI, 128, 5'd11);                 p.push_back(i); // 3
    i = nop(); i.ld = mop(5'd10, 5'd11, 1);                    p.push_back(i); // 4
    i = nop(); i.ld = mop(5'd20, 5'd11, 1);                    p.push_back(i); // 5
    i = nop(); i.ld = mop(5'd21, 5'd11, 1);                    p.push_back(i); // 6
    i = nop(); i.ld = mop(5'd22, 5'd11, 1);                    p.push_back(i); // 7
    i = nop(); i.ld = mop(5'd24, 5'd11, 1);                    p.push_back(i); // 8
    i = nop(); i.ld = mop(5'd25, 5'd11, 1);                    p.push_back(i); // 9
    i = nop(); i.ld = mop(5'd26, 5'd11, 1); i.fpu0 = fpu(0, 0, 1, 0, 0);
               i.sl.op = SL_WAKE1;                             p.push_back(i); // 10
    i = nop(); i.fpu1 = fpu(0, 0, 1, 0, 0); i.fl = flow(FL_SETLC, N/2 - 1); p.push_back(i); // 11
    i = nop(); i.ld = mop(5'd3, 5'd1, 1);                      p.push_back(i); // 12
    i = nop(); i.ld = mop(5'd4, 5'd2, 1);                      p.push_back(i); // 13
    i = nop(); i.ld = mop(5'd5, 5'd1, 1);                      p.push_back(i); // 14
    i = nop(); i.ld = mop(5'd6, 5'd2, 1); i.fpu0 = fpu(3, 4, 0, 0, 0); p.push_back(i); // 15
    i = nop();                                                 p.push_back(i); // 16
    i = nop(); i.fpu1 = fpu(5, 6, 0, 0, 0); i.fl = flow(FL_LOOP, 12); p.push_back(i); // 17
    i = nop(); i.fpu0 = fpu(0, 0, 0, 1, 7); i.fpu1 = fpu(0, 0, 0, 1, 8);
               i.fl = flow(FL_STALL, 9);                       p.push_back(i); // 18
    i = nop(); i.fpu0 = fpu(7, 10, 1, 0, 0);                   p.push_back(i); // 19
    i = nop(); i.fpu0 = fpu(8, 10, 0, 1, 9); i.fl = flow(FL_STALL, 9); p.push_back(i); // 20
    i = nop(); i.net.op = NET_SND; i.net.rs = 5'd9; i.net.rh = 5'd20; p.push_back(i); // 21
    i = nop(); i.net.rh = 5'd24;
    if (kind == 0) i.sl.op = SL_PEWAKE;
    if (kind == 1) i.sl.op = SL_PESLEEP;
    p.push_back(i);                                                            // 22
    i = nop();
    if (kind == 0) i.fl = flow(FL_JMP, 23); else i.fl = flow(FL_HALT, 0);
    p.push_back(i);                                                            // 23
  endfunction

  // registers R[base], R[base+1], R[base+2] for route (1 or 2 words) + command
  function automatic void put_route(ref logic [31:0] d[$], input word_q_t r, input logic [31:0] cmd,
                                    input logic lane);
    logic [31:0] w0;
    w0 = r[0];
    w0[31] = lane;
    d.push_back(w0);
    if (r.size() > 1) d.push_back(r[1]);
    d.push_back(cmd);
    if (r.size() == 1) d.push_back(32'd0);
  endfunction

  real expect_sum [NT];
  real expect_mag [NT];

  initial begin
    instr_t prog[$];
    host_in_flit = FLIT_IDLE;
    host_out_stop = '0;
    for (int t = 0; t < NT; t++) begin got[t] = 0; result[t] = '0; end
    for (int l = 0; l < NLANES; l++) begin rx_idx[l] = 0; rx_cmd[l] = '0; end
    repeat (4) @(posedge clk[0]);
    // the scan registers act only on scan_clk edges in this two-state
    // simulation: give them two during reset
    #3 scan_clk = 1; #3 scan_clk = 0; #3 scan_clk = 1; #3 scan_clk = 0;
    @(posedge clk[0]);
    rst_n = 1'b1;
    repeat (4) @(posedge clk[0]);

    // load every tile
    for (int t = 0; t < NT; t++) begin
      int x, y;
      word_q_t d, r;
      logic [31:0] dm[$];
      x = t % COLS; y = t / COLS;
      build_prog(prog, (t == 0) ? 0 : (t == 1) ? 1 : 2);
      d.delete();
      foreach (prog[k]) begin
        logic [95:0] w;
        w = 96'(prog[k]);
        d.push_back(w[31:0]); d.push_back(w[63:32]); d.push_back(w[95:64]);
      end
      packet(host_q, host_to_tile(x, y, t == 2), {CMD_IMEM_WR, 28'd0}, d, 1'b0);
      if (t != 1) begin
        d.delete();
        packet(host_q, host_to_tile(x, y), {CMD_PEWAKE, 28'd0}, d, 1'b0);
      end
      // data: x at 0.., w at 64.., constants and routes at 128..
      dm.delete();
      expect_sum[t] = 0.0; expect_mag[t] = 0.0;
      for (int k = 0; k < 128; k++) dm.push_back(32'd0);
      for (int k = 0; k < N; k++) begin
        dm[k]      = rnd_float(120, 12);
        dm[64 + k] = rnd_float(120, 12);
        expect_sum[t] += f2r(dm[k]) * f2r(dm[64 + k]);
        expect_mag[t] += (f2r(dm[k]) * f2r(dm[64 + k]) < 0) ? -f2r(dm[k]) * f2r(dm[64 + k])
                                                            :  f2r(dm[k]) * f2r(dm[64 + k]);
      end
      dm.push_back(32'h3f80_0000);                               // 128: 1.0
      put_route(dm, tile_to_host(x, y), {CMD_DMEM_WR, 28'(t)}, 1'b1);   // 129..131
      if (t == 0) put_route(dm, tile_to_tile(0, 0, 1 % COLS, 1 / COLS), {CMD_PEWAKE, 28'd0}, 1'b0);
      else        put_route(dm, tile_to_tile(x, y, 0, 0), {CMD_PESLEEP, 28'd0}, 1'b0);
      d.delete();
      foreach (dm[k]) d.push_back(dm[k]);
      packet(host_q, host_to_tile(x, y), {CMD_DMEM_WR, 28'd0}, d, 1'b1);
    end

    // run until every result is back and tile 0 has been put to sleep
    while ((n_results < NT || core_run != '0) && cyc < WATCHDOG - 1000) @(posedge clk[0]);
    repeat (20) @(posedge clk[0]);

    for (int t = 0; t < NT; t++) begin
      real g, e;
      g = f2r(result[t]);
      e = g - expect_sum[t]; if (e < 0) e = -e;
      check(got[t], $sformatf("tile %0d result received", t));
      check(e <= expect_mag[t] * 1.0e-6, $sformatf("tile %0d result %g expected %g", t, g, expect_sum[t]));
    end
    check(n_fpu_ops == NT * (N + 6), $sformatf("FPU operations %0d expected %0d", n_fpu_ops, NT * (N + 6)));
    check(core_run == '0, "all cores halted or asleep");

    // static sleep through the scan chain: shift a pattern that puts every
    // core to sleep, check it comes out unchanged after a full pass
    begin
      logic [7:0] pat [NT];
      bit out_bits[$];
      for (int t = 0; t < NT; t++) pat[t] = 8'h01 | 8'(($urandom & 8'h06));
      // tile NT-1's bits enter first; bit 0 of each tile enters last
      for (int t = NT - 1; t >= 0; t--)
        for (int b = 0; b < 8; b++) begin
          scan_in = pat[t][b]; scan_en = 1;
          #3 scan_clk = 1; #3 scan_clk = 0;
        end
      scan_en = 0;
      #3 scan_update = 1; #3 scan_clk = 1; #3 scan_clk = 0; scan_update = 0;
      repeat (3) @(posedge clk[0]);
      for (int t = 0; t < NT; t++) begin
        check(sleep_region[t][2] == 1'b1, $sformatf("tile %0d core statically asleep", t));
        check(sleep_region[t][1:0] == (pat[t][2:1] | 2'b11 & {2{pat[t][0]}}), $sformatf("tile %0d fpmac static sleep", t));
      end
      // shift once more with zeros: the pattern comes out of the last tile
      for (int k = 0; k < NT * 8; k++) begin
        out_bits.push_back(scan_out);
        scan_in = 0; scan_en = 1;
        #3 scan_clk = 1; #3 scan_clk = 0;
      end
      scan_en = 0;
      for (int k = 0; k < NT * 8; k++)
        check(out_bits[k] == pat[NT - 1 - k / 8][k % 8], "scan chain bit order");
    end

    $display("fpu_ops=%0d flops=%0d rcv_wait=%0d stall=%0d nap=%0d pe_wake=%0d pe_sleep=%0d chain=%0d stop=%0d lane_conf=%0d port_conf=%0d port_idle=%0d",
             n_fpu_ops, 2 * n_fpu_ops, n_rcv_wait, n_stall, n_nap, n_pe_wake, n_pe_sleep, n_chain,
             n_stop, n_lane_conf, n_port_conf, n_port_idle);
    check(n_rcv_wait > 0, "wait for data happened");
    check(n_stall > 0, "STALL happened");
    check(n_nap > 0, "FPMAC nap happened");
    check(n_pe_wake > 0, "PE-to-PE wake happened");
    check(n_pe_sleep > 0, "PE-to-PE sleep happened");
    check(n_chain > 0, "chained route happened");
    check(n_stop > 0, "on/off stop happened");
    check(n_lane_conf > 0, "lane conflict happened");
    check(n_port_conf > 0, "port conflict happened");
    check(n_port_idle > 0, "idle port gating happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(WATCHDOG * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
