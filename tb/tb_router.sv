// tb_router: self-checking test of the five-port two-lane wormhole router.
//
// Part 1 sends one packet through an idle router and checks the 5-cycle
// fall-through latency and the route shift of the head flit. Part 2 sends a
// packet whose first route flit is a chain marker and checks that the next
// flit becomes the head. Part 3 runs random traffic: every input sends
// packets of 1..6 flits on both lanes to random outputs, honouring its on/off
// stop bits, while the outputs raise their stop bits at random. Every flit is
// tagged with its packet number and index, so the checker can verify that
// each packet arrives whole, in order, unmixed on its output lane, at the
// output its route named, and that no flit leaves on a lane held stopped for
// three cycles. Part 4 disables a port. Counts of lane and port conflicts,
// stops and activity are reported; each must have happened.
module tb_router;
  import polaris_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NPORTS-1:0] port_en;
  flit_t             in_flit  [NPORTS];
  logic [NLANES-1:0] in_stop  [NPORTS];
  flit_t             out_flit [NPORTS];
  logic [NLANES-1:0] out_stop [NPORTS];
  logic [NPORTS-1:0] port_active;

  int checks = 0, failures = 0;
  longint cyc = 0;

  router dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  // ---------------- traffic sources ----------------
  flit_t src_q [NPORTS][NLANES][$];
  int    pkt_dest[int];
  int    pkt_lane[int];
  int    pkt_len[int];
  int    delivered = 0, sent_pkts = 0;
  bit    random_stops = 0;
  int    n_stop_seen = 0, n_lane_conflict = 0, n_port_conflict = 0, n_active = 0;

  task automatic make_packet(input int src, input int lane, input int dst, input int len, input int id);
    flit_t f;
    f = FLIT_IDLE;
    f.valid = 1; f.head = 1; f.lane = 1'(lane); f.tail = (len == 1);
    f.data  = (32'(id) << 3) | 32'(dst);
    src_q[src][lane].push_back(f);
    for (int i = 1; i < len; i++) begin
      f.head = 0; f.tail = (i == len - 1);
      f.data = {12'(id), 20'(i)};
      src_q[src][lane].push_back(f);
    end
    pkt_dest[id] = dst; pkt_lane[id] = lane; pkt_len[id] = len;
    sent_pkts++;
  endtask

  // drive inputs: one flit per port per cycle, lanes alternating
  bit lane_pick [NPORTS];
  always @(posedge clk) begin
    #1;
    for (int p = 0; p < int'(NPORTS); p++) begin
      int l;
      in_flit[p] = FLIT_IDLE;
      l = -1;
      if (src_q[p][lane_pick[p]].size() != 0 && !in_stop[p][lane_pick[p]]) l = lane_pick[p];
      else if (src_q[p][!lane_pick[p]].size() != 0 && !in_stop[p][!lane_pick[p]]) l = !lane_pick[p];
      if (in_stop[p] != 0 && port_en[p]) n_stop_seen++;
      if (l >= 0) begin
        in_flit[p] = src_q[p][l].pop_front();
        lane_pick[p] = !lane_pick[p];
      end
    end
    for (int o = 0; o < int'(NPORTS); o++)
      out_stop[o] = random_stops ? NLANES'($urandom % 4 == 0 ? $urandom : 0) : '0;
  end

  // ---------------- checker ----------------
  int cur_id  [NPORTS][NLANES];
  int cur_idx [NPORTS][NLANES];
  logic [NLANES-1:0] stop_h1 [NPORTS], stop_h2 [NPORTS], stop_h3 [NPORTS];

  always @(posedge clk) begin
    if (rst_n) begin
      if (port_active != 0) n_active++;
      // conflicts visible at arbitration
      for (int p = 0; p < int'(NPORTS); p++)
        if (dut.elig[p][0] && dut.elig[p][1]) n_lane_conflict++;
      for (int a = 0; a < int'(NPORTS); a++)
        for (int b = a + 1; b < int'(NPORTS); b++)
          if (dut.in_req[a] && dut.in_req[b] && dut.in_out[a] == dut.in_out[b]) n_port_conflict++;
      for (int o = 0; o < int'(NPORTS); o++) begin
        flit_t f;
        f = out_flit[o];
        if (f.valid) begin
          int l;
          l = f.lane;
          check(!(stop_h1[o][l] && stop_h2[o][l] && stop_h3[o][l]), "flit sent on a stopped lane");
          if (f.head) begin
            int id;
            id = int'(f.data);
            check(cur_idx[o][l] == 0, "head inside a packet");
            check(pkt_dest.exists(id) && pkt_dest[id] == o && pkt_lane[id] == l, "head at wrong output/lane");
            cur_id[o][l] = id;
            if (pkt_len.exists(id) && pkt_len[id] == 1) begin
              check(f.tail, "single-flit tail"); delivered++; cur_idx[o][l] = 0;
            end else cur_idx[o][l] = 1;
          end else begin
            check(cur_idx[o][l] != 0, "body without head");
            check(f.data == {12'(cur_id[o][l]), 20'(cur_idx[o][l])}, "body flit data/order");
            if (f.tail) begin
              check(pkt_len[cur_id[o][l]] == cur_idx[o][l] + 1, "tail position");
              delivered++; cur_idx[o][l] = 0;
            end else cur_idx[o][l]++;
          end
        end
        stop_h3[o] <= stop_h2[o]; stop_h2[o] <= stop_h1[o]; stop_h1[o] <= out_stop[o];
      end
    end
  end

  initial begin
    int id;
    longint t0, t1;
    port_en = '1;
    for (int p = 0; p < int'(NPORTS); p++) begin
      in_flit[p] = FLIT_IDLE; out_stop[p] = '0; lane_pick[p] = 0;
      stop_h1[p] = 0; stop_h2[p] = 0; stop_h3[p] = 0;
      for (int l = 0; l < int'(NLANES); l++) begin cur_id[p][l] = 0; cur_idx[p][l] = 0; end
    end
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // Part 1: latency, west input to east output, 3 flits
    id = 1;
    make_packet(P_WEST, 0, P_EAST, 3, id);
    #2;
    t0 = cyc;                               // head is on the input wire now
    while (!out_flit[P_EAST].valid) begin @(posedge clk); #2; end
    t1 = cyc;
    check(t1 - t0 == 5, $sformatf("fall-through latency %0d", t1 - t0));
    repeat (10) @(posedge clk);
    check(delivered == 1, "latency packet delivered");

    // Part 2: chained route: first route flit is all chain markers
    begin
      flit_t f;
      f = FLIT_IDLE; f.valid = 1; f.head = 1; f.lane = 1;
      f.data = 32'hffff_ffff;               // hop 0 = 7: continue in next flit
      src_q[P_NORTH][1].push_back(f);
      f.head = 0; f.data = (32'd2 << 3) | 32'(P_SOUTH);
      src_q[P_NORTH][1].push_back(f);
      f.tail = 1; f.data = {12'd2, 20'd1};
      src_q[P_NORTH][1].push_back(f);
      pkt_dest[2] = P_SOUTH; pkt_lane[2] = 1; pkt_len[2] = 2; sent_pkts++;
    end
    repeat (20) @(posedge clk);
    check(delivered == 2, "chained-header packet delivered");

    // Part 3: random traffic with random downstream stops
    random_stops = 1;
    id = 10;
    for (int n = 0; n < 600; n++) begin
      int s, d, l;
      s = $urandom % NPORTS;
      d = $urandom % NPORTS;
      l = $urandom % NLANES;
      make_packet(s, l, d, 1 + ($urandom % 6), id);
      id++;
    end
    while (delivered != sent_pkts && cyc < 40000) @(posedge clk);
    random_stops = 0;
    repeat (20) @(posedge clk);
    check(delivered == sent_pkts, $sformatf("all packets delivered %0d/%0d", delivered, sent_pkts));

    // Part 4: disabled port refuses traffic and is never granted
    port_en[P_SOUTH] = 1'b0;
    repeat (3) @(posedge clk); #2;
    check(in_stop[P_SOUTH] == 2'b11, "disabled port asserts stop");
    make_packet(P_EAST, 0, P_SOUTH, 2, id);
    repeat (30) @(posedge clk);
    check(!out_flit[P_SOUTH].valid && delivered == sent_pkts - 1, "no traffic to disabled port");
    port_en[P_SOUTH] = 1'b1;
    repeat (30) @(posedge clk);
    check(delivered == sent_pkts, "traffic resumes after port enable");

    check(n_stop_seen > 0, "on/off stop happened");
    check(n_lane_conflict > 0, "lane arbitration conflict happened");
    check(n_port_conflict > 0, "port arbitration conflict happened");
    check(n_active > 0, "port activity seen");
    $display("stops=%0d lane_conflicts=%0d port_conflicts=%0d", n_stop_seen, n_lane_conflict, n_port_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
