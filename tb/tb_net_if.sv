// tb_net_if: self-checking test of the engine's network interface.
// Receive side: random DMEM-write packets (one per lane, flits of the two
// lanes interleaved), an IMEM-write packet of two instructions, PESLEEP and
// PEWAKE packets; the memory writes and event pulses are compared with what
// the packets say. Send side: random requests with and without a second
// route word and data word, the flit sequence on the router wire compared
// with the expected packet, lane taken from route bit 31, the 2-cycle
// request-to-head-flit latency, holding while the lane's stop bit is high,
// and req_ready falling when the request queue is full.
module tb_net_if;
  import polaris_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst_n;
  flit_t ej_flit, inj_flit;
  logic [NLANES-1:0] ej_stop, inj_stop;
  logic dm_we, im_we, rx_pkt, pesleep, pewake;
  logic [8:0] dm_addr;
  logic [31:0] dm_wdata;
  logic [7:0] im_addr, wake_pc;
  logic [95:0] im_wdata;
  logic req_valid, req_ready, req_has_route2, req_has_data;
  logic [31:0] req_route, req_route2, req_cmd, req_data;
  int checks = 0, failures = 0;
  int cyc = 0;

  net_if dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // receive monitors
  logic [31:0] dm_seen [int];
  logic [95:0] im_seen [int];
  int n_rx_pkt = 0, n_pesleep = 0, n_pewake = 0;
  logic [7:0] last_wake_pc;
  always @(posedge clk) if (rst_n) begin
    if (dm_we) dm_seen[int'(dm_addr)] = dm_wdata;
    if (im_we) im_seen[int'(im_addr)] = im_wdata;
    if (rx_pkt) n_rx_pkt++;
    if (pesleep) n_pesleep++;
    if (pewake) begin n_pewake++; last_wake_pc = wake_pc; end
  end

  // send monitor: flits on the router wire
  flit_t inj_seen [$];
  int    inj_cyc [$];
  // (read at an edge, inj_flit still holds what the previous edge decided,
  // with the stop bits as they were then)
  logic [NLANES-1:0] stop_prev = '1;
  int n_stop_held = 0;
  always @(posedge clk) begin
    if (rst_n && inj_flit.valid) begin
      inj_seen.push_back(inj_flit); inj_cyc.push_back(cyc);
      check(!stop_prev[inj_flit.lane], "no flit on a stopped lane");
    end
    if (rst_n && !inj_flit.valid && stop_prev != '0 && dut.q_cnt != '0) n_stop_held++;
    stop_prev = inj_stop;
  end

  logic [31:0] exp_dm [int];
  flit_t q [$], q0 [$], q1 [$];

  task automatic send_flits(ref flit_t fq[$]);
    foreach (fq[k]) begin
      @(negedge clk); ej_flit = fq[k];
    end
    @(negedge clk); ej_flit = FLIT_IDLE;
  endtask

  initial begin
    word_q_t d;
    rst_n = 1; #1 rst_n = 0;
    ej_flit = FLIT_IDLE; inj_stop = '0; req_valid = 0;
    req_route = 0; req_route2 = 0; req_cmd = 0; req_data = 0; req_has_route2 = 0; req_has_data = 0;
    #11 rst_n = 1;
    @(negedge clk);
    check(ej_stop == '0, "receive never stops");

    // ---- DMEM packets on both lanes, interleaved flit by flit
    for (int rep = 0; rep < 20; rep++) begin
      int base0, base1, n0, n1;
      q0.delete(); q1.delete();
      base0 = 24 * rep; base1 = 24 * rep + 12;
      n0 = 1 + int'($urandom % 12); n1 = 1 + int'($urandom % 12);
      d.delete();
      for (int k = 0; k < n0; k++) begin d.push_back($urandom); exp_dm[base0 + k] = d[k]; end
      packet(q0, '{32'h0}, {CMD_DMEM_WR, 28'(base0)}, d, 1'b0);
      d.delete();
      for (int k = 0; k < n1; k++) begin d.push_back($urandom); exp_dm[base1 + k] = d[k]; end
      packet(q1, '{32'h0}, {CMD_DMEM_WR, 28'(base1)}, d, 1'b1);
      q.delete();
      while (q0.size() != 0 || q1.size() != 0) begin
        if (q0.size() != 0 && (q1.size() == 0 || $urandom % 2 == 0)) q.push_back(q0.pop_front());
        else if (q1.size() != 0) q.push_back(q1.pop_front());
        if ($urandom % 3 == 0) q.push_back(FLIT_IDLE);
      end
      send_flits(q);
    end
    repeat (2) @(negedge clk);
    begin
      automatic int bad = 0;
      foreach (exp_dm[a]) if (!dm_seen.exists(a) || dm_seen[a] != exp_dm[a]) bad++;
      check(bad == 0 && dm_seen.size() == exp_dm.size(), $sformatf("DMEM writes (%0d wrong)", bad));
    end
    check(n_rx_pkt == 40, $sformatf("rx_pkt per data packet %0d", n_rx_pkt));

    // ---- IMEM packet: two instructions at 5 and 6, low word first
    d = '{32'h11111111, 32'h22222222, 32'h33333333, 32'h44444444, 32'h55555555, 32'h66666666};
    q.delete();
    packet(q, '{32'h0}, {CMD_IMEM_WR, 28'd5}, d, 1'b0);
    send_flits(q);
    @(negedge clk);
    check(im_seen.exists(5) && im_seen[5] == 96'h333333332222222211111111, "IMEM word 5");
    check(im_seen.exists(6) && im_seen[6] == 96'h666666665555555544444444, "IMEM word 6");
    check(n_rx_pkt == 40, "no rx_pkt for IMEM packet");

    // ---- PESLEEP / PEWAKE
    q.delete(); d.delete();
    packet(q, '{32'h0}, {CMD_PESLEEP, 28'd0}, d, 1'b1);
    send_flits(q);
    q.delete();
    packet(q, '{32'h0}, {CMD_PEWAKE, 28'd42}, d, 1'b0);
    send_flits(q);
    @(negedge clk);
    check(n_pesleep == 1 && n_pewake == 1 && last_wake_pc == 8'd42, "PESLEEP and PEWAKE");

    // ---- send side: latency of a single request
    inj_seen.delete(); inj_cyc.delete();
    begin
      automatic int t0;
      @(negedge clk);
      req_valid = 1; req_route = 32'h8000_0012; req_has_route2 = 0; req_cmd = {CMD_DMEM_WR, 28'd7};
      req_data = 32'hcafe_f00d; req_has_data = 1; t0 = cyc;
      @(negedge clk); req_valid = 0;
      repeat (6) @(negedge clk);
      check(inj_seen.size() == 3, "three flits");
      check(inj_cyc[0] - t0 == 2, $sformatf("send latency %0d", inj_cyc[0] - t0));
      check(inj_seen[0].head && !inj_seen[0].tail && inj_seen[0].lane && inj_seen[0].data == 32'h12 &&
            !inj_seen[1].head && inj_seen[1].data == {CMD_DMEM_WR, 28'd7} &&
            inj_seen[2].tail && inj_seen[2].data == 32'hcafe_f00d && inj_seen[2].lane,
            "packet contents, lane 1, bit 31 cleared");
    end

    // ---- send side: random requests, queue full, stop bits
    begin
      automatic flit_t expq [$];
      automatic int n_full = 0;
      inj_seen.delete();
      fork
        begin
          for (int k = 0; k < 60; k++) begin
            automatic word_q_t r, dd;
            logic ln, two, hd;
            logic [31:0] ro, ro2, cm, da;
            ln = 1'($urandom); two = 1'($urandom); hd = 1'($urandom);
            ro = {ln, 1'b0, 30'($urandom)}; ro2 = {2'b00, 30'($urandom)};
            cm = $urandom; da = $urandom;
            @(negedge clk);
            while (!req_ready) begin n_full++; @(negedge clk); end
            req_valid = 1; req_route = ro; req_has_route2 = two; req_route2 = ro2;
            req_cmd = cm; req_data = da; req_has_data = hd;
            r.push_back({2'b00, ro[29:0]});
            if (two) r.push_back(ro2);
            if (hd) dd.push_back(da);
            packet(expq, r, cm, dd, ln);
            @(negedge clk); req_valid = 0;
          end
        end
        begin
          repeat (400) begin
            @(negedge clk); inj_stop = 2'($urandom % 4 == 0 ? 2'b11 : 2'($urandom % 2));
          end
          inj_stop = '0;
        end
      join
      repeat (300) @(negedge clk);
      check(inj_seen.size() == expq.size(), $sformatf("flit count %0d of %0d", inj_seen.size(), expq.size()));
      begin
        automatic int bad = 0;
        foreach (expq[k]) if (k < inj_seen.size() && inj_seen[k] != expq[k]) bad++;
        check(bad == 0, $sformatf("flit sequence (%0d wrong)", bad));
      end
      check(n_full > 0, "queue full seen");
      check(n_stop_held > 0, "stop held a flit back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
