// router: five-port, two-lane, input-buffered wormhole router of one tile.
//
// Ports 0..4 are local (the processing engine), north, east, south, west.
// Routing is source directed: the head flit of a packet carries the whole
// path as 3-bit hop codes; each router uses the lowest hop as its output port
// and shifts the route right by three bits before forwarding the head. A hop
// code of 7 (HOP_CHAIN) means the route continues in the next flit: that
// head flit is dropped and the next flit becomes the head, so paths longer
// than ten hops are possible. Body flits follow the output latched by their
// head (wormhole), and the output lane stays reserved for the packet from its
// head to its tail flit. A packet keeps its lane number along its whole path.
//
// Pipeline, five stages from input wire to output wire (the fall-through
// latency of the design description):
//   1 input latch      flit registered from the link
//   2 buffer write     written into the queue of its lane (16 entries)
//   3 buffer read / route: the queue head moves into a per-lane stage
//                      register, the head's hop is decoded
//   4 arbitration      two phases, distributed: every input port first picks
//                      one of its two lanes (lane arbitration, because the
//                      lanes share one crossbar input), then every output port
//                      picks one of the inputs that want it (port
//                      arbitration); both rotate priority
//   5 switch traversal the winner crosses the shared 5x5 crossbar into the
//                      output register that drives the link
// Flow control is on/off per lane: `in_stop[p][l]` is raised while the lane's
// queue holds QUEUE_ON or more flits, leaving room for the flits still in
// flight over the round trip; an output lane is not granted while its
// `out_stop` is high.
//
// Power management: `port_en[p]` is the static per-port enable (set through
// the scan chain); a disabled port takes no flits, asserts stop on both lanes
// and is never granted. `port_active[p]` is the activity signal of a port: high
// while anything is queued or arriving. The queues of a port only change
// state while it is high, so it is the clock enable a clock gate and the queue
// sleep transistors would use; here it is an output.
//
// The double-pumped crossbar of the design (dual-edge flip-flops on
// alternate data bits, halving the crossbar wires) is a circuit technique;
// this RTL uses a full-width single-edge crossbar with the same function.
module router
  import polaris_pkg::*;
#(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned QUEUE_ON = 6     // stop threshold (occupancy)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NPORTS-1:0]       port_en,
  input  flit_t                   in_flit  [NPORTS],
  output logic  [NLANES-1:0]      in_stop  [NPORTS],
  output flit_t                   out_flit [NPORTS],
  input  logic  [NLANES-1:0]      out_stop [NPORTS],
  output logic [NPORTS-1:0]       port_active
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  // ---------------- stage 1: input latch ----------------
  flit_t in_reg [NPORTS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(NPORTS); p++) in_reg[p] <= FLIT_IDLE;
    end else begin
      for (int p = 0; p < int'(NPORTS); p++)
        in_reg[p] <= port_en[p] ? in_flit[p] : FLIT_IDLE;
    end
  end

  // ---------------- stage 2: lane queues ----------------
  flit_t           q_dout  [NPORTS][NLANES];
  logic            q_empty [NPORTS][NLANES];
  logic [CW-1:0]   q_count [NPORTS][NLANES];
  logic            q_pop   [NPORTS][NLANES];

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
    for (genvar l = 0; l < int'(NLANES); l++) begin : g_lane
      lane_fifo #(.DEPTH(DEPTH)) u_q (
        .clk, .rst_n,
        .push  (in_reg[p].valid && (in_reg[p].lane == 1'(l))),
        .din   (in_reg[p]),
        .pop   (q_pop[p][l]),
        .dout  (q_dout[p][l]),
        .empty (q_empty[p][l]),
        .count (q_count[p][l])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(NPORTS); p++) in_stop[p] <= '1;
    end else begin
      for (int p = 0; p < int'(NPORTS); p++)
        for (int l = 0; l < int'(NLANES); l++)
          in_stop[p][l] <= !port_en[p] || (q_count[p][l] >= CW'(QUEUE_ON));
    end
  end

  // ---------------- stage 3: buffer read and route decode ----------------
  flit_t      pend       [NPORTS][NLANES];
  logic [2:0] pend_port  [NPORTS][NLANES];
  logic [2:0] cur_port   [NPORTS][NLANES];   // output of the packet in flight
  logic       chain      [NPORTS][NLANES];   // next flit is a continued head
  logic       pend_go    [NPORTS][NLANES];   // granted this cycle

  logic       q_is_head  [NPORTS][NLANES];
  logic       q_drop     [NPORTS][NLANES];
  logic       pend_load  [NPORTS][NLANES];

  always_comb begin
    for (int p = 0; p < int'(NPORTS); p++)
      for (int l = 0; l < int'(NLANES); l++) begin
        q_is_head[p][l] = q_dout[p][l].head || chain[p][l];
        q_drop[p][l]    = q_is_head[p][l] && (q_dout[p][l].data[2:0] == HOP_CHAIN);
        pend_load[p][l] = !q_empty[p][l] && (!pend[p][l].valid || pend_go[p][l]);
        q_pop[p][l]     = pend_load[p][l];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(NPORTS); p++)
        for (int l = 0; l < int'(NLANES); l++) begin
          pend[p][l]      <= FLIT_IDLE;
          pend_port[p][l] <= P_LOCAL;
          cur_port[p][l]  <= P_LOCAL;
          chain[p][l]     <= 1'b0;
        end
    end else begin
      for (int p = 0; p < int'(NPORTS); p++)
        for (int l = 0; l < int'(NLANES); l++) begin
          if (pend_load[p][l]) begin
            if (q_drop[p][l]) begin
              chain[p][l]      <= 1'b1;
              pend[p][l].valid <= 1'b0;
            end else if (q_is_head[p][l]) begin
              chain[p][l]          <= 1'b0;
              pend[p][l]           <= q_dout[p][l];
              pend[p][l].head      <= 1'b1;
              pend[p][l].data      <= q_dout[p][l].data >> HOP_W;
              pend_port[p][l]      <= q_dout[p][l].data[2:0];
              cur_port[p][l]       <= q_dout[p][l].data[2:0];
            end else begin
              pend[p][l]      <= q_dout[p][l];
              pend_port[p][l] <= cur_port[p][l];
            end
          end else if (pend_go[p][l]) begin
            pend[p][l].valid <= 1'b0;
          end
        end
    end
  end

  // ---------------- stage 4: two-phase arbitration ----------------
  logic [NLANES-1:0] own_v   [NPORTS];           // output lane reserved
  logic [2:0]        own_in  [NPORTS][NLANES];   // by this input port
  logic              lane_rr [NPORTS];
  logic [2:0]        port_rr [NPORTS];

  logic              elig    [NPORTS][NLANES];
  logic              in_req  [NPORTS];
  logic              in_lane [NPORTS];
  logic [2:0]        in_out  [NPORTS];
  logic              out_gnt [NPORTS];
  logic [2:0]        out_src [NPORTS];

  always_comb begin
    // eligibility of each lane's staged flit
    for (int p = 0; p < int'(NPORTS); p++)
      for (int l = 0; l < int'(NLANES); l++) begin
        logic [2:0] o;
        o = pend_port[p][l];
        elig[p][l] = 1'b0;
        if (pend[p][l].valid && (o < 3'(NPORTS))) begin
          elig[p][l] = port_en[o] && !out_stop[o][l] &&
                       (own_v[o][l] ? (own_in[o][l] == 3'(p)) : pend[p][l].head);
        end
      end
    // phase 1: lane arbitration per input port
    for (int p = 0; p < int'(NPORTS); p++) begin
      in_req[p]  = elig[p][0] || elig[p][1];
      if (elig[p][0] && elig[p][1]) in_lane[p] = lane_rr[p];
      else                          in_lane[p] = elig[p][1];
      in_out[p]  = pend_port[p][in_lane[p]];
    end
    // phase 2: port arbitration per output port
    for (int o = 0; o < int'(NPORTS); o++) begin
      out_gnt[o] = 1'b0;
      out_src[o] = '0;
      for (int k = 0; k < int'(NPORTS); k++) begin
        logic [2:0] c;
        c = 3'((int'(port_rr[o]) + k) % NPORTS);
        if (!out_gnt[o] && in_req[c] && (in_out[c] == 3'(o))) begin
          out_gnt[o] = 1'b1;
          out_src[o] = 3'(c);
        end
      end
    end
    for (int p = 0; p < int'(NPORTS); p++)
      for (int l = 0; l < int'(NLANES); l++)
        pend_go[p][l] = 1'b0;
    for (int o = 0; o < int'(NPORTS); o++)
      if (out_gnt[o]) pend_go[out_src[o]][in_lane[out_src[o]]] = 1'b1;
  end

  // ---------------- stage 4/5 registers: switch and output ----------------
  flit_t sa_reg  [NPORTS];
  flit_t out_reg [NPORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < int'(NPORTS); o++) begin
        sa_reg[o]  <= FLIT_IDLE;
        out_reg[o] <= FLIT_IDLE;
        own_v[o]   <= '0;
        port_rr[o] <= '0;
        for (int l = 0; l < int'(NLANES); l++) own_in[o][l] <= '0;
      end
      for (int p = 0; p < int'(NPORTS); p++) lane_rr[p] <= 1'b0;
    end else begin
      for (int o = 0; o < int'(NPORTS); o++) begin
        out_reg[o] <= sa_reg[o];
        if (out_gnt[o]) begin
          logic [2:0] s;
          logic       l;
          s = out_src[o];
          l = in_lane[s];
          sa_reg[o]      <= pend[s][l];
          sa_reg[o].lane <= l;
          port_rr[o]     <= (s == 3'(NPORTS - 1)) ? 3'd0 : s + 3'd1;
          lane_rr[s]     <= !l;
          if (pend[s][l].tail) begin
            own_v[o][l] <= 1'b0;
          end else if (pend[s][l].head) begin
            own_v[o][l]  <= 1'b1;
            own_in[o][l] <= s;
          end
        end else begin
          sa_reg[o] <= FLIT_IDLE;
        end
      end
    end
  end

  always_comb begin
    for (int o = 0; o < int'(NPORTS); o++) out_flit[o] = out_reg[o];
    for (int p = 0; p < int'(NPORTS); p++) begin
      port_active[p] = port_en[p] && in_reg[p].valid;
      for (int l = 0; l < int'(NLANES); l++)
        port_active[p] = port_active[p] || !q_empty[p][l] || pend[p][l].valid;
    end
  end

endmodule
