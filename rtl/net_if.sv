// net_if: interface between a processing engine and the local port of its
// router (send/receive unit).
//
// Receive side: takes every flit the router delivers on its local output and
// decodes the packet: the head flit (spent route) is discarded, the command
// flit selects what the data words do:
//   CMD_DMEM_WR  data words are written to the local data memory from addr
//                on, one word per flit; at the tail `rx_pkt` pulses, which
//                the core counts for its wait-for-data (RCV) operation
//   CMD_IMEM_WR  data words are grouped by three (low word first) into 96-bit
//                instructions written from instruction addr on
//   CMD_PESLEEP  pulses `pesleep`: another engine puts this one to sleep
//   CMD_PEWAKE   pulses `pewake` with `wake_pc` = addr: wake and start there
// The receive side never refuses a flit (both memories take a write every
// cycle), so its stop bits to the router are always low.
//
// Send side: the core pushes send requests {route, second route, command,
// data}; they wait in a small queue and are turned into packets of route
// flit, optional second route flit (for paths over nine hops, the first
// route then ends in the chain code), command flit and, unless it is a sleep
// or wake packet, one data flit.
// The lane comes from bit 31 of the route register and is cleared in the head
// flit. A lane whose stop bit is high is not sent on. The head flit is on the
// router's input wire two cycles after the request (the 2-cycle send
// latency). `req_ready` is low when the queue is full; the core then stalls.
// The packet and command formats are this design's choices.
module net_if
  import polaris_pkg::*;
#(
  parameter int unsigned DMEM_AW = 9,
  parameter int unsigned IMEM_AW = 8,
  parameter int unsigned QDEPTH  = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // router local port
  input  flit_t                ej_flit,     // router -> engine
  output logic [NLANES-1:0]    ej_stop,
  output flit_t                inj_flit,    // engine -> router
  input  logic [NLANES-1:0]    inj_stop,
  // memories
  output logic                 dm_we,
  output logic [DMEM_AW-1:0]   dm_addr,
  output logic [31:0]          dm_wdata,
  output logic                 im_we,
  output logic [IMEM_AW-1:0]   im_addr,
  output logic [95:0]          im_wdata,
  // events
  output logic                 rx_pkt,
  output logic                 pesleep,
  output logic                 pewake,
  output logic [IMEM_AW-1:0]   wake_pc,
  // send requests from the core
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic [31:0]          req_route,
  input  logic                 req_has_route2,
  input  logic [31:0]          req_route2,
  input  logic [31:0]          req_cmd,
  input  logic [31:0]          req_data,
  input  logic                 req_has_data
);

  assign ej_stop = '0;

  // ---------------- receive ----------------
  // per lane: packets on the two lanes may interleave flit by flit
  typedef enum logic [1:0] {RX_HEAD, RX_CMD, RX_DATA} rx_state_e;
  rx_state_e    rx_st   [NLANES];
  cmd_e         rx_cmd  [NLANES];
  logic [27:0]  rx_addr [NLANES];
  logic [1:0]   rx_part [NLANES];
  logic [63:0]  rx_acc  [NLANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < int'(NLANES); l++) begin
        rx_st[l] <= RX_HEAD; rx_cmd[l] <= CMD_DMEM_WR; rx_addr[l] <= '0;
        rx_part[l] <= '0; rx_acc[l] <= '0;
      end
      dm_we <= 1'b0; dm_addr <= '0; dm_wdata <= '0;
      im_we <= 1'b0; im_addr <= '0; im_wdata <= '0;
      rx_pkt <= 1'b0; pesleep <= 1'b0; pewake <= 1'b0; wake_pc <= '0;
    end else begin
      dm_we <= 1'b0; im_we <= 1'b0; rx_pkt <= 1'b0; pesleep <= 1'b0; pewake <= 1'b0;
      if (ej_flit.valid) begin
        automatic int l = int'(ej_flit.lane);
        if (ej_flit.head) begin
          rx_st[l] <= ej_flit.tail ? RX_HEAD : RX_CMD;
        end else if (rx_st[l] == RX_CMD) begin
          rx_cmd[l]  <= cmd_e'(ej_flit.data[31:28]);
          rx_addr[l] <= ej_flit.data[27:0];
          rx_part[l] <= '0;
          rx_st[l]   <= ej_flit.tail ? RX_HEAD : RX_DATA;
          if (ej_flit.tail) begin
            if (cmd_e'(ej_flit.data[31:28]) == CMD_PESLEEP) pesleep <= 1'b1;
            if (cmd_e'(ej_flit.data[31:28]) == CMD_PEWAKE) begin
              pewake  <= 1'b1;
              wake_pc <= ej_flit.data[IMEM_AW-1:0];
            end
          end
        end else if (rx_st[l] == RX_DATA) begin
          if (rx_cmd[l] == CMD_DMEM_WR) begin
            dm_we       <= 1'b1;
            dm_addr     <= rx_addr[l][DMEM_AW-1:0];
            dm_wdata    <= ej_flit.data;
            rx_addr[l]  <= rx_addr[l] + 28'd1;
            rx_pkt      <= ej_flit.tail;
          end else if (rx_cmd[l] == CMD_IMEM_WR) begin
            if (rx_part[l] == 2'd2) begin
              im_we      <= 1'b1;
              im_addr    <= rx_addr[l][IMEM_AW-1:0];
              im_wdata   <= {ej_flit.data, rx_acc[l]};
              rx_addr[l] <= rx_addr[l] + 28'd1;
              rx_part[l] <= '0;
            end else begin
              if (rx_part[l] == 2'd0) rx_acc[l][31:0]  <= ej_flit.data;
              else                    rx_acc[l][63:32] <= ej_flit.data;
              rx_part[l] <= rx_part[l] + 2'd1;
            end
          end
          if (ej_flit.tail) rx_st[l] <= RX_HEAD;
        end
      end
    end
  end

  // ---------------- send ----------------
  typedef struct packed {
    logic [31:0] route;
    logic        has_route2;
    logic [31:0] route2;
    logic [31:0] cmd;
    logic [31:0] data;
    logic        has_data;
  } sreq_t;

  localparam int unsigned QW = $clog2(QDEPTH + 1);
  sreq_t         q [QDEPTH];
  logic [QW-1:0] q_cnt;
  logic [1:0]    tx_idx;        // next flit: 0 route, 1 second route, 2 cmd, 3 data
  logic          tx_go;
  logic          tx_last;
  logic          lane;

  assign req_ready = (q_cnt < QW'(QDEPTH));
  assign lane      = q[0].route[31];
  assign tx_go     = (q_cnt != '0) && !inj_stop[lane];
  assign tx_last   = (tx_idx == 2'd3) || (tx_idx == 2'd2 && !q[0].has_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt    <= '0;
      tx_idx   <= '0;
      inj_flit <= FLIT_IDLE;
      for (int i = 0; i < int'(QDEPTH); i++) q[i] <= '0;
    end else begin
      automatic logic pop = tx_go && tx_last;
      automatic logic push = req_valid && req_ready;
      inj_flit <= FLIT_IDLE;
      if (tx_go) begin
        inj_flit.valid <= 1'b1;
        inj_flit.lane  <= lane;
        inj_flit.head  <= (tx_idx == 2'd0);
        inj_flit.tail  <= tx_last;
        unique case (tx_idx)
          2'd0:    inj_flit.data <= {2'b00, q[0].route[29:0]};
          2'd1:    inj_flit.data <= {2'b00, q[0].route2[29:0]};
          2'd2:    inj_flit.data <= q[0].cmd;
          default: inj_flit.data <= q[0].data;
        endcase
        if (tx_last)                                tx_idx <= 2'd0;
        else if (tx_idx == 2'd0 && !q[0].has_route2) tx_idx <= 2'd2;
        else                                        tx_idx <= tx_idx + 2'd1;
      end
      if (pop) begin
        for (int i = 0; i < int'(QDEPTH) - 1; i++) q[i] <= q[i + 1];
      end
      if (push) begin
        q[pop ? int'(q_cnt) - 1 : int'(q_cnt)] <= '{route: req_route, has_route2: req_has_route2,
                                                    route2: req_route2, cmd: req_cmd,
                                                    data: req_data, has_data: req_has_data};
      end
      q_cnt <= q_cnt + QW'(push) - QW'(pop);
    end
  end

  a_req_when_ready: assert property (@(posedge clk) disable iff (!rst_n) req_valid |-> req_ready);
endmodule
