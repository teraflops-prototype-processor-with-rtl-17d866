// tile: one of the 80 identical tiles of the mesh: a processing engine with
// its two FPMACs and memories (pe_core), the network interface that turns
// its sends into packets and applies received packets (net_if), the
// five-port router (router) and the sleep controller (pm_ctrl).
//
// Router port 0 is wired to the network interface; ports 1..4 (north, east,
// south, west) leave the tile as mesh links. Links between tiles run through
// phase-tolerant synchronizers placed by the mesh top (mesosync), so a tile
// only sees its own clock. The asynchronous reset is released synchronously
// to the tile clock by a two-flop synchronizer, since each tile's clock has
// its own phase. (Lint tools note that trst_n is both a flop output and an
// asynchronous reset: that is this synchronizer's purpose.)
//
// A tile wakes up with its core asleep and its memories undefined: a host or
// another tile loads instructions and data with write packets and starts the
// core with a PEWAKE packet. `sleep_region`, `core_run` and `fpu_issue` are
// status outputs (sleep state of each region, core running, FPU operations
// issued this cycle).
module tile
  import polaris_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 512,
  parameter int unsigned QDEPTH     = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // mesh links, index 1..4 = N, E, S, W (index 0 unused)
  input  flit_t             link_in   [NPORTS],
  output logic [NLANES-1:0] link_in_stop  [NPORTS],
  output flit_t             link_out  [NPORTS],
  input  logic [NLANES-1:0] link_out_stop [NPORTS],
  // static sleep control scan chain
  input  logic              scan_clk,
  input  logic              scan_en,
  input  logic              scan_in,
  input  logic              scan_update,
  output logic              scan_out,
  // status
  output logic              core_run,
  output logic [7:0]        sleep_region,
  output logic [1:0]        fpu_issue
);
  localparam int unsigned IAW = $clog2(IMEM_WORDS);
  localparam int unsigned DAW = $clog2(DMEM_WORDS);

  // reset synchronizer
  logic rst_s1, trst_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_s1 <= 1'b0;
      trst_n <= 1'b0;
    end else begin
      rst_s1 <= 1'b1;
      trst_n <= rst_s1;
    end
  end

  // router
  flit_t             r_in   [NPORTS];
  logic [NLANES-1:0] r_istop [NPORTS];
  flit_t             r_out  [NPORTS];
  logic [NLANES-1:0] r_ostop [NPORTS];
  logic [NPORTS-1:0] port_en, port_active;

  flit_t             inj_flit;
  logic [NLANES-1:0] ej_stop;

  always_comb begin
    for (int p = 0; p < int'(NPORTS); p++) begin
      r_in[p]     = (p == 0) ? inj_flit : link_in[p];
      r_ostop[p]  = (p == 0) ? ej_stop  : link_out_stop[p];
      link_out[p] = (p == 0) ? FLIT_IDLE : r_out[p];
      link_in_stop[p] = (p == 0) ? '1 : r_istop[p];
    end
  end

  router #(.DEPTH(QDEPTH)) u_router (
    .clk, .rst_n(trst_n), .port_en,
    .in_flit(r_in), .in_stop(r_istop),
    .out_flit(r_out), .out_stop(r_ostop),
    .port_active
  );

  // network interface
  logic            dm_we, im_we, rx_pkt, pesleep, pewake;
  logic [DAW-1:0]  dm_addr;
  logic [31:0]     dm_wdata;
  logic [IAW-1:0]  im_addr, wake_pc;
  logic [95:0]     im_wdata;
  logic            req_valid, req_ready, req_has_data, req_has_route2;
  logic [31:0]     req_route, req_route2, req_cmd, req_data;

  net_if #(.DMEM_AW(DAW), .IMEM_AW(IAW)) u_nif (
    .clk, .rst_n(trst_n),
    .ej_flit(r_out[0]), .ej_stop,
    .inj_flit, .inj_stop(r_istop[0]),
    .dm_we, .dm_addr, .dm_wdata,
    .im_we, .im_addr, .im_wdata,
    .rx_pkt, .pesleep, .pewake, .wake_pc,
    .req_valid, .req_ready, .req_route, .req_has_route2, .req_route2,
    .req_cmd, .req_data, .req_has_data
  );

  // power management
  logic [1:0] nap, wake, fpmac_sleep;
  logic       halt;

  pm_ctrl u_pm (
    .clk, .rst_n(trst_n),
    .nap, .wake, .pesleep, .pewake, .halt, .port_active,
    .scan_clk, .scan_en, .scan_in, .scan_update, .scan_out,
    .core_run, .fpmac_sleep, .port_en, .sleep_region
  );

  // processing engine (its pc output is for observation only)

  pe_core #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_pe (
    .clk, .rst_n(trst_n),
    .core_run, .fpmac_sleep, .nap, .wake, .halt,
    .pewake, .wake_pc, .rx_pkt,
    .im_we, .im_addr, .im_wdata,
    .dm_we, .dm_addr, .dm_wdata,
    .req_valid, .req_ready, .req_route, .req_has_route2, .req_route2,
    .req_cmd, .req_data, .req_has_data,
    .pc(), .fpu_issue
  );
endmodule
