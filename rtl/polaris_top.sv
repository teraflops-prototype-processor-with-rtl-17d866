// polaris_top: the 80-tile network-on-chip processor.
//
// COLS x ROWS identical tiles (8 x 10 by default) form a 2D mesh. Tile t sits
// at column t % COLS, row t / COLS; row 0 is the north edge. Every tile's
// router connects to its four neighbours with 38-wire links (32 data bits,
// 6 overhead bits). All tiles run at the same frequency from one clock source
// but each with its own phase (mesochronous clocking), so every link passes
// through a phase-tolerant synchronizer FIFO (mesosync) from the sender's
// clock to the receiver's clock; the per-tile clocks are inputs.
//
// Host access: the west port of tile 0 is brought out (`host_*`, in the clock
// of tile 0, without a synchronizer). Packets injected there load instruction
// and data memories anywhere in the mesh and start cores with PEWAKE packets;
// packets routed west out of tile 0 come back to the host. Other edge ports
// are unconnected: they receive idle flits and see stop on both lanes.
//
// Static sleep control: the tiles' 8-bit sleep control scan registers form
// one chain, tile 0 first: `scan_in` enters tile 0, `scan_out` leaves tile
// NTILES-1.
//
// Status per tile: core running, sleep state of its regions, FPU operations
// issued this cycle (two per tile at most; each one is two floating-point
// operations).
module polaris_top
  import polaris_pkg::*;
#(
  parameter int unsigned COLS       = 8,
  parameter int unsigned ROWS       = 10,
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 512,
  localparam int unsigned NTILES    = COLS * ROWS
) (
  input  logic              clk [NTILES],
  input  logic              rst_n,
  // host port (west side of tile 0)
  input  flit_t             host_in_flit,
  output logic [NLANES-1:0] host_in_stop,
  output flit_t             host_out_flit,
  input  logic [NLANES-1:0] host_out_stop,
  // static sleep control scan chain
  input  logic              scan_clk,
  input  logic              scan_en,
  input  logic              scan_in,
  input  logic              scan_update,
  output logic              scan_out,
  // status
  output logic [NTILES-1:0] core_run,
  output logic [7:0]        sleep_region [NTILES],
  output logic [1:0]        fpu_issue    [NTILES]
);

  flit_t             t_in    [NTILES][NPORTS];
  logic [NLANES-1:0] t_istop [NTILES][NPORTS];
  flit_t             t_out   [NTILES][NPORTS];
  logic [NLANES-1:0] t_ostop [NTILES][NPORTS];
  logic              scan    [NTILES+1];

  assign scan[0]  = scan_in;
  assign scan_out = scan[NTILES];

  for (genvar t = 0; t < int'(NTILES); t++) begin : g_tile
    tile #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_tile (
      .clk          (clk[t]),
      .rst_n,
      .link_in      (t_in[t]),
      .link_in_stop (t_istop[t]),
      .link_out     (t_out[t]),
      .link_out_stop(t_ostop[t]),
      .scan_clk, .scan_en, .scan_in(scan[t]), .scan_update, .scan_out(scan[t+1]),
      .core_run     (core_run[t]),
      .sleep_region (sleep_region[t]),
      .fpu_issue    (fpu_issue[t])
    );

    localparam int unsigned X = t % COLS;
    localparam int unsigned Y = t / COLS;

    // port 0 of the link arrays is unused (local port is inside the tile)
    assign t_in[t][0]    = FLIT_IDLE;
    assign t_ostop[t][0] = '1;

    // For each direction, the input of this tile comes from the neighbour's
    // opposite output through a synchronizer clocked by both tiles.
    for (genvar d = 1; d < int'(NPORTS); d++) begin : g_dir
      localparam bit HAS_NB = (d == 1) ? (Y > 0) :
                              (d == 2) ? (X < COLS - 1) :
                              (d == 3) ? (Y < ROWS - 1) : (X > 0);
      localparam int NB = (d == 1) ? int'(t) - int'(COLS) :
                          (d == 2) ? int'(t) + 1 :
                          (d == 3) ? int'(t) + int'(COLS) : int'(t) - 1;
      localparam int OPP = (d == 1) ? 3 : (d == 2) ? 4 : (d == 3) ? 1 : 2;

      if (HAS_NB) begin : g_link
        // neighbour NB output OPP -> this tile input d
        mesosync u_sync (
          .wclk  (clk[NB]),
          .wrst_n(rst_n),
          .wflit (t_out[NB][OPP]),
          .wstop (t_ostop[NB][OPP]),
          .rclk  (clk[t]),
          .rrst_n(rst_n),
          .rflit (t_in[t][d]),
          .rstop (t_istop[t][d])
        );
      end else if (t == 0 && d == 4) begin : g_host
        assign t_in[t][d]    = host_in_flit;
        assign host_in_stop  = t_istop[t][d];
        assign host_out_flit = t_out[t][d];
        assign t_ostop[t][d] = host_out_stop;
      end else begin : g_edge
        assign t_in[t][d]    = FLIT_IDLE;
        assign t_ostop[t][d] = '1;
      end
    end
  end

endmodule
