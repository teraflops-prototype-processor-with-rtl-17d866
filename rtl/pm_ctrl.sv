// pm_ctrl: sleep and clock-gating control of one tile.
//
// The tile is split into sleep regions, each switched by its own sleep
// transistors (modelled here only as the control bit). Regions modelled:
//   bit 0, 1  FPMAC 0, FPMAC 1
//   bit 2     core (fetch, decode, register file)
//   bit 3..7  router ports 0..4 (queues of the port)
// Control follows the two ways the design description gives:
//   dynamic  NAP/WAKE instructions put one FPMAC to sleep or wake it;
//            PESLEEP/PEWAKE packets from another engine stop or start the
//            core (PEWAKE also starts execution); a HALT instruction puts the
//            core to sleep as well. A router port's queues sleep whenever the
//            port is idle (activity based).
//   static   a scan chain of 8 bits, shifted in on `scan_in` while
//            `scan_en` is high and copied to the control register on
//            `scan_update`, both on the dedicated `scan_clk` (a slow clock
//            common to all tiles, so that the chain can cross tiles whose
//            functional clocks differ in phase). The control register is
//            static while the tile runs. Bit 0 forces the core (and both FPMACs) to sleep,
//            bits 1..2 force FPMAC 0/1 to sleep, bits 3..7 switch router ports
//            0..4 off. All zero (reset value) means nothing is forced.
// A halted or PESLEEP-ed core leaves its FPMACs as they are, so results in
// flight still complete; only the static core bit also sleeps them.
// A sleeping FPMAC and a sleeping core also have their clocks gated; the
// gate enables are the inverted sleep bits. A region wakes one cycle after
// the wake event (the 1-cycle NAP/WAKE latency of the instruction table).
// The region list and the scan register layout are this design's choices:
// the description names 21 regions per tile without listing them all.
module pm_ctrl
  import polaris_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // dynamic requests
  input  logic [1:0]        nap,          // NAP instruction, per FPMAC
  input  logic [1:0]        wake,         // WAKE instruction, per FPMAC
  input  logic              pesleep,      // PESLEEP packet received
  input  logic              pewake,       // PEWAKE packet received
  input  logic              halt,         // HALT instruction executed
  input  logic [NPORTS-1:0] port_active,  // router port activity
  // static control, scan chain
  input  logic              scan_clk,
  input  logic              scan_en,
  input  logic              scan_in,
  input  logic              scan_update,
  output logic              scan_out,
  // controls
  output logic              core_run,     // core awake and executing
  output logic [1:0]        fpmac_sleep,
  output logic [NPORTS-1:0] port_en,      // static port enables to the router
  output logic [7:0]        sleep_region  // 1 = region asleep
);

  localparam int unsigned SCAN_W = 8;

  logic [SCAN_W-1:0] shift_q, ctrl_q;
  logic              dyn_run;
  logic [1:0]        dyn_nap;

  always_ff @(posedge scan_clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q <= '0;
      ctrl_q  <= '0;
    end else begin
      if (scan_en)     shift_q <= {scan_in, shift_q[SCAN_W-1:1]};
      if (scan_update) ctrl_q  <= shift_q;
    end
  end
  assign scan_out = shift_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dyn_run <= 1'b0;
      dyn_nap <= 2'b00;
    end else begin
      if (pewake)               dyn_run <= 1'b1;
      else if (pesleep || halt) dyn_run <= 1'b0;
      for (int i = 0; i < 2; i++) begin
        if (wake[i])     dyn_nap[i] <= 1'b0;
        else if (nap[i]) dyn_nap[i] <= 1'b1;
      end
    end
  end

  always_comb begin
    core_run    = dyn_run && !ctrl_q[0];
    fpmac_sleep = dyn_nap | ctrl_q[2:1] | {2{ctrl_q[0]}};
    port_en     = ~ctrl_q[7:3];
    sleep_region = {~(port_en & port_active), !core_run, fpmac_sleep};
  end

  a_nap_wake_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(|(nap & wake)));
endmodule
