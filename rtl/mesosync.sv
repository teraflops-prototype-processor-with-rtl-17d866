// mesosync: phase-tolerant synchronizer for a link between two tiles.
//
// All tiles run from one clock source at the same frequency but with an
// unknown, fixed phase offset (mesochronous clocking). Following the design
// description, the crossing is a small FIFO: the sending side writes one
// entry every cycle of its clock, the receiving side reads one entry every
// cycle of its own clock. Because both clocks have the same frequency no
// pointer comparison is needed: the read pointer simply trails the write
// pointer by a fixed distance set at reset, which gives the one to two cycles
// of extra latency the description quotes. The depth (4) and the reset
// offset (2 entries) are this design's choices.
//
// Every cycle is written, idle cycles included, so the flit's own valid bit
// travels through the FIFO. The storage is reset in the write domain; the read
// side starts at entry OFFSET, which holds an idle flit after reset.
//
// The reverse-direction on/off flow-control bits are slow level signals and
// are passed through a two-flop synchronizer in the sender's domain.
module mesosync
  import polaris_pkg::*;
#(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned OFFSET = 2
) (
  // write (upstream) side
  input  logic              wclk,
  input  logic              wrst_n,
  input  flit_t             wflit,
  output logic [NLANES-1:0] wstop,   // stop bits, synchronized to wclk
  // read (downstream) side
  input  logic              rclk,
  input  logic              rrst_n,
  output flit_t             rflit,
  input  logic [NLANES-1:0] rstop    // stop bits from the receiving router
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t         mem [DEPTH];
  logic [PW-1:0] wptr, rptr;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= FLIT_IDLE;
    end else begin
      mem[wptr] <= wflit;
      wptr      <= (wptr == PW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr  <= PW'(DEPTH - OFFSET);
      rflit <= FLIT_IDLE;
    end else begin
      rflit <= mem[rptr];
      rptr  <= (rptr == PW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
    end
  end

  logic [NLANES-1:0] stop_s1;
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      stop_s1 <= '1;
      wstop   <= '1;
    end else begin
      stop_s1 <= rstop;
      wstop   <= stop_s1;
    end
  end

endmodule
