// lane_fifo: one virtual-lane input queue of a router port.
//
// A synchronous first-in first-out buffer of flits. `push` writes `din` at the
// clock edge; the oldest entry is always visible on `dout` (read in the same
// cycle, no extra latency) and `pop` removes it at the edge. `count` gives the
// occupancy, used by the router for on/off flow control. Pushing into a full
// queue or popping an empty one is a protocol error and is flagged by
// assertions; the router's flow control must prevent it. Depth is a
// parameter; the default of 16 entries is this design's choice.
module lane_fifo
  import polaris_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  flit_t                    din,
  input  logic                     pop,
  output flit_t                    dout,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t         mem [DEPTH];
  logic [AW-1:0] rp, wp;

  assign empty = (count == '0);
  assign dout  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= FLIT_IDLE;
    end else begin
      if (push) begin
        mem[wp] <= din;
        wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop)
        rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(push) - CW'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (count < ($clog2(DEPTH+1))'(DEPTH)) || pop);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
