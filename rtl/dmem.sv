// dmem: local data memory of a processing engine.
//
// WORDS x 32-bit words. Port A belongs to the core and has a read and a
// write address, so a load and a store can issue in the same instruction: a
// write (`a_we`) happens at the clock edge, a read (`a_re`) returns its word
// on `a_q` after the edge (the old word if the same word is written), so a load's data reaches the register file one edge later, giving the
// 2-cycle load latency of the instruction table. Port B is write-only and
// belongs to the network interface, which stores the data words of incoming
// packets; both writes can happen in the same cycle, and if they hit the
// same word the network write wins. The size (512 words, 2 KB) and the
// two-port organisation are this design's choices; the description only says
// that the kernels were sized to fit the local data memory.
module dmem #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          a_re,
  input  logic [AW-1:0] a_raddr,
  output logic [31:0]   a_q,
  input  logic          a_we,
  input  logic [AW-1:0] a_waddr,
  input  logic [31:0]   a_wdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_re) a_q <= mem[a_raddr];
    if (a_we) mem[a_waddr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end
endmodule
