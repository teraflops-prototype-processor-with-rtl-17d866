// imem: instruction memory of a processing engine.
//
// ENTRIES x 96-bit very-long instruction words. The read port is
// asynchronous: the word at `rd_addr` is on `rd_data` in the same cycle, so
// the core fetches and executes one instruction per cycle and a taken jump
// costs no bubble (1-cycle jump/branch latency). The write port is loaded by
// the network interface from instruction-write packets. The size (256
// entries, 3 KB) is this design's choice; the description only says that the
// instruction memory did not limit the kernels. Contents are undefined until
// written.
module imem #(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned IW      = 96,
  parameter int unsigned AW      = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic [AW-1:0] rd_addr,
  output logic [IW-1:0] rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [IW-1:0] wr_data
);
  logic [IW-1:0] mem [ENTRIES];

  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= wr_data;
endmodule
