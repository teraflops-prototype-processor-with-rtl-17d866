// tb_util_pkg: helpers shared by the testbenches: building instruction
// words, source routes and packets, and converting single-precision bit
// patterns to real numbers for reference computations.
package tb_util_pkg;
  import polaris_pkg::*;

  typedef logic [31:0] word_q_t[$];

  function automatic instr_t nop();
    instr_t i;
    i = '0;
    return i;
  endfunction

  function automatic fpu_op_t fpu(input logic [4:0] ra, input logic [4:0] rb,
                                  input logic clr, input logic wb, input logic [4:0] rd);
    fpu_op_t f;
    f.en = 1'b1; f.clr = clr; f.wb = wb; f.ra = ra; f.rb = rb; f.rd = rd;
    return f;
  endfunction

  function automatic mem_op_t mop(input logic [4:0] r, input logic [4:0] ra, input logic inc);
    mem_op_t m;
    m.en = 1'b1; m.r = r; m.ra = ra; m.inc = inc;
    return m;
  endfunction

  function automatic flow_op_t flow(input flow_e op, input int imm, input logic [4:0] rd = '0);
    flow_op_t f;
    f.op = op; f.rd = rd; f.imm = 11'(imm);
    return f;
  endfunction

  // Route as one or two words from a hop list (the last hop is usually
  // P_LOCAL). Over ten hops: nine hops and the chain code, then the rest.
  function automatic word_q_t route_words(input int hops[$], input bit force_chain = 0);
    word_q_t w;
    logic [31:0] r;
    int n;
    if (force_chain) w.push_back(32'(HOP_CHAIN));
    if (hops.size() <= 10) begin
      r = '0;
      foreach (hops[i]) r[3*i +: 3] = 3'(hops[i]);
      w.push_back(r);
    end else begin
      r = '0;
      for (int i = 0; i < 9; i++) r[3*i +: 3] = 3'(hops[i]);
      r[27 +: 3] = HOP_CHAIN;
      w.push_back(r);
      r = '0;
      n = 0;
      for (int i = 9; i < hops.size(); i++) begin r[3*n +: 3] = 3'(hops[i]); n++; end
      w.push_back(r);
    end
    return w;
  endfunction

  // Hops from the host (west of tile 0) to tile (x, y), and back.
  function automatic word_q_t host_to_tile(input int x, input int y, input bit force_chain = 0);
    int h[$];
    for (int i = 0; i < x; i++) h.push_back(int'(P_EAST));
    for (int i = 0; i < y; i++) h.push_back(int'(P_SOUTH));
    h.push_back(int'(P_LOCAL));
    return route_words(h, force_chain);
  endfunction

  function automatic word_q_t tile_to_host(input int x, input int y);
    int h[$];
    for (int i = 0; i < y; i++) h.push_back(int'(P_NORTH));
    for (int i = 0; i < x; i++) h.push_back(int'(P_WEST));
    h.push_back(int'(P_WEST));
    return route_words(h);
  endfunction

  function automatic word_q_t tile_to_tile(input int x0, input int y0, input int x1, input int y1);
    int h[$];
    for (int i = x0; i < x1; i++) h.push_back(int'(P_EAST));
    for (int i = x1; i < x0; i++) h.push_back(int'(P_WEST));
    for (int i = y0; i < y1; i++) h.push_back(int'(P_SOUTH));
    for (int i = y1; i < y0; i++) h.push_back(int'(P_NORTH));
    h.push_back(int'(P_LOCAL));
    return route_words(h);
  endfunction

  // Flits of one packet: route words, command, data words.
  function automatic void packet(ref flit_t q[$], input word_q_t route, input logic [31:0] cmd,
                                 input word_q_t data, input logic lane);
    word_q_t all;
    flit_t f;
    all = route;
    all.push_back(cmd);
    foreach (data[i]) all.push_back(data[i]);
    foreach (all[i]) begin
      f = FLIT_IDLE;
      f.valid = 1'b1; f.lane = lane;
      f.head = (i == 0);
      f.tail = (i == all.size() - 1);
      f.data = all[i];
      q.push_back(f);
    end
  endfunction

  function automatic real f2r(input logic [31:0] f);
    real v;
    int  e;
    if (f[30:23] == 0) return 0.0;
    v = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    while (e > 0) begin v = v * 2.0; e--; end
    while (e < 0) begin v = v / 2.0; e++; end
    return f[31] ? -v : v;
  endfunction

  // Random float with exponent in [emin, emin+span).
  function automatic logic [31:0] rnd_float(input int emin, input int span);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom % span));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

endpackage
