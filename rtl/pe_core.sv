// pe_core: the processing engine of one tile, a 96-bit VLIW core.
//
// Every cycle the core fetches one 96-bit instruction word from its
// instruction memory and issues up to seven operations from it at once (see
// polaris_pkg::instr_t):
//   FPU0, FPU1  multiply-accumulate on FPMAC 0 / 1: acc = (clr ? 0 : acc) +
//               R[ra]*R[rb]; if wb, R[rd] receives the sum 9 cycles later
//   LD          R[r] = DMEM[R[ra]], 2-cycle latency, optional R[ra]++
//   ST          DMEM[R[ra]] = R[r], optional R[ra]++
//   NET         SND / SNDI: send R[rs] to the tile and address given by
//               route R[rh] and command R[rh+1] (SNDI then increments the
//               command register); if hop 9 of R[rh] is the chain code the
//               route continues in R[rh+1] and the command is R[rh+2];
//               RCV: wait until a data packet has arrived
//   FLOW        JMP, LOOP (branch while the loop counter is non-zero, counting
//               it down), SETLC, LI (load an 11-bit immediate), STALL n,
//               HALT; jumps take effect on the next cycle (1-cycle latency)
//   SLEEP       NAP/WAKE an FPMAC; PESLEEP/PEWAKE another engine, by a
//               packet routed by R[net.rh] with command word R[net.rh+1] (or +2,
//               as for SND; its command field is replaced)
// The instruction either executes whole or waits whole: it waits while a
// STALL count runs, while RCV finds no arrived packet, and while the send
// queue cannot take a request. There are no interlocks on registers: as on
// any exposed-pipeline VLIW, the program must respect the 9-cycle FPU and
// 2-cycle load latencies. Several writes to one register in one cycle are
// resolved by a fixed priority (later operations in the list above win).
//
// The operation classes, the 96-bit word, "up to 8 operations per cycle"
// and the latencies come from the design description; the field layout, the
// register file (32 x 32 bit, R0 an ordinary register), the memory sizes and
// the exact operation set are this design's choices.
//
// The core runs while `core_run` is high (see pm_ctrl). A PEWAKE packet
// loads `wake_pc` into the program counter.
module pe_core
  import polaris_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 512,
  localparam int unsigned IAW = $clog2(IMEM_WORDS),
  localparam int unsigned DAW = $clog2(DMEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // power control
  input  logic            core_run,
  input  logic [1:0]      fpmac_sleep,
  output logic [1:0]      nap,
  output logic [1:0]      wake,
  output logic            halt,
  // from the network interface
  input  logic            pewake,
  input  logic [IAW-1:0]  wake_pc,
  input  logic            rx_pkt,
  input  logic            im_we,
  input  logic [IAW-1:0]  im_addr,
  input  logic [95:0]     im_wdata,
  input  logic            dm_we,
  input  logic [DAW-1:0]  dm_addr,
  input  logic [31:0]     dm_wdata,
  // send requests to the network interface
  output logic            req_valid,
  input  logic            req_ready,
  output logic [31:0]     req_route,
  output logic            req_has_route2,
  output logic [31:0]     req_route2,
  output logic [31:0]     req_cmd,
  output logic [31:0]     req_data,
  output logic            req_has_data,
  // status
  output logic [IAW-1:0]  pc,
  output logic [1:0]      fpu_issue     // FPU operations issued this cycle
);

  localparam int unsigned NREGS = 32;   // 5-bit register fields

  // ---------------- state ----------------
  logic [31:0]  rf [NREGS];
  logic [10:0]  lc;
  logic [10:0]  stall_cnt;
  logic [15:0]  rx_cnt;

  // ---------------- fetch ----------------
  logic [95:0]  iword;
  instr_t       ins;

  imem #(.ENTRIES(IMEM_WORDS)) u_imem (
    .clk, .rd_addr(pc), .rd_data(iword),
    .wr_en(im_we), .wr_addr(im_addr), .wr_data(im_wdata)
  );
  assign ins = instr_t'(iword);

  // ---------------- register reads ----------------
  function automatic logic [4:0] nxt(input logic [4:0] r);
    return r + 5'd1;
  endfunction

  logic [31:0] f0a, f0b, f1a, f1b, ld_ra, st_ra, st_rv, n_rs, n_rh, n_rh1, n_rh2;
  logic        long_route;   // route continues in a second register
  logic [4:0]  cmd_reg;      // register holding the command word
  always_comb begin
    f0a   = rf[ins.fpu0.ra];  f0b = rf[ins.fpu0.rb];
    f1a   = rf[ins.fpu1.ra];  f1b = rf[ins.fpu1.rb];
    ld_ra = rf[ins.ld.ra];
    st_ra = rf[ins.st.ra];    st_rv = rf[ins.st.r];
    n_rs  = rf[ins.net.rs];
    n_rh  = rf[ins.net.rh];   n_rh1 = rf[nxt(ins.net.rh)];
    n_rh2 = rf[nxt(nxt(ins.net.rh))];
    long_route = (n_rh[29:27] == HOP_CHAIN);
    cmd_reg    = long_route ? nxt(nxt(ins.net.rh)) : nxt(ins.net.rh);
  end

  // ---------------- issue decision ----------------
  logic need_send, is_snd, is_pesl, exec, rx_take;
  always_comb begin
    is_snd    = (ins.net.op == NET_SND) || (ins.net.op == NET_SNDI);
    is_pesl   = (ins.sl.op == SL_PESLEEP) || (ins.sl.op == SL_PEWAKE);
    need_send = is_snd || is_pesl;
    rx_take   = (ins.net.op == NET_RCV);
    exec      = core_run && (stall_cnt == '0) &&
                !(rx_take && rx_cnt == '0) &&
                !(need_send && !req_ready);
  end

  // send request
  always_comb begin
    req_valid    = exec && need_send;
    req_route      = n_rh;
    req_has_route2 = long_route;
    req_route2     = n_rh1;
    req_has_data   = is_snd;
    req_data       = n_rs;
    req_cmd        = long_route ? n_rh2 : n_rh1;
    if (!is_snd)
      req_cmd[31:28] = (ins.sl.op == SL_PESLEEP) ? CMD_PESLEEP : CMD_PEWAKE;
  end

  // power requests
  always_comb begin
    nap  = exec ? {ins.sl.op == SL_NAP1,  ins.sl.op == SL_NAP0}  : 2'b00;
    wake = exec ? {ins.sl.op == SL_WAKE1, ins.sl.op == SL_WAKE0} : 2'b00;
    halt = exec && (ins.fl.op == FL_HALT);
  end

  // ---------------- FPMACs ----------------
  logic        fv [2];
  logic [31:0] fr [2];
  logic [4:0]  ftag [2][LAT_FPU-1];

  assign fpu_issue = {exec && ins.fpu1.en, exec && ins.fpu0.en};

  fpmac u_fpmac0 (
    .clk, .rst_n, .sleep(fpmac_sleep[0]),
    .issue(fpu_issue[0]), .clr(ins.fpu0.clr), .wb(ins.fpu0.wb),
    .a(f0a), .b(f0b), .res_valid(fv[0]), .res(fr[0])
  );
  fpmac u_fpmac1 (
    .clk, .rst_n, .sleep(fpmac_sleep[1]),
    .issue(fpu_issue[1]), .clr(ins.fpu1.clr), .wb(ins.fpu1.wb),
    .a(f1a), .b(f1b), .res_valid(fv[1]), .res(fr[1])
  );

  // destination registers travel beside the FPMAC pipelines
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < 2; u++)
        for (int s = 0; s < int'(LAT_FPU) - 1; s++) ftag[u][s] <= '0;
    end else begin
      ftag[0][0] <= ins.fpu0.rd;
      ftag[1][0] <= ins.fpu1.rd;
      for (int u = 0; u < 2; u++)
        for (int s = 1; s < int'(LAT_FPU) - 1; s++) ftag[u][s] <= ftag[u][s-1];
    end
  end

  // ---------------- data memory ----------------
  logic [31:0] dm_q;
  logic        ld_pend;
  logic [4:0]  ld_rd;

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .a_re   (exec && ins.ld.en),
    .a_raddr(ld_ra[DAW-1:0]),
    .a_q    (dm_q),
    .a_we   (exec && ins.st.en),
    .a_waddr(st_ra[DAW-1:0]),
    .a_wdata(st_rv),
    .b_we   (dm_we),
    .b_addr (dm_addr),
    .b_wdata(dm_wdata)
  );

  // ---------------- sequencing and register writes ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      lc        <= '0;
      stall_cnt <= '0;
      rx_cnt    <= '0;
      ld_pend   <= 1'b0;
      ld_rd     <= '0;
      for (int i = 0; i < int'(NREGS); i++) rf[i] <= '0;
    end else begin
      // arrivals and waits
      rx_cnt <= rx_cnt + 16'(rx_pkt) - 16'(exec && rx_take);
      if (core_run && stall_cnt != '0) stall_cnt <= stall_cnt - 11'd1;

      // results of earlier operations
      if (fv[0]) rf[ftag[0][LAT_FPU-2]] <= fr[0];
      if (fv[1]) rf[ftag[1][LAT_FPU-2]] <= fr[1];
      ld_pend <= exec && ins.ld.en;
      ld_rd   <= ins.ld.r;
      if (ld_pend) rf[ld_rd] <= dm_q;

      if (pewake) begin
        pc <= wake_pc;
      end else if (exec) begin
        // register updates of this instruction
        if (ins.ld.en && ins.ld.inc) rf[ins.ld.ra] <= ld_ra + 32'd1;
        if (ins.st.en && ins.st.inc) rf[ins.st.ra] <= st_ra + 32'd1;
        if (ins.net.op == NET_SNDI)  rf[cmd_reg] <= req_cmd + 32'd1;
        if (ins.fl.op == FL_LI)      rf[ins.fl.rd] <= 32'(ins.fl.imm);
        // program flow
        pc <= pc + 1'b1;
        unique case (ins.fl.op)
          FL_JMP:   pc <= IAW'(ins.fl.imm);
          FL_LOOP:  if (lc != '0) begin
                      lc <= lc - 11'd1;
                      pc <= IAW'(ins.fl.imm);
                    end
          FL_SETLC: lc <= ins.fl.imm;
          FL_STALL: stall_cnt <= ins.fl.imm;
          FL_HALT:  pc <= pc;
          default: ;
        endcase
      end
    end
  end

endmodule
