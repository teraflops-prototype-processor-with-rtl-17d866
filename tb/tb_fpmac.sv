// tb_fpmac: self-checking test of the floating-point multiply-accumulator.
//
// Streams back-to-back products (one per cycle, the sustained rate) into the
// unit, restarting the sum every few operations, and compares every reported
// sum with a double-precision reference built from the same operands. A sum
// passes if it is within 2^-20 of the sum of magnitudes of its terms (the unit
// truncates). Also checks the 8-edge result latency, sleep (state lost, issue
// ignored) and a cancellation case that exercises the renormalising shifts.
module tb_fpmac;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sleep, issue, clr, wb;
  logic [31:0] a, b;
  logic res_valid;
  logic [31:0] res;

  int checks = 0, failures = 0;

  fpmac dut (.*);

  always #5 clk = ~clk;

  // reference queue, written at issue
  real    exp_q[$];
  real    mag_q[$];
  longint t_issue_q[$];
  longint cyc = 0;
  real    ref_sum, ref_mag;

  always @(posedge clk) cyc <= cyc + 1;

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

  function automatic logic [31:0] rnd_float(input int emin, input int espan);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom % espan));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  task automatic do_issue(input logic [31:0] x, input logic [31:0] y, input logic c);
    real p;
    p = f2r(x) * f2r(y);
    if (x[30:23] == 0 || y[30:23] == 0) p = 0.0;
    if (c) begin ref_sum = p; ref_mag = (p < 0) ? -p : p; end
    else   begin ref_sum += p; ref_mag += (p < 0) ? -p : p; end
    exp_q.push_back(ref_sum);
    mag_q.push_back(ref_mag);
    t_issue_q.push_back(cyc);
    a = x; b = y; clr = c; wb = 1'b1; issue = 1'b1;
    @(posedge clk); #1;
    issue = 1'b0;
  endtask

  // checker
  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      real got, e, m, err;
      longint t0;
      got = f2r(res);
      e = exp_q.pop_front();
      m = mag_q.pop_front();
      t0 = t_issue_q.pop_front();
      err = got - e; if (err < 0) err = -err;
      checks++;
      if (err > m * 9.5367431640625e-07 + 1e-38) begin
        failures++;
        $display("FAIL value: got %g expected %g", got, e);
      end
      checks++;
      if (cyc - t0 != 8) begin
        failures++;
        $display("FAIL latency %0d", cyc - t0);
      end
    end
  end

  initial begin
    sleep = 0; issue = 0; clr = 0; wb = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // 1.0 * 1.0 exact
    do_issue(32'h3f800000, 32'h3f800000, 1'b1);
    // accumulate 2.0*3.0
    do_issue(32'h40000000, 32'h40400000, 1'b0);
    // random streams, same magnitude range, clear every 16 ops
    for (int i = 0; i < 400; i++)
      do_issue(rnd_float(100, 50), rnd_float(100, 50), (i % 16) == 0);
    // wide exponent spread, forces base-32 shifts of both operands
    for (int i = 0; i < 200; i++)
      do_issue(rnd_float(70, 110), rnd_float(60, 110), (i % 8) == 0);
    // cancellation: x*y then -x*y then a small term
    do_issue(32'h4b000001, 32'h4b000003, 1'b1);
    do_issue(32'hcb000001, 32'h4b000003, 1'b0);
    do_issue(32'h3e000000, 32'h3e800000, 1'b0);
    repeat (12) @(posedge clk);
    // sleep: state lost, issues ignored, restart with clr after wake
    #1 sleep = 1'b1;
    a = 32'h3f800000; b = 32'h3f800000; clr = 1; wb = 1; issue = 1;
    @(posedge clk); #1 issue = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || dut.acc != 0) begin failures++; $display("FAIL sleep"); end
    #1 sleep = 1'b0;
    @(posedge clk); #1;
    do_issue(32'h40800000, 32'h40800000, 1'b1);
    do_issue(32'h40800000, 32'h40800000, 1'b0);
    repeat (12) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
