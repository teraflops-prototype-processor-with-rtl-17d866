// tb_dmem: self-checking test of the data memory: random reads and writes on
// both ports against a model array; a read returns its word after one edge,
// a read of a word being written returns the old word, and a network write
// wins over a core write to the same word.
module tb_dmem;
  localparam int W = 512;
  logic clk = 1'b0;
  logic a_re, a_we, b_we;
  logic [8:0] a_raddr, a_waddr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_q;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  dmem dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [31:0] exp_q;
    bit pend;
    a_re = 0; a_we = 0; b_we = 0; a_raddr = 0; a_waddr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through both ports
    for (int i = 0; i < W; i += 2) begin
      @(negedge clk);
      a_we = 1; a_waddr = 9'(i);     a_wdata = $urandom; model[i] = a_wdata;
      b_we = 1; b_addr  = 9'(i + 1); b_wdata = $urandom; model[i + 1] = b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    pend = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (a_q !== exp_q) begin failures++; $display("FAIL read got %h exp %h", a_q, exp_q); end
      end
      a_re = 1'($urandom); a_raddr = 9'($urandom);
      a_we = 1'($urandom); a_waddr = ($urandom % 4 == 0) ? a_raddr : 9'($urandom); a_wdata = $urandom;
      b_we = 1'($urandom); b_addr  = ($urandom % 4 == 0) ? a_waddr : 9'($urandom); b_wdata = $urandom;
      pend = a_re;
      exp_q = model[a_raddr];
      if (a_we) model[a_waddr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0; a_re = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); a_re = 1; a_raddr = 9'(i);
      @(negedge clk); a_re = 0;
      checks++;
      if (a_q !== model[i]) begin failures++; $display("FAIL final word %0d", i); end
    end
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
