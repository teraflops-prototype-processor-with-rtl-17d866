// tb_imem: self-checking test of the instruction memory: 96-bit words
// written through the write port are read back on the asynchronous read
// port in the same cycle as their address is applied.
module tb_imem;
  localparam int E = 256;
  logic clk = 1'b0;
  logic [7:0] rd_addr, wr_addr;
  logic [95:0] rd_data, wr_data;
  logic wr_en;
  logic [95:0] model [E];
  int checks = 0, failures = 0;

  imem dut (.*);
  always #5 clk = ~clk;

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    for (int i = 0; i < E; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(i); wr_data = {$urandom, $urandom, $urandom}; model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if ($urandom % 3 == 0) begin
        wr_en = 1; wr_addr = 8'($urandom); wr_data = {$urandom, $urandom, $urandom};
      end else wr_en = 0;
      rd_addr = 8'($urandom);
      #1;
      checks++;
      if (rd_data !== model[rd_addr]) begin failures++; $display("FAIL read %0d", rd_addr); end
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
