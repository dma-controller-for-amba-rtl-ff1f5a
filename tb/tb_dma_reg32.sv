// tb_dma_reg32: checks the clock-enabled register with clear against a model.
// Random D, CE and CLR for many cycles, plus the asynchronous reset; the
// expected Q is kept in the testbench (CLR over CE, one cycle latency).
module tb_dma_reg32;
  logic clk = 1'b0, rst_n = 1'b0, clr, ce;
  logic [31:0] d, q, exp_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dma_reg32 dut (.clk(clk), .rst_n(rst_n), .clr(clr), .ce(ce), .d(d), .q(q));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; ce = 0; d = '0;
    @(negedge clk);
    checks++; if (q !== '0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1'b1;
    exp_q = '0;
    for (int i = 0; i < 500; i++) begin
      d = $urandom; ce = ($urandom_range(0, 2) != 0); clr = ($urandom_range(0, 15) == 0);
      @(posedge clk);
      if (clr) exp_q = '0; else if (ce) exp_q = d;
      @(negedge clk);
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL: q=%h exp=%h", q, exp_q); end
    end
    // asynchronous reset between edges
    ce = 1; d = 32'hDEAD_BEEF; @(negedge clk);
    #2 rst_n = 1'b0; #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL: async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
