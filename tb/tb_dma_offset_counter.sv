// tb_dma_offset_counter: checks the byte-offset counter.
// A 32-bit counter must step 0, 4, 8, ... only when CE is high and return to
// zero on CLR. An 8-bit copy of the same module must wrap from FC back to 00,
// which is how the 32-bit counter passes FFFFFFFC.
module tb_dma_offset_counter;
  logic clk = 1'b0, rst_n = 1'b0, clr, ce, clr8, ce8;
  logic [31:0] q, exp_q;
  logic [7:0]  q8;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dma_offset_counter dut (.clk(clk), .rst_n(rst_n), .clr(clr), .ce(ce), .q(q));
  dma_offset_counter #(.WIDTH(8), .STEP(4)) dut8 (.clk(clk), .rst_n(rst_n), .clr(clr8), .ce(ce8), .q(q8));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; ce = 0; clr8 = 0; ce8 = 0;
    @(negedge clk); rst_n = 1'b1;
    checks++; if (q !== 0) failures++;
    // consecutive counting as in a transfer: 0,4,8,C,10,14
    ce = 1;
    for (int i = 1; i <= 5; i++) begin
      @(negedge clk);
      checks++; if (q !== 32'(4 * i)) begin failures++; $display("FAIL: q=%h at step %0d", q, i); end
    end
    exp_q = q;
    for (int i = 0; i < 400; i++) begin
      ce = $urandom_range(0, 1); clr = ($urandom_range(0, 20) == 0);
      @(posedge clk);
      if (clr) exp_q = 0; else if (ce) exp_q = exp_q + 4;
      @(negedge clk);
      checks++; if (q !== exp_q) begin failures++; $display("FAIL: q=%h exp=%h", q, exp_q); end
    end
    ce = 0; clr = 0;
    // wrap of the narrow copy
    ce8 = 1;
    repeat (63) @(negedge clk);
    checks++; if (q8 !== 8'hFC) begin failures++; $display("FAIL: q8=%h before wrap", q8); end
    @(negedge clk);
    checks++; if (q8 !== 8'h00) begin failures++; $display("FAIL: no wrap, q8=%h", q8); end
    @(negedge clk);
    checks++; if (q8 !== 8'h04) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
