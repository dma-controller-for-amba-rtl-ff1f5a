// tb_dma_arbiter: all eight combinations of the two requests and DMA_DISABLE.
// The DMA may be granted only when it requests, the processor does not and
// the controller is enabled; otherwise the processor holds the grant.
module tb_dma_arbiter;
  logic clk = 1'b0, req_l, req_d, dis, gnt_l, gnt_d;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dma_arbiter dut (.hclk(clk), .hbusreq_leon(req_l), .hbusreq_dma(req_d),
                   .dma_disable(dis), .hgrant_leon(gnt_l), .hgrant_dma(gnt_d));

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {dis, req_l, req_d} = 3'(i);
      #1;
      checks++;
      if (gnt_d !== (req_d & ~req_l & ~dis) || gnt_l !== ~(req_d & ~req_l & ~dis)) begin
        failures++; $display("FAIL: dis=%b req_l=%b req_d=%b -> gnt_l=%b gnt_d=%b", dis, req_l, req_d, gnt_l, gnt_d);
      end
      checks++;
      if (gnt_d && gnt_l) begin failures++; $display("FAIL: two grants"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
