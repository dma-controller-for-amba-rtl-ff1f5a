// tb_dma_config_regs: the three transfer registers.
// Random enables and data; each register must take WDATA only when its own
// enable is high, and all three must clear together on CLR.
module tb_dma_config_regs;
  logic clk = 1'b0, rst_n = 1'b0, clr, ce_s, ce_d, ce_l;
  logic [31:0] wdata, src, dst, len, e_src, e_dst, e_len;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dma_config_regs dut (.clk(clk), .rst_n(rst_n), .clr(clr), .ce_src(ce_s), .ce_dst(ce_d),
                       .ce_len(ce_l), .wdata(wdata), .src_base(src), .dst_base(dst), .length(len));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; ce_s = 0; ce_d = 0; ce_l = 0; wdata = 0;
    @(negedge clk); rst_n = 1;
    e_src = 0; e_dst = 0; e_len = 0;
    for (int i = 0; i < 600; i++) begin
      wdata = $urandom;
      {ce_s, ce_d, ce_l} = 3'b001 << $urandom_range(0, 3);   // one or none, as the decoder does
      clr = ($urandom_range(0, 25) == 0);
      @(posedge clk);
      if (clr) begin e_src = 0; e_dst = 0; e_len = 0; end
      else begin
        if (ce_s) e_src = wdata;
        if (ce_d) e_dst = wdata;
        if (ce_l) e_len = wdata;
      end
      @(negedge clk);
      checks++;
      if (src !== e_src || dst !== e_dst || len !== e_len) begin
        failures++; $display("FAIL: %h %h %h expected %h %h %h", src, dst, len, e_src, e_dst, e_len);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
