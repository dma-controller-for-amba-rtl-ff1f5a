// dma_config_regs: the three transfer registers the processor programs.
//
// Source base address, destination base address and transfer length (in
// bytes) are each a dma_reg32, loaded from the bus write data when the address
// decoder enables it, and all three are cleared together by the state machine
// when a transfer ends. As in the document they are write only and are read
// by the state machine alone; the transfer length of 0 means "no transfer".
// Timing: a value written in a data phase is visible the cycle after it.
module dma_config_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        ce_src,
  input  logic        ce_dst,
  input  logic        ce_len,
  input  logic [31:0] wdata,
  output logic [31:0] src_base,
  output logic [31:0] dst_base,
  output logic [31:0] length
);

  dma_reg32 #(.WIDTH(32)) u_src (
    .clk(clk), .rst_n(rst_n), .clr(clr), .ce(ce_src), .d(wdata), .q(src_base));
  dma_reg32 #(.WIDTH(32)) u_dst (
    .clk(clk), .rst_n(rst_n), .clr(clr), .ce(ce_dst), .d(wdata), .q(dst_base));
  dma_reg32 #(.WIDTH(32)) u_len (
    .clk(clk), .rst_n(rst_n), .clr(clr), .ce(ce_len), .d(wdata), .q(length));

endmodule
