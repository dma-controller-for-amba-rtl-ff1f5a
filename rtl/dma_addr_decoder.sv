// dma_addr_decoder: AHB slave front end of the controller's register window.
//
// The processor sets up a transfer by writing three 32-bit registers on the
// AHB. This block watches the shared bus: in the address phase it recognises a
// write (HTRANS NONSEQ or SEQ, HWRITE high, HREADY high) to the 16-byte window
// at BASE_ADDR and remembers which register it addresses; in the following
// data phase it raises exactly one clock enable so that the register takes
// HWDATA at the edge that ends the data phase. Register map (byte offsets):
// 0x0 source base address, 0x4 destination base address, 0x8 transfer length
// in bytes, 0xC unused. The registers are write only, so the slave returns no
// read data. It never inserts wait states and always answers OKAY; RESP_OE
// tells the bus that it is the selected slave in the current data phase and
// so drives HREADY and HRESP.
//
// From the document: three write-only registers enabled by this decoder, the
// order source, destination, length, and the base address 0 used in its
// tests. This design's choices: the window size, the zero-wait OKAY answer,
// and decoding the address itself rather than taking a select line from a
// central decoder. HADDR[1:0] are not used: the registers are word wide and
// only word accesses are expected.
module dma_addr_decoder
  import dma_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'h0000_0000
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic [31:0] haddr,
  input  htrans_t     htrans,
  input  logic        hwrite,
  input  logic        hready,      // bus HREADY
  output logic        ce_src,
  output logic        ce_dst,
  output logic        ce_len,
  output logic        hreadyout,
  output hresp_t      hresp,
  output logic        resp_oe
);

  logic       sel;          // address phase hits the window
  logic       active;       // address phase is a real transfer
  logic       dp_sel;       // data phase belongs to this slave
  logic       dp_write;     // data phase is a register write
  logic [1:0] dp_index;     // register addressed in the data phase

  assign sel    = (haddr[31:4] == BASE_ADDR[31:4]);
  assign active = (htrans == HTRANS_NONSEQ) || (htrans == HTRANS_SEQ);

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_sel   <= 1'b0;
      dp_write <= 1'b0;
      dp_index <= '0;
    end else if (hready) begin
      dp_sel   <= sel && active;
      dp_write <= sel && active && hwrite;
      dp_index <= haddr[3:2];
    end
  end

  always_comb begin
    ce_src = dp_write && hready && (dp_index == 2'd0);
    ce_dst = dp_write && hready && (dp_index == 2'd1);
    ce_len = dp_write && hready && (dp_index == 2'd2);
  end

  // at most one register is written per data phase
  a_one_ce: assert property (@(posedge hclk) disable iff (!hresetn) $onehot0({ce_src, ce_dst, ce_len}));

  assign hreadyout = 1'b1;
  assign hresp     = HRESP_OKAY;
  assign resp_oe   = dp_sel;

endmodule
