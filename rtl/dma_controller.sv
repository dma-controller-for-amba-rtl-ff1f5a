// dma_controller: single-channel AHB DMA controller with its bus arbiter.
//
// The controller copies a block of 32-bit words from one AHB address range to
// another without the processor. The processor (LEON) writes the source base
// address, the destination base address and the length in bytes into three
// registers through the AHB slave port; a pulse on DMAREQ then starts the
// transfer. The controller, as an AHB master, reads each word into a 32-bit
// buffer register and writes it out, stepping a byte-offset counter by 4 per
// word. When the offset reaches the length, or the next word would lie beyond
// address FFFFFFFF, it strobes DMAACK for one cycle and clears its registers.
// A read or write that gets a response other than OKAY is repeated; wait
// states (HREADY low) are waited out.
//
// Blocks: dma_addr_decoder (slave, register enables), dma_config_regs (the
// three registers), dma_reg32 (buffer register), dma_offset_counter,
// dma_timing_control (state machine), dma_ahb_buffer (bus drivers and
// DMA_DISABLE), dma_arbiter (LEON versus DMA). This partition follows the
// document's block diagram; the arbiter is included here so that the whole
// design is one module.
//
// Bus interface: the shared AHB signals come in as plain inputs (HADDR,
// HTRANS, HWRITE, HWDATA as seen by the slaves, HRDATA, HREADY, HRESP as seen
// by the masters). What the controller drives goes out with an output enable
// per group (m_addr_oe, m_data_oe, s_resp_oe); the bus multiplexer or
// tri-state drivers outside use them. The two bus requests come in and the
// two grants go out. CURR_STATE, CURRENT_POSITION and TRANSFER_LENGTH are
// observation outputs. All logic runs on the rising edge of HCLK; HRESETn is
// the asynchronous, active-low bus reset.
module dma_controller
  import dma_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'h0000_0000
) (
  input  logic        hclk,
  input  logic        hresetn,
  // shared bus, as seen by the slave port
  input  logic [31:0] haddr,
  input  htrans_t     htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  // shared bus, as seen by the master
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  hresp_t      hresp,
  // arbitration
  input  logic        hbusreq_leon,
  output logic        hgrant_leon,
  output logic        hbusreq_dma,
  output logic        hgrant_dma,
  // master outputs
  output logic        m_addr_oe,
  output logic [31:0] m_haddr,
  output htrans_t     m_htrans,
  output logic        m_hwrite,
  output logic [2:0]  m_hsize,
  output logic [2:0]  m_hburst,
  output logic        m_data_oe,
  output logic [31:0] m_hwdata,
  // slave outputs
  output logic        s_resp_oe,
  output logic        s_hready,
  output hresp_t      s_hresp,
  // non-AHB control
  input  logic        dmareq,
  output logic        dmaack,
  input  logic        dma_disable,
  // observation
  output dma_state_t  curr_state,
  output logic [31:0] current_position,
  output logic [31:0] transfer_length
);

  logic        ce_src, ce_dst, ce_len;
  logic        dec_hreadyout, dec_resp_oe;
  hresp_t      dec_hresp;
  logic [31:0] src_base, dst_base, buffer_q;
  logic        tc_hbusreq, tc_addr_own, tc_data_own, tc_hwrite;
  logic        buf_ce, cnt_ce, regs_clr, tc_dmaack;
  logic [31:0] tc_haddr;
  htrans_t     tc_htrans;
  logic [2:0]  tc_hsize, tc_hburst;

  dma_addr_decoder #(.BASE_ADDR(BASE_ADDR)) u_decoder (
    .hclk(hclk), .hresetn(hresetn), .haddr(haddr), .htrans(htrans),
    .hwrite(hwrite), .hready(hready), .ce_src(ce_src), .ce_dst(ce_dst),
    .ce_len(ce_len), .hreadyout(dec_hreadyout), .hresp(dec_hresp),
    .resp_oe(dec_resp_oe));

  dma_config_regs u_regs (
    .clk(hclk), .rst_n(hresetn), .clr(regs_clr), .ce_src(ce_src),
    .ce_dst(ce_dst), .ce_len(ce_len), .wdata(hwdata), .src_base(src_base),
    .dst_base(dst_base), .length(transfer_length));

  dma_reg32 #(.WIDTH(32)) u_buffer (
    .clk(hclk), .rst_n(hresetn), .clr(regs_clr), .ce(buf_ce), .d(hrdata),
    .q(buffer_q));

  dma_offset_counter #(.WIDTH(32), .STEP(4)) u_counter (
    .clk(hclk), .rst_n(hresetn), .clr(regs_clr), .ce(cnt_ce),
    .q(current_position));

  dma_timing_control u_control (
    .hclk(hclk), .hresetn(hresetn), .dmareq(dmareq), .src_base(src_base),
    .dst_base(dst_base), .length(transfer_length), .offset(current_position),
    .hgrant(hgrant_dma), .hready(hready), .hresp(hresp), .hbusreq(tc_hbusreq),
    .haddr(tc_haddr), .htrans(tc_htrans), .hwrite(tc_hwrite), .hsize(tc_hsize),
    .hburst(tc_hburst), .addr_own(tc_addr_own), .data_own(tc_data_own),
    .buf_ce(buf_ce), .cnt_ce(cnt_ce), .regs_clr(regs_clr), .dmaack(tc_dmaack),
    .state(curr_state));

  dma_ahb_buffer u_buffering (
    .dma_disable(dma_disable),
    .addr_own(tc_addr_own), .haddr_i(tc_haddr), .htrans_i(tc_htrans),
    .hwrite_i(tc_hwrite), .hsize_i(tc_hsize), .hburst_i(tc_hburst),
    .data_own(tc_data_own), .hwdata_i(buffer_q),
    .resp_own(dec_resp_oe), .hready_i(dec_hreadyout), .hresp_i(dec_hresp),
    .hbusreq_i(tc_hbusreq), .dmaack_i(tc_dmaack),
    .addr_oe(m_addr_oe), .haddr_o(m_haddr), .htrans_o(m_htrans),
    .hwrite_o(m_hwrite), .hsize_o(m_hsize), .hburst_o(m_hburst),
    .data_oe(m_data_oe), .hwdata_o(m_hwdata),
    .resp_oe(s_resp_oe), .hready_o(s_hready), .hresp_o(s_hresp),
    .hbusreq_o(hbusreq_dma), .dmaack_o(dmaack));

  dma_arbiter u_arbiter (
    .hclk(hclk), .hbusreq_leon(hbusreq_leon), .hbusreq_dma(hbusreq_dma),
    .dma_disable(dma_disable), .hgrant_leon(hgrant_leon),
    .hgrant_dma(hgrant_dma));

endmodule
