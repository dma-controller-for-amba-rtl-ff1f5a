// dma_ahb_buffer: the logic buffering between the controller and the AHB.
//
// Every signal the controller sends to the bus leaves through this block. A
// group of outputs is put on the bus (its *_OE high, values passed) only while
// the controller owns that part of the bus, and DMA_DISABLE takes all of them
// off it at once so the controller can be removed from a running system. An
// output that is off the bus reads as zero and its *_OE is low; the *_OE
// signals are what a tri-state or multiplexed bus uses to select the driver.
// Groups: the master's address and control (HADDR, HTRANS, HWRITE, HSIZE,
// HBURST) while it owns the address phase; the master's HWDATA while it owns
// the write data phase; the slave's HREADY and HRESP while it is the selected
// slave in a data phase; HBUSREQ and the DMAACK strobe, which are point to
// point and are simply forced low.
//
// From the document: one block that floats all the controller's outputs on
// DMA_DISABLE and keeps input and output directions apart. This design's own
// choice: output enables instead of internal tri-state buffers, which FPGAs
// and two-state simulators do not have. Purely combinational.
module dma_ahb_buffer
  import dma_pkg::*;
(
  input  logic        dma_disable,
  // master, address phase
  input  logic        addr_own,
  input  logic [31:0] haddr_i,
  input  htrans_t     htrans_i,
  input  logic        hwrite_i,
  input  logic [2:0]  hsize_i,
  input  logic [2:0]  hburst_i,
  // master, data phase
  input  logic        data_own,
  input  logic [31:0] hwdata_i,
  // slave response
  input  logic        resp_own,
  input  logic        hready_i,
  input  hresp_t      hresp_i,
  // point to point
  input  logic        hbusreq_i,
  input  logic        dmaack_i,
  // to the bus
  output logic        addr_oe,
  output logic [31:0] haddr_o,
  output htrans_t     htrans_o,
  output logic        hwrite_o,
  output logic [2:0]  hsize_o,
  output logic [2:0]  hburst_o,
  output logic        data_oe,
  output logic [31:0] hwdata_o,
  output logic        resp_oe,
  output logic        hready_o,
  output hresp_t      hresp_o,
  output logic        hbusreq_o,
  output logic        dmaack_o
);

  always_comb begin
    addr_oe  = addr_own && !dma_disable;
    data_oe  = data_own && !dma_disable;
    resp_oe  = resp_own && !dma_disable;
    haddr_o  = addr_oe ? haddr_i  : '0;
    htrans_o = addr_oe ? htrans_i : HTRANS_IDLE;
    hwrite_o = addr_oe ? hwrite_i : 1'b0;
    hsize_o  = addr_oe ? hsize_i  : '0;
    hburst_o = addr_oe ? hburst_i : '0;
    hwdata_o = data_oe ? hwdata_i : '0;
    hready_o = resp_oe ? hready_i : 1'b0;
    hresp_o  = resp_oe ? hresp_i  : HRESP_OKAY;
    hbusreq_o = hbusreq_i && !dma_disable;
    dmaack_o  = dmaack_i  && !dma_disable;
  end

endmodule
