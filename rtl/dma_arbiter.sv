// dma_arbiter: combinational AHB arbiter for two masters, LEON and the DMA.
//
// LEON, the processor, has priority and is the default master: the DMA
// controller is granted the bus only while it requests it, LEON does not, and
// DMA_DISABLE is low, as the document states. Whenever the DMA is not granted
// the grant goes to LEON (the document's waveform shows LEON's grant as the
// complement of the DMA's; making LEON the default master is this design's
// reading). The logic is purely combinational, like the document's; the bus
// clock input HCLK is kept, unused, for a later synchronous version, as in the
// document. Grant handover still happens only when HREADY is high, because
// each master takes ownership from its grant sampled with HREADY.
module dma_arbiter (
  input  logic hclk,          // unused: reserved for a registered arbiter
  input  logic hbusreq_leon,
  input  logic hbusreq_dma,
  input  logic dma_disable,
  output logic hgrant_leon,
  output logic hgrant_dma
);

  always_comb begin
    hgrant_dma  = hbusreq_dma && !hbusreq_leon && !dma_disable;
    hgrant_leon = !hgrant_dma;
  end

endmodule
