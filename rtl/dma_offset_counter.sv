// dma_offset_counter: byte offset of the current word within a DMA transfer.
//
// The bus is byte addressed while the controller moves whole 32-bit words, so
// the counter steps by STEP = 4 bytes per word (as in the document) and wraps
// from FFFFFFFC back to 0. CE advances it at the rising clock edge, CLR
// returns it to zero and has priority, RST_N is the asynchronous bus reset.
// The document's counter steps on the falling clock edge and is followed by a
// register on the rising edge, so that the completion test sees the new value
// one clock earlier; this design keeps a single rising-edge clock and gets the
// same saving by stepping on the rising edge that ends the word's write.
module dma_offset_counter #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned STEP  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             ce,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] q_next;

  assign q_next = q + WIDTH'(STEP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (ce)  q <= q_next;
  end

endmodule
