// dma_reg32: clock-enabled D register with a clear, 32 bits by default.
//
// The controller holds its transfer details (source, destination, length) and
// the word in flight (the buffer register) in registers of this kind. Q takes
// D at the rising clock edge when CE is high; CLR empties the register at the
// rising edge and has priority over CE; RST_N is the asynchronous bus reset.
// The word width of 32 bits follows the document. The document's register also
// has an output enable that floats Q; here the register always drives Q and
// the floating of bus outputs is done only by the logic buffering block. The
// clear is synchronous, where the document speaks of an asynchronous reset
// from the state machine: a clear driven by state-machine logic is safer when
// sampled by the clock. Timing: one cycle from D to Q.
module dma_reg32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,  // asynchronous, active low
  input  logic             clr,    // synchronous clear, priority over ce
  input  logic             ce,     // clock enable
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (ce)  q <= d;
  end

endmodule
