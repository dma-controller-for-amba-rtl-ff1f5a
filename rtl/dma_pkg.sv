// dma_pkg: shared AHB encodings and the state type of the DMA controller.
//
// The AHB (AMBA 2.0 advanced high-performance bus) field encodings below are
// those of the bus standard. The state list is the one of the final state
// diagram of the controller (reset, idle, and for each of the read and write
// halves of a word: wait for bus, pause, bus data phase; then the completion
// test). The numeric encoding of the states is this design's own choice.
package dma_pkg;

  // HTRANS: transfer type
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_t;

  // HRESP: slave response; anything but OKAY is treated as a failed transfer
  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_t;

  localparam logic [2:0] HSIZE_WORD   = 3'b010;  // 32-bit transfers only
  localparam logic [2:0] HBURST_SINGLE = 3'b000; // no bursts

  // Timing and control states
  typedef enum logic [3:0] {
    ST_RESET     = 4'd0,  // entered only from the global bus reset
    ST_IDLE      = 4'd1,  // waiting for DMAREQ with a non-zero length
    ST_WAIT_READ = 4'd2,  // bus requested for the read of a word
    ST_PAUSE_READ = 4'd3, // address phase of the read
    ST_READING   = 4'd4,  // data phase of the read ("finish getting word")
    ST_WAIT_WRITE = 4'd5, // bus requested for the write of the word
    ST_PAUSE_WRITE = 4'd6,// address phase of the write
    ST_WRITING   = 4'd7,  // data phase of the write
    ST_TEST      = 4'd8   // test for completion or address overrun
  } dma_state_t;

endpackage
