// dma_timing_control: the state machine that runs a DMA transfer on the AHB.
//
// A transfer copies LENGTH bytes, one 32-bit word at a time, from SRC_BASE to
// DST_BASE. Each word is moved in two single AHB transfers through the buffer
// register: a read from SRC_BASE+offset, then a write to DST_BASE+offset.
//
//   RESET  -> IDLE                   one clock after the bus reset
//   IDLE   -> WAIT_READ              DMAREQ high and LENGTH > 0
//   WAIT_READ  -> PAUSE_READ         HGRANT and HREADY: the bus is ours
//   PAUSE_READ -> READING            read address phase accepted (HREADY)
//   READING    -> WAIT_WRITE         HREADY and OKAY: word into the buffer
//   READING    -> WAIT_READ          response not OKAY: read the word again
//   WAIT_WRITE -> PAUSE_WRITE        HGRANT and HREADY
//   PAUSE_WRITE-> WRITING            write address phase accepted (HREADY)
//   WRITING    -> TEST               HREADY and OKAY: offset steps by 4
//   WRITING    -> WAIT_WRITE         response not OKAY: write the word again
//   TEST   -> IDLE                   offset >= LENGTH, or the next word's source
//                                    or destination address passes FFFFFFFF:
//                                    DMAACK and REGS_CLR are high in this cycle
//   TEST   -> WAIT_READ              otherwise
//
// READING and WRITING stay put while HREADY is low (a slave extending its
// data phase). The states, the retry on error, the waits and the
// completion/overrun test follow the document's final state diagram. This
// design's own choices: the test is offset >= LENGTH (the diagram prints
// "Offset > Length", but a one-word transfer of length 4 must stop at offset
// 4); the pause states also wait for HREADY so that an address phase is held
// while a previous data phase is extended; any response other than OKAY
// (ERROR, RETRY, SPLIT) counts as an error; HBUSREQ is high only in the two
// wait states; the transfers are NONSEQ, SINGLE, word sized.
//
// Outputs: ADDR_OWN is high in the address-phase states (drive HADDR and
// controls), DATA_OWN in WRITING (drive HWDATA), BUF_CE loads HRDATA into the
// buffer, CNT_CE steps the offset counter. With an immediate grant and
// zero-wait slaves one word takes 7 clock cycles.
module dma_timing_control
  import dma_pkg::*;
(
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        dmareq,
  input  logic [31:0] src_base,
  input  logic [31:0] dst_base,
  input  logic [31:0] length,
  input  logic [31:0] offset,      // current byte offset (counter output)
  input  logic        hgrant,
  input  logic        hready,
  input  hresp_t      hresp,
  output logic        hbusreq,
  output logic [31:0] haddr,
  output htrans_t     htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic        addr_own,
  output logic        data_own,
  output logic        buf_ce,
  output logic        cnt_ce,
  output logic        regs_clr,
  output logic        dmaack,
  output dma_state_t  state
);

  dma_state_t  next;
  logic [32:0] src_sum, dst_sum;   // one extra bit to see an address overrun
  logic        done, overrun, resp_ok;

  assign src_sum = {1'b0, src_base} + {1'b0, offset};
  assign dst_sum = {1'b0, dst_base} + {1'b0, offset};
  assign overrun = src_sum[32] || dst_sum[32];
  assign done    = (offset >= length) || overrun;
  assign resp_ok = (hresp == HRESP_OKAY);

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) state <= ST_RESET;
    else          state <= next;
  end

  always_comb begin
    next = state;
    unique case (state)
      ST_RESET:       next = ST_IDLE;
      ST_IDLE:        if (dmareq && length != '0) next = ST_WAIT_READ;
      ST_WAIT_READ:   if (hgrant && hready) next = ST_PAUSE_READ;
      ST_PAUSE_READ:  if (hready) next = ST_READING;
      ST_READING:     if (!resp_ok) next = ST_WAIT_READ;
                      else if (hready) next = ST_WAIT_WRITE;
      ST_WAIT_WRITE:  if (hgrant && hready) next = ST_PAUSE_WRITE;
      ST_PAUSE_WRITE: if (hready) next = ST_WRITING;
      ST_WRITING:     if (!resp_ok) next = ST_WAIT_WRITE;
                      else if (hready) next = ST_TEST;
      ST_TEST:        next = done ? ST_IDLE : ST_WAIT_READ;
      default:        next = ST_RESET;
    endcase
  end

  always_comb begin
    hbusreq  = (state == ST_WAIT_READ) || (state == ST_WAIT_WRITE);
    addr_own = (state == ST_PAUSE_READ) || (state == ST_PAUSE_WRITE);
    data_own = (state == ST_WRITING);
    haddr    = (state == ST_PAUSE_WRITE) ? dst_sum[31:0] : src_sum[31:0];
    hwrite   = (state == ST_PAUSE_WRITE);
    htrans   = addr_own ? HTRANS_NONSEQ : HTRANS_IDLE;
    hsize    = HSIZE_WORD;
    hburst   = HBURST_SINGLE;
    buf_ce   = (state == ST_READING) && hready && resp_ok;
    cnt_ce   = (state == ST_WRITING) && hready && resp_ok;
    dmaack   = (state == ST_TEST) && done;
    regs_clr = dmaack || (state == ST_RESET);
  end

  // Bus rules: DMAACK is a one-cycle strobe; the controller never requests
  // the bus while it drives an address phase; an address phase is only
  // started from a grant sampled with HREADY high.
  a_ack_strobe: assert property (@(posedge hclk) disable iff (!hresetn) dmaack |=> !dmaack);
  a_req_own:    assert property (@(posedge hclk) disable iff (!hresetn) !(hbusreq && addr_own));
  a_own_grant:  assert property (@(posedge hclk) disable iff (!hresetn)
                  (state inside {ST_WAIT_READ, ST_WAIT_WRITE}) && addr_own == 1'b0 ##1 addr_own
                  |-> $past(hgrant && hready));

endmodule
