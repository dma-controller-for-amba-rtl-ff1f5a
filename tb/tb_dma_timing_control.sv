// tb_dma_timing_control: the transfer state machine on its own.
// The testbench plays the rest of the system: it holds the three transfer
// registers and an offset counter of its own (stepped by CNT_CE, cleared by
// REGS_CLR), grants the bus after a random delay, and answers every data
// phase with random wait states and, on request, a two-cycle ERROR. A model
// predicts the next bus access (read of SRC+off, then write of DST+off, the
// same access again after an error) and every accepted address phase is
// compared with it. Checks: number of words, DMAACK with REGS_CLR, the
// overrun stop, no start with length 0, HBUSREQ only while waiting, buffer
// load on every good read, and 7 cycles per word with no waits or delays.
module tb_dma_timing_control;
  import dma_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic dmareq, hgrant, hready, hbusreq, hwrite, addr_own, data_own, buf_ce, cnt_ce, regs_clr, dmaack;
  logic [31:0] src, dst, len, offset, haddr;
  htrans_t htrans; hresp_t hresp;
  logic [2:0] hsize, hburst;
  dma_state_t state;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dma_timing_control dut (
    .hclk(clk), .hresetn(rst_n), .dmareq(dmareq), .src_base(src), .dst_base(dst),
    .length(len), .offset(offset), .hgrant(hgrant), .hready(hready), .hresp(hresp),
    .hbusreq(hbusreq), .haddr(haddr), .htrans(htrans), .hwrite(hwrite), .hsize(hsize),
    .hburst(hburst), .addr_own(addr_own), .data_own(data_own), .buf_ce(buf_ce),
    .cnt_ce(cnt_ce), .regs_clr(regs_clr), .dmaack(dmaack), .state(state));

  // offset counter and registers of the testbench
  always_ff @(posedge clk) begin
    if (!rst_n || regs_clr) offset <= 0;
    else if (cnt_ce) offset <= offset + 4;
  end

  // grant: after grant_delay cycles of request
  int grant_delay = 0, req_cycles = 0;
  always_ff @(posedge clk) req_cycles <= hbusreq ? req_cycles + 1 : 0;
  assign hgrant = hbusreq && (req_cycles >= grant_delay);

  // slave: data phase with waits and errors
  int max_wait = 0;
  bit err_read = 0, err_write = 0;
  logic dp, dp_wr, dp_err; int dp_wait; logic err2;
  logic [31:0] dp_addr;
  always_ff @(posedge clk) begin
    if (!rst_n) begin dp <= 0; dp_wait <= 0; dp_err <= 0; err2 <= 0; dp_wr <= 0; dp_addr <= 0; end
    else if (hready) begin
      dp <= (htrans == HTRANS_NONSEQ);
      dp_wr <= hwrite; dp_addr <= haddr;
      dp_wait <= $urandom_range(0, max_wait);
      dp_err <= 0; err2 <= 0;
      if (htrans == HTRANS_NONSEQ && hwrite && err_write) begin dp_err <= 1; err_write <= 0; end
      if (htrans == HTRANS_NONSEQ && !hwrite && err_read) begin dp_err <= 1; err_read <= 0; end
    end else begin
      if (dp_wait > 0) dp_wait <= dp_wait - 1;
      else if (dp_err) err2 <= 1;
    end
  end
  always_comb begin
    hready = 1; hresp = HRESP_OKAY;
    if (dp) begin
      if (dp_wait > 0) hready = 0;
      else if (dp_err) begin hresp = HRESP_ERROR; hready = err2; end
    end
  end

  // expected access model
  logic exp_wr; logic [31:0] exp_off; int words, n_err_seen, n_bufload;
  always @(posedge clk) begin
    if (rst_n) begin
      if (addr_own && hready) begin
        checks++;
        if (htrans != HTRANS_NONSEQ || hwrite != exp_wr ||
            haddr != (exp_wr ? dst + exp_off : src + exp_off) || hsize != 3'd2) begin
          failures++;
          $display("FAIL: access %s %h, expected %s %h", hwrite ? "W" : "R", haddr,
                   exp_wr ? "W" : "R", exp_wr ? dst + exp_off : src + exp_off);
        end
      end
      if (dp && hready) begin
        if (dp_err) n_err_seen++;
        else if (!dp_wr) exp_wr = 1;
        else begin exp_wr = 0; exp_off += 4; words++; end
      end
      if (dp && hready && !dp_err && !dp_wr) begin
        checks++; if (!buf_ce) begin failures++; $display("FAIL: buffer not loaded"); end
        n_bufload++;
      end
      if (hbusreq && !(state == ST_WAIT_READ || state == ST_WAIT_WRITE)) begin
        failures++; $display("FAIL: bus request outside wait states");
      end
      if (dmaack && !regs_clr) begin failures++; $display("FAIL: DMAACK without register reset"); end
    end
  end

  task automatic run(input logic [31:0] s, input logic [31:0] d, input logic [31:0] l,
                     input int exp_words, input int exp_cycles);
    int cyc;
    src = s; dst = d; len = l; exp_wr = 0; exp_off = 0; words = 0;
    dmareq = 1; @(negedge clk); dmareq = 0; cyc = 1;
    while (!dmaack) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++;
    if (words != exp_words) begin failures++; $display("FAIL: %0d words, expected %0d", words, exp_words); end
    if (exp_cycles > 0) begin
      checks++;
      if (cyc != exp_cycles) begin failures++; $display("FAIL: %0d cycles, expected %0d", cyc, exp_cycles); end
    end
    checks++;
    if (state != ST_IDLE || offset != 0) begin failures++; $display("FAIL: not back to idle"); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dmareq = 0; src = 0; dst = 0; len = 0; exp_wr = 0; exp_off = 0; words = 0;
    n_err_seen = 0; n_bufload = 0;
    @(negedge clk);
    checks++; if (state != ST_RESET || !regs_clr) begin failures++; $display("FAIL: reset state"); end
    rst_n = 1;
    @(negedge clk);
    checks++; if (state != ST_IDLE) begin failures++; $display("FAIL: no idle after reset"); end
    dmareq = 1; @(negedge clk); dmareq = 0; @(negedge clk);
    checks++; if (state != ST_IDLE) begin failures++; $display("FAIL: started with length 0"); end

    run(32'h1000_0000, 32'h2000_0000, 32'h4, 1, 7);
    run(32'h1000_0000, 32'h2000_0000, 32'h20, 8, 56);
    run(32'h1000_0000, 32'hFFFF_FFF8, 32'hC, 2, 14);    // destination overrun
    run(32'hFFFF_FFF0, 32'h2000_0000, 32'h40, 4, 28);   // source overrun
    run(32'h1000_0000, 32'h2000_0000, 32'h6, 2, 14);    // length not a word multiple
    err_read = 1; err_write = 1;
    run(32'h1000_0100, 32'h2000_0100, 32'h8, 2, 0);
    checks++; if (n_err_seen != 2) begin failures++; $display("FAIL: %0d errors seen", n_err_seen); end
    max_wait = 3; grant_delay = 2;
    run(32'h1000_0200, 32'h2000_0200, 32'h28, 10, 0);
    for (int i = 0; i < 10; i++) begin
      max_wait = $urandom_range(0, 3); grant_delay = $urandom_range(0, 3);
      err_read = $urandom; err_write = $urandom;
      begin
        int n;
        n = $urandom_range(1, 16);
        run($urandom & 32'h7FFF_FFFC, $urandom & 32'h7FFF_FFFC, 32'(n * 4), n, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
