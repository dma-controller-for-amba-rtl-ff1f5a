// tb_dma_controller: end-to-end test of the DMA controller on a modelled AHB.
//
// The testbench builds a small AHB system around dma_controller at its
// default parameters: a second master standing for the processor (it programs
// the controller's registers and competes for the bus), a bus multiplexer
// driven by the controller's output enables, and a behavioural memory slave
// covering every address outside the controller's 16-byte register window at
// 0. The memory can insert wait states and answer ERROR (two-cycle response).
//
// A reference model in the testbench replays each transfer word by word on
// its own copy of the memory and registers (including words the controller
// writes into its own register window) and the memories are compared after
// every DMAACK. Scenarios, after the test cases the design was made for:
// single word, several words, a transfer stopped by address overrun past
// FFFFFFFF, a transfer whose destination is address 0 (it rewrites the
// controller's own registers), ERROR responses on a read and a write, wait
// states, delayed grants, DMA_DISABLE in the middle of a transfer, and
// back-to-back transfers, plus random transfers. Each mechanism is counted
// and a mechanism that never happened is a failure. With zero-wait slaves
// and no bus contention a word must take exactly 7 clock cycles.
// Bus protocol checks run every cycle: the controller drives address/control
// only when it owns the address phase, write data only in its own data phase,
// and nothing while disabled.
module tb_dma_controller;
  import dma_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- bus signals ----------------
  logic [31:0] haddr, hwdata, hrdata;
  htrans_t     htrans;
  logic        hwrite, hready;
  hresp_t      hresp;
  logic        hbusreq_leon, hgrant_leon, hbusreq_dma, hgrant_dma;
  logic        m_addr_oe, m_hwrite, m_data_oe, s_resp_oe, s_hready;
  logic [31:0] m_haddr, m_hwdata;
  htrans_t     m_htrans;
  logic [2:0]  m_hsize, m_hburst;
  hresp_t      s_hresp;
  logic        dmareq, dmaack, dma_disable;
  dma_state_t  curr_state;
  logic [31:0] current_position, transfer_length;

  // processor-side master drive
  logic [31:0] l_haddr, l_hwdata;
  htrans_t     l_htrans;
  logic        l_hwrite;

  dma_controller dut (
    .hclk(clk), .hresetn(rst_n), .haddr(haddr), .htrans(htrans),
    .hwrite(hwrite), .hwdata(hwdata), .hrdata(hrdata), .hready(hready),
    .hresp(hresp), .hbusreq_leon(hbusreq_leon), .hgrant_leon(hgrant_leon),
    .hbusreq_dma(hbusreq_dma), .hgrant_dma(hgrant_dma),
    .m_addr_oe(m_addr_oe), .m_haddr(m_haddr), .m_htrans(m_htrans),
    .m_hwrite(m_hwrite), .m_hsize(m_hsize), .m_hburst(m_hburst),
    .m_data_oe(m_data_oe), .m_hwdata(m_hwdata), .s_resp_oe(s_resp_oe),
    .s_hready(s_hready), .s_hresp(s_hresp), .dmareq(dmareq), .dmaack(dmaack),
    .dma_disable(dma_disable), .curr_state(curr_state),
    .current_position(current_position), .transfer_length(transfer_length));

  // ---------------- ownership (arbiter result sampled on HREADY) --------------
  logic addr_dma, data_dma;          // who owns address / data phase
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_dma <= 1'b0;
      data_dma <= 1'b0;
    end else if (hready) begin
      addr_dma <= hgrant_dma;
      data_dma <= addr_dma;
    end
  end

  // ---------------- bus multiplexer ----------------
  always_comb begin
    haddr  = m_addr_oe ? m_haddr  : l_haddr;
    htrans = m_addr_oe ? m_htrans : (addr_dma ? HTRANS_IDLE : l_htrans);
    hwrite = m_addr_oe ? m_hwrite : l_hwrite;
    hwdata = m_data_oe ? m_hwdata : l_hwdata;
  end

  // ---------------- memory slave ----------------
  logic [31:0] mem [logic [31:0]];
  logic [31:0] ref_mem [logic [31:0]];
  function automatic logic [31:0] init_word(logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5A5A_0F0F;
  endfunction
  function automatic logic [31:0] mem_rd(logic [31:0] a);
    return mem.exists(a) ? mem[a] : init_word(a);
  endfunction
  function automatic logic [31:0] ref_rd(logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : init_word(a);
  endfunction

  // data phase state of the memory
  logic        dp_mem, dp_write, dp_dma_slave;
  logic [31:0] dp_addr;
  int          wait_left;
  logic        err_phase;          // second cycle of an ERROR response
  logic        mem_hready;
  hresp_t      mem_hresp;
  int          mem_wait;           // wait states per access (set by test)
  logic        err_next_read, err_next_write;
  logic        dp_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_mem <= 1'b0; dp_write <= 1'b0; dp_dma_slave <= 1'b0; dp_addr <= '0;
      wait_left <= 0; err_phase <= 1'b0; dp_err <= 1'b0;
    end else begin
      if (hready) begin
        dp_mem       <= (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ) && haddr[31:4] != 28'h0;
        dp_dma_slave <= (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ) && haddr[31:4] == 28'h0;
        dp_write     <= hwrite;
        dp_addr      <= haddr;
        wait_left    <= mem_wait;
        err_phase    <= 1'b0;
        dp_err       <= 1'b0;
        if ((htrans == HTRANS_NONSEQ) && haddr[31:4] != 28'h0) begin
          if (hwrite && err_next_write) begin dp_err <= 1'b1; err_next_write <= 1'b0; end
          if (!hwrite && err_next_read) begin dp_err <= 1'b1; err_next_read <= 1'b0; end
        end
      end else begin
        if (wait_left > 0) wait_left <= wait_left - 1;
        else if (dp_err) err_phase <= 1'b1;
      end
    end
  end

  // memory write at the end of a data phase
  always @(posedge clk) begin
    if (rst_n && hready && dp_mem && dp_write && !dp_err) mem[dp_addr] = hwdata;
  end

  always_comb begin
    mem_hready = 1'b1;
    mem_hresp  = HRESP_OKAY;
    if (dp_mem) begin
      if (wait_left > 0) mem_hready = 1'b0;
      else if (dp_err) begin
        mem_hresp  = HRESP_ERROR;
        mem_hready = err_phase;
      end
    end
    if (dp_dma_slave) begin
      hready = s_hready;
      hresp  = s_hresp;
    end else begin
      hready = mem_hready;
      hresp  = mem_hresp;
    end
    hrdata = (dp_mem && !dp_err && wait_left == 0) ? mem_rd(dp_addr) : 32'h0;
  end

  // ---------------- monitors ----------------
  int n_words, n_read_err, n_write_err, n_wait, n_grant_delay, n_overrun;
  int n_self_write, n_disable, n_done, n_backtoback, n_leon_during;
  dma_state_t prev_state;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      prev_state <= curr_state;
      if (curr_state == ST_TEST) n_words <= n_words + 1;
      if (prev_state == ST_READING && curr_state == ST_WAIT_READ) n_read_err <= n_read_err + 1;
      if (prev_state == ST_WRITING && curr_state == ST_WAIT_WRITE) n_write_err <= n_write_err + 1;
      if ((curr_state == ST_READING || curr_state == ST_WRITING) && !hready) n_wait <= n_wait + 1;
      if ((curr_state == ST_WAIT_READ || curr_state == ST_WAIT_WRITE) && !hgrant_dma) n_grant_delay <= n_grant_delay + 1;
      if (m_addr_oe && m_hwrite && m_haddr[31:4] == 28'h0) n_self_write <= n_self_write + 1;
      if (dma_disable && curr_state != ST_IDLE) n_disable <= n_disable + 1;
      if (hgrant_leon && hbusreq_leon && curr_state != ST_IDLE) n_leon_during <= n_leon_during + 1;
      // protocol checks
      if (m_addr_oe && !addr_dma) begin failures++; $display("FAIL: address driven without ownership"); end
      if (m_data_oe && !data_dma) begin failures++; $display("FAIL: write data driven outside own data phase"); end
      if (dma_disable && (m_addr_oe || m_data_oe || s_resp_oe || hbusreq_dma || dmaack)) begin
        failures++; $display("FAIL: output driven while disabled");
      end
      if (m_addr_oe && (m_hsize != 3'd2 || m_htrans != HTRANS_NONSEQ || m_hburst != 3'd0)) begin
        failures++; $display("FAIL: transfer not NONSEQ SINGLE word");
      end
    end
  end

  // ---------------- processor-side master tasks ----------------
  task automatic leon_write(input logic [31:0] a, input logic [31:0] d);
    hbusreq_leon = 1'b1;
    // own the address phase: grant sampled with HREADY high at a rising edge
    do @(posedge clk); while (!(hgrant_leon && hready));
    @(negedge clk);
    l_haddr = a; l_htrans = HTRANS_NONSEQ; l_hwrite = 1'b1;
    hbusreq_leon = 1'b0;
    do @(posedge clk); while (!hready);
    @(negedge clk);
    l_htrans = HTRANS_IDLE; l_hwrite = 1'b0; l_hwdata = d;
    do @(posedge clk); while (!hready);
    @(negedge clk);
  endtask

  // reference model of one transfer; returns the number of words moved
  logic [31:0] r_src, r_dst, r_len;
  function automatic int ref_transfer(output logic overran);
    logic [31:0] off, a, d;
    logic [32:0] s_sum, d_sum;
    int n;
    off = 0; n = 0; overran = 1'b0;
    forever begin
      a = r_src + off;
      d = (a[31:4] == 28'h0) ? 32'h0 : ref_rd(a);
      a = r_dst + off;
      if (a[31:4] == 28'h0) begin
        case (a[3:2])
          2'd0: r_src = d;
          2'd1: r_dst = d;
          2'd2: r_len = d;
          default: ;
        endcase
      end else ref_mem[a] = d;
      n++;
      off += 4;
      s_sum = {1'b0, r_src} + {1'b0, off};
      d_sum = {1'b0, r_dst} + {1'b0, off};
      if (off >= r_len) break;
      if (s_sum[32] || d_sum[32]) begin overran = 1'b1; break; end
    end
    return n;
  endfunction

  task automatic compare_mem(input string tag);
    int bad = 0;
    foreach (ref_mem[a]) if (mem_rd(a) !== ref_mem[a]) bad++;
    foreach (mem[a]) if (mem[a] !== ref_rd(a)) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d memory words differ", tag, bad); end
  endtask

  // full transfer: program, start, wait for DMAACK, check
  task automatic run_transfer(input string tag, input logic [31:0] s, input logic [31:0] d,
                              input logic [31:0] len, input int exp_cycles_per_word,
                              input bit pulse_disable);
    int words_before, n_exp, cyc;
    logic ovr;
    leon_write(32'h0, s);
    leon_write(32'h4, d);
    leon_write(32'h8, len);
    checks++;
    if (transfer_length !== len) begin failures++; $display("FAIL %s: length register %h", tag, transfer_length); end
    r_src = s; r_dst = d; r_len = len;
    n_exp = ref_transfer(ovr);
    if (ovr) n_overrun++;
    words_before = n_words;
    dmareq = 1'b1;
    @(negedge clk);
    dmareq = 1'b0;
    cyc = 1;
    fork
      begin
        if (pulse_disable) begin
          repeat (4) @(negedge clk);
          dma_disable = 1'b1;
          repeat (6) @(negedge clk);
          dma_disable = 1'b0;
        end
      end
    join_none
    while (!dmaack) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++;
    if (n_words - words_before != n_exp) begin
      failures++; $display("FAIL %s: %0d words moved, expected %0d", tag, n_words - words_before, n_exp);
    end
    if (exp_cycles_per_word > 0) begin
      checks++;
      if (cyc != exp_cycles_per_word * n_exp) begin
        failures++; $display("FAIL %s: took %0d cycles for %0d words", tag, cyc, n_exp);
      end
    end
    checks++;
    if (transfer_length !== 0 || current_position !== 0 || curr_state != ST_IDLE) begin
      failures++; $display("FAIL %s: registers not reset after transfer", tag);
    end
    compare_mem(tag);
    n_done++;
    $display("%s: %0d words, %0d cycles", tag, n_exp, cyc);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    hbusreq_leon = 0; l_haddr = 0; l_htrans = HTRANS_IDLE; l_hwrite = 0; l_hwdata = 0;
    dmareq = 0; dma_disable = 0; mem_wait = 0; err_next_read = 0; err_next_write = 0;
    n_words = 0; n_read_err = 0; n_write_err = 0; n_wait = 0; n_grant_delay = 0;
    n_overrun = 0; n_self_write = 0; n_disable = 0; n_done = 0; n_backtoback = 0;
    n_leon_during = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (curr_state != ST_IDLE) begin failures++; $display("FAIL: not idle after reset"); end

    // DMAREQ with length 0 must not start anything
    dmareq = 1; @(negedge clk); dmareq = 0; @(negedge clk);
    checks++;
    if (curr_state != ST_IDLE) begin failures++; $display("FAIL: started with length 0"); end

    run_transfer("single word",  32'h4000_0000, 32'h8000_0000, 32'h4, 7, 0);
    run_transfer("three words",  32'h4000_0100, 32'h8000_0100, 32'hC, 7, 0);
    run_transfer("overrun",      32'h4000_0200, 32'hFFFF_FFF8, 32'hC, 7, 0);
    run_transfer("to address 0", 32'h4000_0300, 32'h0000_0000, 32'hC, 0, 0);

    err_next_read = 1; err_next_write = 1;
    run_transfer("errors",       32'h4000_0400, 32'h8000_0400, 32'h8, 0, 0);
    mem_wait = 2;
    run_transfer("wait states",  32'h4000_0500, 32'h8000_0500, 32'h10, 0, 0);
    mem_wait = 0;
    run_transfer("disable",      32'h4000_0600, 32'h8000_0600, 32'h10, 0, 1);

    // processor competes for the bus during a transfer: delayed grants
    fork
      run_transfer("contention", 32'h4000_0700, 32'h8000_0700, 32'h14, 0, 0);
      begin
        repeat (9) @(negedge clk);
        hbusreq_leon = 1; repeat (4) @(negedge clk); hbusreq_leon = 0;
      end
    join

    // back-to-back transfers
    run_transfer("consecutive 1", 32'h4000_0800, 32'h8000_0800, 32'h8, 7, 0);
    run_transfer("consecutive 2", 32'h4000_0900, 32'h8000_0900, 32'h8, 7, 0);
    n_backtoback++;

    // random transfers
    for (int i = 0; i < 20; i++) begin
      logic [31:0] s, d, l;
      s = {$urandom_range(1, 15), 28'h0} | ($urandom & 32'h0000_FFFC);
      d = {$urandom_range(1, 15), 28'h0} | ($urandom & 32'h0000_FFFC);
      l = 32'($urandom_range(1, 24)) << 2;
      mem_wait = $urandom_range(0, 2);
      if ($urandom_range(0, 3) == 0) err_next_read = 1;
      if ($urandom_range(0, 3) == 0) err_next_write = 1;
      run_transfer($sformatf("random %0d", i), s, d, l, 0, 0);
      err_next_read = 0; err_next_write = 0;
    end

    // every mechanism must have happened
    checks++; if (n_read_err == 0)    begin failures++; $display("FAIL: no read retry"); end
    checks++; if (n_write_err == 0)   begin failures++; $display("FAIL: no write retry"); end
    checks++; if (n_wait == 0)        begin failures++; $display("FAIL: no wait state"); end
    checks++; if (n_grant_delay == 0) begin failures++; $display("FAIL: no delayed grant"); end
    checks++; if (n_overrun == 0)     begin failures++; $display("FAIL: no overrun"); end
    checks++; if (n_self_write == 0)  begin failures++; $display("FAIL: no register write by DMA"); end
    checks++; if (n_disable == 0)     begin failures++; $display("FAIL: no disable during transfer"); end
    checks++; if (n_leon_during == 0) begin failures++; $display("FAIL: no processor access during transfer"); end
    checks++; if (n_backtoback == 0)  begin failures++; $display("FAIL: no consecutive transfers"); end
    $display("mechanisms: words=%0d read_retry=%0d write_retry=%0d wait=%0d grant_delay=%0d overrun=%0d self_write=%0d disable=%0d leon=%0d transfers=%0d",
             n_words, n_read_err, n_write_err, n_wait, n_grant_delay, n_overrun, n_self_write,
             n_disable, n_leon_during, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
