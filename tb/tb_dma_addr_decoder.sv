// tb_dma_addr_decoder: AHB slave decoding of the register window.
// Random bus cycles (any HTRANS, read or write, inside or near the window at
// BASE_ADDR, HREADY sometimes low) are applied; a model of the AHB pipeline in
// the testbench says which register enable must be high in each data phase.
// Also checks that the slave answers zero-wait OKAY and flags its own data
// phases. Run with BASE_ADDR = 0x8000_0000 to make sure the base is decoded.
module tb_dma_addr_decoder;
  import dma_pkg::*;
  localparam logic [31:0] BASE = 32'h8000_0000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] haddr;
  htrans_t htrans;
  logic hwrite, hready, ce_src, ce_dst, ce_len, hreadyout, resp_oe;
  hresp_t hresp;
  int checks = 0, failures = 0;
  // model of the data phase
  logic m_sel, m_wr; logic [1:0] m_idx;
  int n_ce = 0;
  always #5 clk = ~clk;

  dma_addr_decoder #(.BASE_ADDR(BASE)) dut (
    .hclk(clk), .hresetn(rst_n), .haddr(haddr), .htrans(htrans), .hwrite(hwrite),
    .hready(hready), .ce_src(ce_src), .ce_dst(ce_dst), .ce_len(ce_len),
    .hreadyout(hreadyout), .hresp(hresp), .resp_oe(resp_oe));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    haddr = 0; htrans = HTRANS_IDLE; hwrite = 0; hready = 1;
    m_sel = 0; m_wr = 0; m_idx = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      // drive a new cycle
      case ($urandom_range(0, 3))
        0: haddr = BASE + 32'($urandom_range(0, 3) * 4);
        1: haddr = BASE + 32'($urandom_range(0, 3) * 4);
        2: haddr = BASE + 32'h10 + 32'($urandom_range(0, 3) * 4);
        default: haddr = $urandom & ~32'h3;
      endcase
      htrans = htrans_t'($urandom_range(0, 3));
      hwrite = $urandom;
      hready = ($urandom_range(0, 4) != 0);
      #1;
      // check the data phase now in progress
      checks++;
      if (ce_src !== (m_wr && hready && m_idx == 0) || ce_dst !== (m_wr && hready && m_idx == 1) ||
          ce_len !== (m_wr && hready && m_idx == 2)) begin
        failures++; $display("FAIL: enables %b%b%b, model wr=%b idx=%0d hready=%b", ce_src, ce_dst, ce_len, m_wr, m_idx, hready);
      end
      checks++;
      if (resp_oe !== m_sel || hreadyout !== 1'b1 || hresp !== HRESP_OKAY) begin
        failures++; $display("FAIL: response oe=%b model=%b", resp_oe, m_sel);
      end
      if (ce_src || ce_dst || ce_len) n_ce++;
      @(posedge clk);
      if (hready) begin
        m_sel = (haddr[31:4] == BASE[31:4]) && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);
        m_wr  = m_sel && hwrite;
        m_idx = haddr[3:2];
      end
      @(negedge clk);
    end
    checks++;
    if (n_ce < 50) begin failures++; $display("FAIL: too few register writes (%0d)", n_ce); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
