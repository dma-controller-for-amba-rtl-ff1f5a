// tb_dma_ahb_buffer: random values and ownership flags through the bus
// buffering block. Each group must reach the bus with its enable high exactly
// when owned and not disabled, and read zero/idle otherwise; DMA_DISABLE must
// take every output off the bus.
module tb_dma_ahb_buffer;
  import dma_pkg::*;
  logic clk = 1'b0;
  logic dis, a_own, d_own, r_own, hwrite_i, hready_i, busreq_i, ack_i;
  logic [31:0] haddr_i, hwdata_i;
  htrans_t htrans_i; hresp_t hresp_i;
  logic [2:0] hsize_i, hburst_i;
  logic a_oe, d_oe, r_oe, hwrite_o, hready_o, busreq_o, ack_o;
  logic [31:0] haddr_o, hwdata_o;
  htrans_t htrans_o; hresp_t hresp_o;
  logic [2:0] hsize_o, hburst_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dma_ahb_buffer dut (
    .dma_disable(dis), .addr_own(a_own), .haddr_i(haddr_i), .htrans_i(htrans_i),
    .hwrite_i(hwrite_i), .hsize_i(hsize_i), .hburst_i(hburst_i), .data_own(d_own),
    .hwdata_i(hwdata_i), .resp_own(r_own), .hready_i(hready_i), .hresp_i(hresp_i),
    .hbusreq_i(busreq_i), .dmaack_i(ack_i), .addr_oe(a_oe), .haddr_o(haddr_o),
    .htrans_o(htrans_o), .hwrite_o(hwrite_o), .hsize_o(hsize_o), .hburst_o(hburst_o),
    .data_oe(d_oe), .hwdata_o(hwdata_o), .resp_oe(r_oe), .hready_o(hready_o),
    .hresp_o(hresp_o), .hbusreq_o(busreq_o), .dmaack_o(ack_o));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      dis = ($urandom_range(0, 3) == 0);
      a_own = $urandom; d_own = $urandom; r_own = $urandom;
      haddr_i = $urandom; hwdata_i = $urandom; htrans_i = htrans_t'($urandom_range(0, 3));
      hresp_i = hresp_t'($urandom_range(0, 3)); hwrite_i = $urandom; hready_i = $urandom;
      hsize_i = 3'($urandom); hburst_i = 3'($urandom); busreq_i = $urandom; ack_i = $urandom;
      #1;
      check(a_oe == (a_own && !dis), "address enable");
      check(d_oe == (d_own && !dis), "data enable");
      check(r_oe == (r_own && !dis), "response enable");
      if (a_own && !dis)
        check(haddr_o == haddr_i && htrans_o == htrans_i && hwrite_o == hwrite_i &&
              hsize_o == hsize_i && hburst_o == hburst_i, "address group passed");
      else
        check(haddr_o == 0 && htrans_o == HTRANS_IDLE && hwrite_o == 0, "address group off");
      check(hwdata_o == ((d_own && !dis) ? hwdata_i : 32'h0), "write data");
      check(hready_o == ((r_own && !dis) ? hready_i : 1'b0), "slave hready");
      check(hresp_o == ((r_own && !dis) ? hresp_i : HRESP_OKAY), "slave hresp");
      check(busreq_o == (busreq_i && !dis), "bus request");
      check(ack_o == (ack_i && !dis), "dmaack");
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
