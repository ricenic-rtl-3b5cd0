// tb_bridge_spartan: PIO flits from the link must become single accesses
// on the SRAM port (checked: we, address, data, byte enables) and come
// back as flits of the same kind with the port's read data; DMA flits
// must pass to the back end and back-end flits to the link; a context
// event must go out ahead of a waiting DMA flit, carrying its context.
module tb_bridge_spartan;
  import ricenic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  br_flit_t link_rx = '0, link_tx, dma_in_flit, dma_out_flit = '0;
  logic link_rx_valid = 0, link_rx_ready, link_tx_valid, link_tx_ready = 0;
  logic n_req, n_we, n_ack = 0;
  logic [20:0] n_addr;
  logic [63:0] n_wdata, n_rdata = '0;
  logic [7:0] n_be;
  logic evt_valid = 0, evt_ready;
  logic [6:0] evt_ctx = '0;
  logic dma_in_valid, dma_in_ready = 1, dma_out_valid = 0, dma_out_ready;
  int checks = 0, failures = 0;

  bridge_spartan dut (.clk, .rst_n, .link_rx, .link_rx_valid, .link_rx_ready,
    .link_tx, .link_tx_valid, .link_tx_ready, .n_req, .n_we, .n_addr, .n_wdata, .n_be, .n_ack, .n_rdata,
    .evt_valid, .evt_ctx, .evt_ready, .dma_in_flit, .dma_in_valid, .dma_in_ready,
    .dma_out_flit, .dma_out_valid, .dma_out_ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // SRAM port model: answers after two cycles, logs accesses
  typedef struct { logic we; logic [20:0] a; logic [63:0] d; logic [7:0] be; } acc_t;
  acc_t accs [$];
  initial forever begin
    @(negedge clk);
    if (n_req) begin
      accs.push_back('{n_we, n_addr, n_wdata, n_be});
      repeat (2) @(negedge clk);
      n_ack = 1; n_rdata = {43'd0, n_addr} ^ 64'hA5A5;
      @(negedge clk);
      n_ack = 0;
    end
  end

  br_flit_t out [$];
  br_flit_t to_dma [$];
  always @(negedge clk) link_tx_ready = ($urandom % 2);
  always @(posedge clk) begin
    if (link_tx_valid && link_tx_ready) out.push_back(link_tx);
    if (dma_in_valid && dma_in_ready) to_dma.push_back(dma_in_flit);
  end

  task automatic put(input br_flit_t f);
    @(negedge clk);
    link_rx = f; link_rx_valid = 1;
    #1;
    while (!link_rx_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    link_rx_valid = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  br_flit_t f;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 10; k++) begin
      f = '0; f.kind = (k % 2) ? BR_PIO_RD : BR_PIO_WR; f.addr = 64'(k * 4104);
      f.data = {$urandom, $urandom}; f.be = 8'(k + 1);
      put(f);
      wait (out.size() == k + 1);
      check(accs.size() == k + 1 && accs[k].we == (k % 2 == 0) && accs[k].a == 21'(k * 4104)
            && (accs[k].we ? (accs[k].d == f.data && accs[k].be == f.be) : 1'b1), $sformatf("access %0d", k));
      check(out[k].kind == f.kind, $sformatf("answer kind %0d", k));
      if (k % 2) check(out[k].data == ({43'd0, 21'(k * 4104)} ^ 64'hA5A5), $sformatf("answer data %0d", k));
    end
    // DMA both ways
    for (int k = 0; k < 4; k++) begin
      f = '0; f.kind = BR_DMA_DATA; f.data = 64'(k);
      put(f);
    end
    check(to_dma.size() == 4, "DMA flits to back end");
    foreach (to_dma[i]) check(to_dma[i].data == 64'(i), "DMA flit order");
    out = {};
    @(negedge clk);
    dma_out_flit = '0; dma_out_flit.kind = BR_DMA_RD; dma_out_flit.data = 64'h77;
    dma_out_valid = 1; evt_valid = 1; evt_ctx = 7'd99;
    #1;
    while (!evt_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    evt_valid = 0;
    #1;
    while (!dma_out_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    dma_out_valid = 0;
    repeat (2) @(negedge clk);
    check(out.size() == 2, "two flits out");
    if (out.size() == 2) begin
      check(out[0].kind == BR_EVENT && out[0].addr == 64'd99, "event first with its context");
      check(out[1].kind == BR_DMA_RD && out[1].data == 64'h77, "DMA flit after it");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
