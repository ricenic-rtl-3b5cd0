// tb_bridge_virtex: a model of the far end answers PIO flits (reads
// return a function of the address, writes are logged). Checks that PLB
// accesses to the SRAM window become PIO flits with the window offset,
// data and byte enables and complete with the returned data; that DMA
// flits pass both ways unchanged; that events reach the event output
// with their context; and that a PIO request goes out ahead of a waiting
// DMA flit.
module tb_bridge_virtex;
  import ricenic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  plb_req_t preq = '0;
  plb_rsp_t prsp;
  br_flit_t dma_out_flit = '0, dma_in_flit, link_tx, link_rx = '0;
  logic dma_out_valid = 0, dma_out_ready, dma_in_valid, dma_in_ready = 1;
  logic evt_valid;
  logic [6:0] evt_ctx;
  logic link_tx_valid, link_tx_ready = 0, link_rx_valid = 0, link_rx_ready;
  int checks = 0, failures = 0;
  `include "tb/plb_bfm_tasks.svh"

  bridge_virtex dut (.clk, .rst_n, .s_req(preq), .s_rsp(prsp),
    .dma_out_flit, .dma_out_valid, .dma_out_ready, .dma_in_flit, .dma_in_valid, .dma_in_ready,
    .evt_valid, .evt_ctx, .link_tx, .link_tx_valid, .link_tx_ready,
    .link_rx, .link_rx_valid, .link_rx_ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // far end: takes flits, answers PIO ones
  br_flit_t sent [$];
  logic hold_link = 0;
  initial begin
    forever begin
      @(negedge clk);
      link_tx_ready = !hold_link && ($urandom % 2);
      if (link_tx_valid && link_tx_ready) begin
        br_flit_t f;
        f = link_tx;
        sent.push_back(f);
        if (f.kind == BR_PIO_RD || f.kind == BR_PIO_WR) begin
          @(negedge clk);
          link_tx_ready = 0;
          repeat ($urandom % 5) @(negedge clk);
          link_rx = f;
          if (f.kind == BR_PIO_RD) link_rx.data = {f.addr[31:0], ~f.addr[31:0]};
          link_rx_valid = 1;
          #1;
          while (!link_rx_ready) @(negedge clk);
          @(negedge clk);
          link_rx_valid = 0;
        end
      end
    end
  end

  br_flit_t to_dma [$];
  int evts [$];
  always @(posedge clk) begin
    if (dma_in_valid && dma_in_ready) to_dma.push_back(dma_in_flit);
    if (evt_valid) evts.push_back(int'(evt_ctx));
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] r;
  br_flit_t f;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      logic [31:0] a;
      a = 32'h3000_0000 + 32'(($urandom % 262144) * 8);
      plb_wr(a, {$urandom, $urandom}, 8'h0F);
      f = sent[sent.size() - 1];
      check(f.kind == BR_PIO_WR && f.addr == 64'(a & 32'h1F_FFFF) && f.be == 8'h0F && f.data == preq.wdata,
            $sformatf("write flit %0d", k));
      plb_rd(a, r);
      f = sent[sent.size() - 1];
      check(f.kind == BR_PIO_RD && f.addr == 64'(a & 32'h1F_FFFF), $sformatf("read flit %0d", k));
      check(r == {a & 32'h1F_FFFF, ~(a & 32'h1F_FFFF)}, $sformatf("read data %0d", k));
    end
    // DMA out flit and PIO request waiting together: PIO first
    sent = {};
    hold_link = 1;
    @(negedge clk);
    dma_out_flit = '0; dma_out_flit.kind = BR_DMA_DATA; dma_out_flit.data = 64'h1234; dma_out_valid = 1;
    fork
      plb_rd(32'h3000_0100, r);
      begin repeat (4) @(negedge clk); hold_link = 0; end
    join
    wait (sent.size() >= 2);
    check(sent[0].kind == BR_PIO_RD && sent[1].kind == BR_DMA_DATA && sent[1].data == 64'h1234, "PIO ahead of DMA");
    @(negedge clk);
    dma_out_valid = 0;
    // DMA data and events from the far end
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      link_rx = '0;
      link_rx.kind = (k % 2) ? BR_EVENT : BR_DMA_RD;
      link_rx.addr = 64'(k * 9);
      link_rx.data = 64'(k);
      link_rx_valid = 1;
      dma_in_ready = (k != 2);
      #1;
      while (!link_rx_ready) begin @(negedge clk); dma_in_ready = 1; #1; end
      @(negedge clk);
      link_rx_valid = 0;
    end
    repeat (3) @(negedge clk);
    check(to_dma.size() == 4, "DMA flits delivered");
    foreach (to_dma[i]) check(to_dma[i].data == 64'(2 * i) && to_dma[i].kind == BR_DMA_RD, "DMA flit content");
    check(evts.size() == 4, $sformatf("events delivered %0d", evts.size()));
    foreach (evts[i]) check(evts[i] == (2 * i + 1) * 9, $sformatf("event context %0d", evts[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
