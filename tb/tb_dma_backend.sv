// tb_dma_backend: drives burst requests into the back end as the bridge
// would and checks, against a host-memory model behind a PCI core model,
// that a 2048-byte host-to-NIC burst returns the host words in order with
// last on the final one, that a 2048-byte NIC-to-host burst lands in
// host memory followed by one completion flit, and that each burst is a
// single PCI command of the burst's length.
module tb_dma_backend;
  import ricenic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  br_flit_t in_flit = '0, out_flit;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic pci_cmd_valid, pci_cmd_ready, pci_cmd_we, pci_rd_valid, pci_wr_ready, pci_done;
  logic [63:0] pci_cmd_addr, pci_rd_data, pci_wr_data;
  logic [11:0] pci_cmd_len;
  int checks = 0, failures = 0;

  dma_backend dut (.clk, .rst_n, .in_flit, .in_valid, .in_ready, .out_flit, .out_valid, .out_ready,
    .pci_cmd_valid, .pci_cmd_ready, .pci_cmd_we, .pci_cmd_addr, .pci_cmd_len,
    .pci_rd_valid, .pci_rd_data, .pci_wr_ready, .pci_wr_data, .pci_done);
  pci_host_model pci (.clk, .cmd_valid(pci_cmd_valid), .cmd_ready(pci_cmd_ready), .cmd_we(pci_cmd_we),
    .cmd_addr(pci_cmd_addr), .cmd_len(pci_cmd_len), .rd_valid(pci_rd_valid), .rd_data(pci_rd_data),
    .wr_ready(pci_wr_ready), .wr_data(pci_wr_data), .done(pci_done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(input br_flit_t f);
    @(negedge clk);
    in_flit = f; in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  br_flit_t got [$];
  always @(negedge clk) begin
    out_ready = ($urandom % 3) != 0;
  end
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_flit);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  br_flit_t f;
  logic [63:0] wdat [256];
  initial begin
    for (int i = 0; i < 256; i++) pci.host[longint'(32'h8000 / 8 + i)] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    f = '0; f.kind = BR_DMA_RD; f.addr = 64'h8000; f.len = 12'd2048;
    put(f);
    wait (got.size() == 256);
    begin
      automatic int bad = 0;
      foreach (got[i]) if (got[i].kind != BR_DMA_RD || got[i].data !== pci.host[longint'(32'h8000 / 8 + i)]) bad++;
      check(bad == 0, $sformatf("read burst: %0d wrong flits", bad));
      check(got[255].last && !got[254].last, "last marker");
    end
    check(pci.rd_bursts == 1 && pci.max_len == 2048, "one 2048-byte PCI read");
    got = {};
    f = '0; f.kind = BR_DMA_WR; f.addr = 64'h1_0000_0000; f.len = 12'd2048;
    put(f);
    for (int i = 0; i < 256; i++) begin
      wdat[i] = {$urandom, $urandom};
      f = '0; f.kind = BR_DMA_DATA; f.data = wdat[i]; f.last = (i == 255);
      put(f);
    end
    wait (got.size() == 1);
    check(got[0].kind == BR_DMA_WR, "write completion flit");
    begin
      automatic int bad = 0;
      for (int i = 0; i < 256; i++) if (pci.rd_word(longint'(64'h1_0000_0000 / 8) + i) !== wdat[i]) bad++;
      check(bad == 0, $sformatf("write burst: %0d wrong words in host memory", bad));
    end
    check(pci.wr_bursts == 1, "one PCI write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
