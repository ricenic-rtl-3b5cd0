// tb_ricenic_path: the complete host-to-wire and wire-to-host data paths
// of the NIC at its default sizes, with maximum-size TCP frames (1460
// payload bytes, 1514-byte frames), under a firmware model on the first
// processor. One clock is taken as one byte time of the line (125 MHz).
//
// Transmit: NF frames wait in host memory. Firmware queues one DMA
// descriptor per frame (host to DDR), polls the DMA completion count,
// and queues a transmit descriptor with checksum insertion for every
// frame whose DMA has finished. The MAC core model takes one byte per
// clock and pauses 24 clocks after each frame. Once the first byte is
// out, a clock in which the core was ready but had no byte is a bubble
// and fails the run; every frame and its checksum are compared.
//
// Receive: NF frames arrive back to back at line rate into BRAM buffers.
// Firmware pops each completion and queues a DMA descriptor (NIC to
// host) for it. Every frame must reach host memory intact, with no drop,
// and the last one must land within two frame times of its arrival (one
// copy-out and one DMA), which holds only if the DMA keeps up with the
// line.
//
// Firmware polls every POLL clocks rather than back to back, as code
// running from the processor cache would; a tight loop of bus reads would
// take bus time from the data path.
module tb_ricenic_path;
  import ricenic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  plb_req_t ppc_req [2];
  plb_rsp_t ppc_rsp [2];
  logic [63:0] sp_rdata;
  plb_req_t ddr_req;
  plb_rsp_t ddr_rsp;
  logic uart_txd;
  logic [7:0] gtx_data, grx_data = '0;
  logic gtx_valid, gtx_last, grx_valid = 0, grx_last = 0;
  logic gtx_ready = 0;
  logic pci_cmd_valid, pci_cmd_ready, pci_cmd_we, pci_rd_valid, pci_wr_ready, pci_done;
  logic [63:0] pci_cmd_addr, pci_rd_data, pci_wr_data;
  logic [11:0] pci_cmd_len;
  logic pio_ack;
  logic [63:0] pio_rdata;
  logic sram_ce, sram_we;
  logic [17:0] sram_addr;
  logic [63:0] sram_wdata, sram_rdata;
  logic [7:0] sram_be;

  initial begin ppc_req[0] = '0; ppc_req[1] = '0; end

  ricenic_top dut (
    .clk, .rst_n,
    .ppc0_req(ppc_req[0]), .ppc0_rsp(ppc_rsp[0]), .ppc1_req(ppc_req[1]), .ppc1_rsp(ppc_rsp[1]),
    .sp_en(1'b0), .sp_we(1'b0), .sp_addr(8'd0), .sp_wdata(64'd0), .sp_be(8'd0), .sp_rdata,
    .ddr_req, .ddr_rsp, .uart_txd, .uart_rxd(1'b1),
    .gmac_tx_data(gtx_data), .gmac_tx_valid(gtx_valid), .gmac_tx_last(gtx_last), .gmac_tx_ready(gtx_ready),
    .gmac_rx_data(grx_data), .gmac_rx_valid(grx_valid), .gmac_rx_last(grx_last), .gmac_rx_err(1'b0),
    .pci_cmd_valid, .pci_cmd_ready, .pci_cmd_we, .pci_cmd_addr, .pci_cmd_len,
    .pci_rd_valid, .pci_rd_data, .pci_wr_ready, .pci_wr_data, .pci_done,
    .pio_req(1'b0), .pio_we(1'b0), .pio_addr(21'd0), .pio_wdata(64'd0), .pio_be(8'hFF), .pio_ack, .pio_rdata,
    .sram_ce, .sram_we, .sram_addr, .sram_wdata, .sram_be, .sram_rdata);

  plb_mem_model #(.WORDS(16384), .MAXLAT(2)) ddr (.clk, .req(ddr_req), .rsp(ddr_rsp));
  sram_model #(.WORDS(1024)) sram (.clk, .ce(sram_ce), .we(sram_we), .addr(10'(sram_addr)),
    .wdata(sram_wdata), .be(sram_be), .rdata(sram_rdata));
  pci_host_model pci (.clk, .cmd_valid(pci_cmd_valid), .cmd_ready(pci_cmd_ready), .cmd_we(pci_cmd_we),
    .cmd_addr(pci_cmd_addr), .cmd_len(pci_cmd_len), .rd_valid(pci_rd_valid), .rd_data(pci_rd_data),
    .wr_ready(pci_wr_ready), .wr_data(pci_wr_data), .done(pci_done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ppc_wr(input int m, input logic [31:0] a, input logic [63:0] d);
    @(negedge clk);
    ppc_req[m].valid = 1; ppc_req[m].we = 1; ppc_req[m].addr = a; ppc_req[m].wdata = d; ppc_req[m].be = '1;
    do @(negedge clk); while (!ppc_rsp[m].ack);
    ppc_req[m].valid = 0; ppc_req[m].we = 0;
  endtask
  task automatic ppc_rd(input int m, input logic [31:0] a, output logic [63:0] d);
    @(negedge clk);
    ppc_req[m].valid = 1; ppc_req[m].we = 0; ppc_req[m].addr = a; ppc_req[m].be = '1;
    do @(negedge clk); while (!ppc_rsp[m].ack);
    d = ppc_rsp[m].rdata;
    ppc_req[m].valid = 0;
  endtask

  function automatic logic [15:0] ocsum(input logic [7:0] f [$], input int from);
    logic [16:0] s;
    logic [15:0] sum = 0;
    for (int k = from; k < f.size(); k++) begin
      s = {1'b0, sum} + (((k - from) % 2 == 0) ? {1'b0, f[k], 8'h00} : {9'h000, f[k]});
      sum = s[15:0] + 16'(s[16]);
    end
    return sum;
  endfunction

  localparam int NF = 8, FLEN = 1514, DLEN = 1520, GAP = 24, POLL = 20;
  localparam longint HOST_TX = 64'h100_0000, HOST_RX = 64'h200_0000;
  localparam logic [31:0] DDR_TX = 32'h0001_0000, BRAM_RX = 32'h1000_0000;

  // ---------------- low-level MAC transmit side
  logic [7:0] txf [$];
  logic [7:0] tx_frames [$][$];
  int gap_left = 0, bubbles = 0, tx_bytes = 0;
  longint t_first = 0, t_last = 0, cyc = 0;
  bit tx_run = 0;
  always @(posedge clk) begin
    cyc++;
    if (tx_run && gtx_ready && !gtx_valid) bubbles++;
    if (gtx_valid && gtx_ready) begin
      if (tx_bytes == 0) t_first = cyc;
      tx_bytes++;
      txf.push_back(gtx_data);
      if (gtx_last) begin
        tx_frames.push_back(txf); txf = {};
        t_last = cyc;
        gap_left = GAP;
      end
    end
    if (gtx_valid && gtx_ready && tx_bytes == 1) tx_run <= 1;
    if (gtx_valid && gtx_ready && gtx_last && tx_frames.size() == NF) tx_run <= 0;
    if (gap_left > 0 || (gtx_valid && gtx_ready && gtx_last)) begin
      gtx_ready <= 0;
      if (!(gtx_valid && gtx_ready && gtx_last)) gap_left--;
      if (gap_left == 1) gtx_ready <= 1;
    end else gtx_ready <= 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] tframe [NF][$];
  logic [7:0] rframe [NF][$];
  logic [63:0] r;
  tx_desc_t td;
  rx_desc_t rd;
  rx_cmpl_t rc;
  longint t_rx_last = 0, t_dma_done = 0;

  initial begin
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < DLEN; i++) tframe[f].push_back(8'($urandom));
      tframe[f][50] = 8'h00; tframe[f][51] = 8'h00;
      for (int w = 0; w < DLEN / 8; w++) begin
        logic [63:0] v;
        for (int b = 0; b < 8; b++) v[8*b +: 8] = tframe[f][8*w + b];
        pci.host[(HOST_TX + longint'(f * 2048)) / 8 + w] = v;
      end
      for (int i = DLEN; i > FLEN; i--) void'(tframe[f].pop_back());
      for (int i = 0; i < FLEN; i++) rframe[f].push_back(8'($urandom));
    end
    repeat (5) @(posedge clk);
    rst_n = 1;

    // ================= transmit path
    for (int f = 0; f < NF; f++) begin
      ppc_wr(0, 32'h2000_3000, HOST_TX + longint'(f * 2048));
      ppc_wr(0, 32'h2000_3008, {15'd0, 1'b0, 16'(DLEN), DDR_TX + 32'(f * 2048)});
    end
    begin
      automatic int queued = 0;
      while (queued < NF) begin
        repeat (POLL) @(negedge clk);
        ppc_rd(0, 32'h2000_3010, r);
        while (queued < int'(r[31:0])) begin
          td = '0; td.addr = DDR_TX + 32'(queued * 2048); td.len = 11'(FLEN); td.eop = 1;
          td.csum_en = 1; td.csum_start = 8'd34; td.csum_ins = 8'd50;
          ppc_wr(0, 32'h2000_1000, td);
          queued++;
        end
      end
    end
    while (tx_frames.size() < NF) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      automatic logic [7:0] exp [$] = tframe[f];
      automatic logic [15:0] c = ~ocsum(exp, 34);
      automatic int bad = 0;
      exp[50] = c[15:8]; exp[51] = c[7:0];
      if (tx_frames[f].size() != FLEN) bad = 9999;
      else foreach (exp[i]) if (tx_frames[f][i] !== exp[i]) bad++;
      check(bad == 0, $sformatf("transmit frame %0d: %0d wrong bytes", f, bad));
    end
    check(bubbles == 0, $sformatf("%0d transmit bubbles", bubbles));
    begin
      automatic real mbps = real'(NF * 1460 * 8) * 125.0 / real'(t_last - t_first + 1 + GAP);
      $display("host to wire: %6.1f Mb/s of TCP payload (limit %6.1f)", mbps, 1460.0 * 8.0 * 125.0 / real'(FLEN + GAP));
      check(mbps >= 0.999 * 1460.0 * 8.0 * 125.0 / real'(FLEN + GAP), "host to wire below line rate");
    end

    // ================= receive path
    for (int f = 0; f < NF; f++) begin
      rd = '0; rd.addr = BRAM_RX + 32'(f * 2048); rd.len = 11'(2047);
      ppc_wr(0, 32'h2000_2000, rd);
    end
    fork
      begin
        for (int f = 0; f < NF; f++) begin
          foreach (rframe[f][i]) begin
            @(negedge clk);
            grx_valid = 1; grx_data = rframe[f][i]; grx_last = (i == FLEN - 1);
          end
          @(negedge clk);
          grx_valid = 0; grx_last = 0;
          repeat (GAP - 1) @(negedge clk);
        end
        t_rx_last = cyc;
      end
      begin
        automatic int got = 0;
        while (got < NF) begin
          repeat (POLL) @(negedge clk);
          ppc_rd(0, 32'h2000_2008, r);
          rc = rx_cmpl_t'(r);
          if (rc.valid) begin
            check(rc.len == 11'(FLEN) && !rc.err && rc.addr == BRAM_RX + 32'(got * 2048),
                  $sformatf("receive completion %0d", got));
            ppc_wr(0, 32'h2000_3000, HOST_RX + longint'(got * 2048));
            ppc_wr(0, 32'h2000_3008, {15'd0, 1'b1, 16'(DLEN), rc.addr});
            got++;
          end
        end
        do begin
          repeat (POLL) @(negedge clk);
          ppc_rd(0, 32'h2000_3010, r);
        end while (r[31:0] != 32'(2 * NF));
        t_dma_done = cyc;
      end
    join
    ppc_rd(0, 32'h2000_2010, r);
    check(r[63:32] == 0 && r[31:0] == 32'(NF), $sformatf("received %0d, dropped %0d", r[31:0], r[63:32]));
    for (int f = 0; f < NF; f++) begin
      automatic int bad = 0;
      for (int i = 0; i < FLEN; i++)
        if (pci.rd_word((HOST_RX + longint'(f * 2048)) / 8 + i / 8)[8 * (i % 8) +: 8] !== rframe[f][i]) bad++;
      check(bad == 0, $sformatf("frame %0d in host memory: %0d wrong bytes", f, bad));
    end
    $display("wire to host: last frame in host memory %0d clocks after it arrived (%0d allowed)",
             t_dma_done - t_rx_last, 2 * (FLEN + GAP));
    check(t_dma_done - t_rx_last <= longint'(2 * (FLEN + GAP)), "wire to host falls behind the line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
