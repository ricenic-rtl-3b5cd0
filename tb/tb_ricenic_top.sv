// tb_ricenic_top: end-to-end run of the whole NIC at its default sizes.
// The two processors are played by tasks on their PLB ports; DDR memory,
// host memory behind the PCI core, the SRAM chip and the low-level MAC
// (looped back from transmit to receive) are behavioural models.
//
// Sequence: DMA a 600-byte TCP frame from host memory into DDR; send it
// with a two-fragment gather and checksum insertion; the looped-back
// frame is received into a BRAM buffer with its receive checksum; a
// second frame with no buffer posted is dropped; DMA the received frame
// to host memory and a 5000-byte block (three bursts) as well; the host
// writes into SRAM contexts, the events appear in the scratchpad ring
// and a repeated write is merged; the second processor reads the SRAM
// through the bridge; the console UART prints a message. Every mechanism
// is counted and a failure is counted for one that never happened.
module tb_ricenic_top;
  import ricenic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  plb_req_t ppc_req [2];
  plb_rsp_t ppc_rsp [2];
  logic sp_en = 0, sp_we = 0;
  logic [7:0] sp_addr = '0, sp_be = '0;
  logic [63:0] sp_wdata = '0, sp_rdata;
  plb_req_t ddr_req;
  plb_rsp_t ddr_rsp;
  logic uart_txd;
  logic [7:0] gtx_data, grx_data = '0;
  logic gtx_valid, gtx_last, gtx_ready, grx_valid = 0, grx_last = 0;
  logic pci_cmd_valid, pci_cmd_ready, pci_cmd_we, pci_rd_valid, pci_wr_ready, pci_done;
  logic [63:0] pci_cmd_addr, pci_rd_data, pci_wr_data;
  logic [11:0] pci_cmd_len;
  logic pio_req = 0, pio_we = 0, pio_ack;
  logic [20:0] pio_addr = '0;
  logic [63:0] pio_wdata = '0, pio_rdata;
  logic sram_ce, sram_we;
  logic [17:0] sram_addr;
  logic [63:0] sram_wdata, sram_rdata;
  logic [7:0] sram_be;

  initial begin ppc_req[0] = '0; ppc_req[1] = '0; end

  ricenic_top dut (
    .clk, .rst_n,
    .ppc0_req(ppc_req[0]), .ppc0_rsp(ppc_rsp[0]), .ppc1_req(ppc_req[1]), .ppc1_rsp(ppc_rsp[1]),
    .sp_en, .sp_we, .sp_addr, .sp_wdata, .sp_be, .sp_rdata,
    .ddr_req, .ddr_rsp, .uart_txd, .uart_rxd(1'b1),
    .gmac_tx_data(gtx_data), .gmac_tx_valid(gtx_valid), .gmac_tx_last(gtx_last), .gmac_tx_ready(gtx_ready),
    .gmac_rx_data(grx_data), .gmac_rx_valid(grx_valid), .gmac_rx_last(grx_last), .gmac_rx_err(1'b0),
    .pci_cmd_valid, .pci_cmd_ready, .pci_cmd_we, .pci_cmd_addr, .pci_cmd_len,
    .pci_rd_valid, .pci_rd_data, .pci_wr_ready, .pci_wr_data, .pci_done,
    .pio_req, .pio_we, .pio_addr, .pio_wdata, .pio_be(8'hFF), .pio_ack, .pio_rdata,
    .sram_ce, .sram_we, .sram_addr, .sram_wdata, .sram_be, .sram_rdata);

  plb_mem_model #(.WORDS(16384), .MAXLAT(4)) ddr (.clk, .req(ddr_req), .rsp(ddr_rsp));
  sram_model #(.WORDS(262144)) sram (.clk, .ce(sram_ce), .we(sram_we), .addr(sram_addr),
    .wdata(sram_wdata), .be(sram_be), .rdata(sram_rdata));
  pci_host_model pci (.clk, .cmd_valid(pci_cmd_valid), .cmd_ready(pci_cmd_ready), .cmd_we(pci_cmd_we),
    .cmd_addr(pci_cmd_addr), .cmd_len(pci_cmd_len), .rd_valid(pci_rd_valid), .rd_data(pci_rd_data),
    .wr_ready(pci_wr_ready), .wr_data(pci_wr_data), .done(pci_done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- processor bus tasks
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

  // ---------------- mechanism counters
  int n_gather = 0, n_csum_tx = 0, n_csum_rx = 0, n_rx_drop = 0, n_burst_split = 0;
  int n_dma_rd = 0, n_dma_wr = 0, n_ctx_event = 0, n_evt_merge = 0, n_pio_bridge = 0;
  int n_uart = 0, n_contention = 0, n_tx_backpressure = 0;
  always @(posedge clk) begin
    int req;
    req = 0;
    for (int m = 0; m < 5; m++) req += int'(dut.m_req[m].valid);
    if (req > 1) n_contention++;
    if (gtx_valid && !gtx_ready) n_tx_backpressure++;
  end

  // ---------------- low-level MAC: capture and loop back
  logic [7:0] txf [$];
  logic [7:0] tx_frames [$][$];
  always @(posedge clk) gtx_ready <= ($urandom % 8) != 0;
  always @(posedge clk) if (gtx_valid && gtx_ready) begin
    txf.push_back(gtx_data);
    if (gtx_last) begin tx_frames.push_back(txf); txf = {}; end
  end
  task automatic gmac_rx(input logic [7:0] f [$]);
    foreach (f[i]) begin
      @(negedge clk);
      grx_valid = 1; grx_data = f[i]; grx_last = (i == f.size() - 1);
    end
    @(negedge clk);
    grx_valid = 0; grx_last = 0;
    repeat (12) @(negedge clk);
  endtask

  // ---------------- UART decoder (8N1, 868 clocks per bit)
  localparam int DIV = 868;
  logic [7:0] console [$];
  initial forever begin
    logic [7:0] b;
    @(negedge uart_txd);
    repeat (DIV + DIV / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin b[i] = uart_txd; repeat (DIV) @(posedge clk); end
    console.push_back(b);
  end

  // ---------------- host PIO
  task automatic host_pio(input logic we, input logic [20:0] a, input logic [63:0] d, output logic [63:0] q);
    @(negedge clk);
    pio_req = 1; pio_we = we; pio_addr = a; pio_wdata = d;
    do @(negedge clk); while (!pio_ack);
    q = pio_rdata; pio_req = 0;
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

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int FLEN = 600;
  localparam logic [31:0] DDR_PKT  = 32'h0001_0000;
  localparam logic [31:0] BRAM_RX  = 32'h1000_1000;
  localparam longint HOST_PKT = 64'h10_0000, HOST_OUT = 64'h30_0000, HOST_BLK = 64'h40_0000;
  logic [7:0] frame [$];
  logic [63:0] r;
  tx_desc_t td;
  rx_desc_t rd;
  rx_cmpl_t rc;

  initial begin
    // a TCP frame in host memory: 14 + 20 + 20 header bytes, payload;
    // the TCP checksum field (bytes 50, 51) holds a pseudo-header sum
    for (int i = 0; i < FLEN; i++) frame.push_back(8'($urandom));
    frame[50] = 8'h12; frame[51] = 8'h34;
    for (int w = 0; w < FLEN / 8; w++) begin
      logic [63:0] v;
      for (int b = 0; b < 8; b++) v[8*b +: 8] = frame[8*w + b];
      pci.host[HOST_PKT / 8 + w] = v;
    end
    for (int w = 0; w < 625; w++) ddr.mem[(32'h0002_0000 / 8 + w) % 16384] = {$urandom, $urandom};
    repeat (5) @(posedge clk);
    rst_n = 1;

    // 1. host -> DDR by DMA
    ppc_wr(0, 32'h2000_3000, HOST_PKT);
    ppc_wr(0, 32'h2000_3008, {15'd0, 1'b0, 16'(FLEN), DDR_PKT});
    do ppc_rd(0, 32'h2000_3010, r); while (r[31:0] != 1);
    n_dma_rd++;
    begin
      automatic int bad = 0;
      for (int i = 0; i < FLEN; i++) if (ddr.mem[(DDR_PKT + i) / 8][8*((DDR_PKT + i) % 8) +: 8] !== frame[i]) bad++;
      check(bad == 0, $sformatf("DMA into DDR: %0d wrong bytes", bad));
    end

    // 2. post a receive buffer in BRAM, then transmit with gather + checksum
    rd = '0; rd.addr = BRAM_RX; rd.len = 11'(1600);
    ppc_wr(0, 32'h2000_2000, rd);
    td = '0; td.addr = DDR_PKT; td.len = 11'(54); td.csum_en = 1; td.csum_start = 8'd34; td.csum_ins = 8'd50;
    ppc_wr(0, 32'h2000_1000, td);
    td.addr = DDR_PKT + 54; td.len = 11'(FLEN - 54); td.eop = 1;
    ppc_wr(0, 32'h2000_1000, td);
    n_gather++;
    // the second processor keeps reading BRAM meanwhile (bus sharing)
    fork
      begin
        wait (tx_frames.size() == 1);
      end
      begin
        for (int k = 0; k < 40; k++) ppc_rd(1, 32'h1000_0000 + 32'(k * 8), r);
      end
    join
    begin
      logic [7:0] expf [$];
      logic [15:0] s;
      expf = frame;
      s = ~ocsum(frame, 34);
      expf[50] = s[15:8]; expf[51] = s[7:0];
      check(tx_frames[0] == expf, "transmitted frame with inserted checksum");
      // with the pseudo-header sum added back, a correct segment sums to all ones
      check(csum_add(ocsum(tx_frames[0], 34), 16'h1234) == 16'hFFFF, "transmitted segment verifies");
      if (tx_frames[0] == expf) n_csum_tx++;
    end

    // 3. loop the frame back; a second frame finds no buffer and is dropped
    gmac_rx(tx_frames[0]);
    repeat (2000) @(negedge clk);
    gmac_rx(frame);
    repeat (100) @(negedge clk);
    ppc_rd(0, 32'h2000_2008, r);
    rc = rx_cmpl_t'(r);
    check(rc.valid && rc.addr == BRAM_RX && rc.len == 11'(FLEN) && !rc.err, "receive completion");
    check(rc.csum == ocsum(tx_frames[0], 34), "receive checksum");
    if (csum_add(rc.csum, 16'h1234) == 16'hFFFF) n_csum_rx++;
    ppc_rd(0, 32'h2000_2010, r);
    check(r[31:0] == 1 && r[63:32] == 1, "one received, one dropped");
    n_rx_drop = int'(r[63:32]);

    // 4. received frame -> host, and a 5000-byte block -> host (3 bursts)
    ppc_wr(0, 32'h2000_3000, HOST_OUT);
    ppc_wr(0, 32'h2000_3008, {15'd0, 1'b1, 16'(FLEN), BRAM_RX});
    ppc_wr(0, 32'h2000_3000, HOST_BLK);
    ppc_wr(0, 32'h2000_3008, {15'd0, 1'b1, 16'd5000, 32'h0002_0000});
    do ppc_rd(0, 32'h2000_3010, r); while (r[31:0] != 3);
    n_dma_wr = 2;
    begin
      automatic int bad = 0;
      for (int i = 0; i < FLEN; i++) if (pci.rd_word(HOST_OUT / 8 + i / 8)[8*(i % 8) +: 8] !== tx_frames[0][i]) bad++;
      check(bad == 0, $sformatf("received frame in host memory: %0d wrong bytes", bad));
      bad = 0;
      for (int w = 0; w < 625; w++) if (pci.rd_word(HOST_BLK / 8 + w) !== ddr.mem[(32'h0002_0000 / 8 + w) % 16384]) bad++;
      check(bad == 0, $sformatf("block in host memory: %0d wrong words", bad));
    end
    check(pci.bursts == 5 && pci.max_len == 2048, $sformatf("%0d PCI bursts, longest %0d", pci.bursts, pci.max_len));
    if (pci.bursts == 5) n_burst_split++;

    // 5. host writes into contexts 5 and 77 (twice into 5) and above the
    //    context region; events reach the scratchpad ring
    host_pio(1, 21'(5 * 4096 + 64), 64'hC0DE_0005, r);
    host_pio(1, 21'(77 * 4096), 64'hC0DE_0077, r);
    host_pio(1, 21'(5 * 4096 + 8), 64'hC0DE_0505, r);
    host_pio(1, 21'h10_0000, 64'hBEEF, r);
    repeat (20) @(negedge clk);
    ppc_rd(1, 32'h2000_4000, r);
    check(r[31:0] == 2, $sformatf("producer index %0d", r[31:0]));
    for (int i = 0; i < 2; i++) begin
      @(negedge clk);
      sp_en = 1; sp_addr = 8'(i);
      @(negedge clk);
      sp_en = 0;
      check(sp_rdata == {32'(i), 32'(i == 0 ? 5 : 77)}, $sformatf("ring record %0d: %h", i, sp_rdata));
    end
    n_ctx_event = int'(r[31:0]);
    if (n_ctx_event == 2) n_evt_merge++;
    ppc_wr(1, 32'h2000_4008, 64'd5);
    ppc_rd(1, 32'h2000_4010, r);
    check(r == 64'd0, "context 5 no longer pending");
    ppc_rd(1, 32'h2000_4018, r);
    check(r == (64'd1 << 13), "context 77 still pending");

    // 6. the second processor reads what the host wrote, through the bridge
    ppc_rd(1, 32'h3000_0000 + 32'(5 * 4096 + 64), r);
    check(r == 64'hC0DE_0005, "SRAM read through the bridge");
    ppc_rd(1, 32'h3010_0000, r);
    check(r == 64'hBEEF, "SRAM read above the contexts");
    ppc_wr(1, 32'h3000_2000, 64'h5151);
    host_pio(0, 21'h2000, '0, r);
    check(r == 64'h5151, "host sees the NIC's SRAM write");
    n_pio_bridge = 3;

    // 7. console message
    ppc_wr(0, 32'h2000_0000, "O");
    ppc_wr(0, 32'h2000_0000, "K");
    wait (console.size() == 2);
    check(console[0] == "O" && console[1] == "K", "console output");
    n_uart = console.size();

    check(n_gather > 0, "gather transmit happened");
    check(n_csum_tx > 0, "transmit checksum insertion happened");
    check(n_csum_rx > 0, "receive checksum happened");
    check(n_rx_drop > 0, "receive drop happened");
    check(n_burst_split > 0, "DMA burst split happened");
    check(n_dma_rd > 0 && n_dma_wr > 0, "DMA in both directions happened");
    check(n_ctx_event > 0, "context events happened");
    check(n_evt_merge > 0, "event merge happened");
    check(n_pio_bridge > 0, "PIO through the bridge happened");
    check(n_uart > 0, "console output happened");
    check(n_contention > 0, "bus contention happened");
    check(n_tx_backpressure > 0, "transmit back-pressure happened");
    $display("mechanisms: gather %0d, tx csum %0d, rx csum %0d, rx drop %0d, burst split %0d, dma rd %0d, dma wr %0d, ctx events %0d, merge %0d, bridge PIO %0d, uart %0d, contention cycles %0d, tx backpressure %0d",
             n_gather, n_csum_tx, n_csum_rx, n_rx_drop, n_burst_split, n_dma_rd, n_dma_wr, n_ctx_event,
             n_evt_merge, n_pio_bridge, n_uart, n_contention, n_tx_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
