// tb_ricenic_stream: full-duplex TCP streaming through the whole NIC at
// its default sizes, to show that the MAC unit's data path keeps up with
// the Gigabit Ethernet line. One clock is taken as one byte time of the
// line (125 MHz).
//
// For each TCP payload size of the sweep (60, 460, 960 and 1460 bytes;
// frames carry 54 header bytes), NF frames are sent and NF frames are
// received at the same time:
//  - transmit: each frame sits in DDR as a 54-byte header and a payload
//    at an odd address, queued as two gather descriptors with checksum
//    insertion. The MAC core model takes one byte per clock and then
//    pauses 24 clocks per frame (preamble 8, FCS 4, inter-frame gap 12).
//    Any clock in which the core was ready but the NIC had no byte,
//    between the first byte and the last, is a bubble and fails the run.
//    Every frame and its inserted checksum are compared.
//  - receive: NF frames arrive back to back at line rate (one byte per
//    clock, 24 idle clocks between frames) into buffers posted in BRAM.
//    None may be dropped, and every completion's length, checksum and the
//    stored bytes are compared.
// The measured transmit throughput in Mb/s at 125 MHz is printed with the
// Ethernet limit for the same payload; with no bubbles they are equal.
module tb_ricenic_stream;
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

  localparam int NF = 6, HDR = 54, GAP = 24;
  localparam int NSIZE = 4;
  localparam int PAYLOADS [NSIZE] = '{60, 460, 960, 1460};

  // ---------------- low-level MAC transmit side: byte per clock, gap per frame
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
    repeat (600000) @(posedge clk);
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
  int n_recv0 = 0, n_drop0 = 0;

  task automatic put_ddr(input int a, input logic [7:0] b);
    ddr.mem[a / 8][8 * (a % 8) +: 8] = b;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    foreach (PAYLOADS[si]) begin
      automatic int flen = HDR + PAYLOADS[si];
      // frames: headers at 0x1000 + f*64, payloads at odd addresses 0x8001 + f*2048
      for (int f = 0; f < NF; f++) begin
        tframe[f] = {};
        for (int i = 0; i < flen; i++) tframe[f].push_back(8'($urandom));
        tframe[f][50] = 8'h00; tframe[f][51] = 8'h00;
        for (int i = 0; i < HDR; i++) put_ddr(32'h1000 + f * 64 + i, tframe[f][i]);
        for (int i = HDR; i < flen; i++) put_ddr(32'h8001 + f * 2048 + i - HDR, tframe[f][i]);
        rframe[f] = {};
        for (int i = 0; i < flen; i++) rframe[f].push_back(8'($urandom));
      end
      tx_frames = {}; tx_bytes = 0; bubbles = 0;
      // receive buffers in BRAM
      for (int f = 0; f < NF; f++) begin
        rd = '0; rd.addr = 32'h1000_0000 + 32'(f * 2048); rd.len = 11'(2047);
        ppc_wr(0, 32'h2000_2000, rd);
      end
      // queue all transmit descriptors, then start receiving
      for (int f = 0; f < NF; f++) begin
        td = '0; td.addr = 32'h1000 + 32'(f * 64); td.len = 11'(HDR);
        td.csum_en = 1; td.csum_start = 8'd34; td.csum_ins = 8'd50;
        ppc_wr(0, 32'h2000_1000, td);
        td = '0; td.addr = 32'h8001 + 32'(f * 2048); td.len = 11'(PAYLOADS[si]); td.eop = 1;
        ppc_wr(0, 32'h2000_1000, td);
      end
      for (int f = 0; f < NF; f++) begin
        foreach (rframe[f][i]) begin
          @(negedge clk);
          grx_valid = 1; grx_data = rframe[f][i]; grx_last = (i == flen - 1);
        end
        @(negedge clk);
        grx_valid = 0; grx_last = 0;
        repeat (GAP - 1) @(negedge clk);
      end
      while (tx_frames.size() < NF) @(negedge clk);
      repeat (400) @(negedge clk);

      // transmit: bytes, checksums, bubbles, rate
      for (int f = 0; f < NF; f++) begin
        automatic logic [7:0] exp [$] = tframe[f];
        automatic logic [15:0] c = ~ocsum(exp, 34);
        automatic int bad = 0;
        exp[50] = c[15:8]; exp[51] = c[7:0];
        if (tx_frames[f].size() != flen) bad = 9999;
        else foreach (exp[i]) if (tx_frames[f][i] !== exp[i]) bad++;
        check(bad == 0, $sformatf("payload %0d frame %0d sent with %0d wrong bytes", PAYLOADS[si], f, bad));
      end
      check(bubbles == 0, $sformatf("payload %0d: %0d transmit bubbles", PAYLOADS[si], bubbles));
      begin
        automatic real span = real'(t_last - t_first + 1 + GAP);
        automatic real mbps = real'(NF * PAYLOADS[si] * 8) * 125.0 / span;
        automatic real limit = real'(PAYLOADS[si] * 8) * 125.0 / real'(flen + GAP);
        $display("payload %4d: transmit %6.1f Mb/s, Ethernet limit %6.1f Mb/s", PAYLOADS[si], mbps, limit);
        check(mbps >= 0.999 * limit, $sformatf("payload %0d below line rate", PAYLOADS[si]));
      end

      // receive: no drops, completions, stored bytes
      ppc_rd(0, 32'h2000_2010, r);
      check(r[63:32] == 32'(n_drop0), $sformatf("payload %0d: %0d frames dropped", PAYLOADS[si], r[63:32] - 32'(n_drop0)));
      check(r[31:0] == 32'(n_recv0 + NF), $sformatf("payload %0d: %0d frames received", PAYLOADS[si], r[31:0] - 32'(n_recv0)));
      n_recv0 = int'(r[31:0]); n_drop0 = int'(r[63:32]);
      for (int f = 0; f < NF; f++) begin
        automatic int bad = 0;
        ppc_rd(0, 32'h2000_2008, r);
        rc = rx_cmpl_t'(r);
        check(rc.valid && rc.len == 11'(flen) && rc.addr == 32'h1000_0000 + 32'(f * 2048) && !rc.err,
              $sformatf("payload %0d completion %0d", PAYLOADS[si], f));
        check(rc.csum == ocsum(rframe[f], 34), $sformatf("payload %0d receive checksum %0d", PAYLOADS[si], f));
        for (int i = 0; i < flen; i++)
          if (dut.u_bram.mem[(f * 2048 + i) / 8][8 * (i % 8) +: 8] !== rframe[f][i]) bad++;
        check(bad == 0, $sformatf("payload %0d frame %0d stored with %0d wrong bytes", PAYLOADS[si], f, bad));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
