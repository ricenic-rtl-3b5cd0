// tb_ricenic_cdna: direct guest access to the NIC through the 128 SRAM
// contexts, on the whole NIC at its default sizes.
//
// 128 guests (played through the host PIO port) each write a sequence of
// K control words into their own 4 KB context, in a random interleaving,
// plus some writes above the context region that must raise no event.
// At the same time a firmware model on the second processor follows the
// event ring in the scratchpad (producer index at EVT+0x00, records
// {sequence, context}), and for each record clears the context's
// pending bit and then reads the context's control word through the
// bridge. Clearing before reading means that a guest write landing after
// the read always raises a new event, so no update can be missed.
// Checks:
//   - records come in sequence order with a valid context number, and
//     the ring wraps past its 256 slots;
//   - every guest's last value is seen by the firmware;
//   - no context gets an event without a write;
//   - writes outside the contexts raise nothing;
//   - repeated writes to a pending context are merged (counted).
module tb_ricenic_cdna;
  import ricenic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  plb_req_t ppc_req [2];
  plb_rsp_t ppc_rsp [2];
  logic sp_en = 0;
  logic [7:0] sp_addr = '0;
  logic [63:0] sp_rdata;
  plb_req_t ddr_req;
  plb_rsp_t ddr_rsp;
  logic uart_txd;
  logic [7:0] gtx_data;
  logic gtx_valid, gtx_last;
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
    .sp_en, .sp_we(1'b0), .sp_addr, .sp_wdata(64'd0), .sp_be(8'd0), .sp_rdata,
    .ddr_req, .ddr_rsp, .uart_txd, .uart_rxd(1'b1),
    .gmac_tx_data(gtx_data), .gmac_tx_valid(gtx_valid), .gmac_tx_last(gtx_last), .gmac_tx_ready(1'b1),
    .gmac_rx_data(8'd0), .gmac_rx_valid(1'b0), .gmac_rx_last(1'b0), .gmac_rx_err(1'b0),
    .pci_cmd_valid, .pci_cmd_ready, .pci_cmd_we, .pci_cmd_addr, .pci_cmd_len,
    .pci_rd_valid, .pci_rd_data, .pci_wr_ready, .pci_wr_data, .pci_done,
    .pio_req, .pio_we, .pio_addr, .pio_wdata, .pio_be(8'hFF), .pio_ack, .pio_rdata,
    .sram_ce, .sram_we, .sram_addr, .sram_wdata, .sram_be, .sram_rdata);

  plb_mem_model #(.WORDS(1024), .MAXLAT(2)) ddr (.clk, .req(ddr_req), .rsp(ddr_rsp));
  sram_model #(.WORDS(262144)) sram (.clk, .ce(sram_ce), .we(sram_we), .addr(sram_addr),
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
  task automatic host_wr(input logic [20:0] a, input logic [63:0] d);
    @(negedge clk);
    pio_req = 1; pio_we = 1; pio_addr = a; pio_wdata = d;
    do @(negedge clk); while (!pio_ack);
    pio_req = 0; pio_we = 0;
  endtask
  task automatic sp_rd(input logic [7:0] a, output logic [63:0] d);
    @(negedge clk);
    sp_en = 1; sp_addr = a;
    @(negedge clk);
    sp_en = 0;
    d = sp_rdata;
  endtask

  localparam int NCTX = 128, K = 3, RING = 256;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent [NCTX];       // writes issued per guest
  logic [63:0] seen [NCTX];
  int events [NCTX];
  int n_writes = 0, n_records = 0, bad_seq = 0, bad_ctx = 0;
  bit guests_done = 0;

  // guests: random interleaving of K writes each, plus writes above 512 KB
  initial begin
    int order [$];
    for (int g = 0; g < NCTX; g++) begin sent[g] = 0; seen[g] = '0; events[g] = 0; end
    for (int g = 0; g < NCTX; g++) for (int k = 0; k < K; k++) order.push_back(g);
    order.shuffle();
    wait (rst_n);
    repeat (10) @(negedge clk);
    foreach (order[i]) begin
      automatic int g = order[i];
      sent[g]++;
      // control word: guest number and its sequence number
      host_wr(21'(g * 4096 + 8 * ($urandom % 4)), 64'(g) << 32 | 64'(sent[g]));
      host_wr(21'(g * 4096), 64'(g) << 32 | 64'(sent[g]));
      n_writes += 2;
      if (i % 16 == 0) host_wr(21'(32'h0008_0000 + 32'(i * 8)), 64'hFFFF);  // outside the contexts
      repeat ($urandom % 20) @(negedge clk);
    end
    guests_done = 1;
  end

  // firmware on the second processor
  initial begin
    logic [63:0] r, rec;
    int cons = 0;
    wait (rst_n);
    forever begin
      ppc_rd(1, 32'h2000_4000, r);
      while (cons < int'(r[31:0])) begin
        automatic int ctx;
        sp_rd(8'(cons % RING), rec);
        ctx = int'(rec[6:0]);
        if (rec[63:32] != 32'(cons)) bad_seq++;
        if (rec[31:7] != 0) bad_ctx++;
        events[ctx]++;
        ppc_wr(1, 32'h2000_4008, 64'(ctx));                           // clear pending first
        ppc_rd(1, 32'h3000_0000 + 32'(ctx * 4096), seen[ctx]);       // then read the context
        cons++;
        n_records++;
      end
      if (guests_done) begin
        // one last look once everything has settled
        repeat (200) @(negedge clk);
        ppc_rd(1, 32'h2000_4000, r);
        if (cons == int'(r[31:0])) break;
      end
    end
    // results
    begin
      automatic int missed = 0, no_evt = 0, spurious = 0;
      logic [63:0] p0, p1;
      for (int g = 0; g < NCTX; g++) begin
        if (seen[g] != (64'(g) << 32 | 64'(K))) missed++;
        if (events[g] == 0) no_evt++;
        if (events[g] > 2 * K) spurious++;
      end
      check(missed == 0, $sformatf("%0d guests whose last control word the firmware never saw", missed));
      check(no_evt == 0, $sformatf("%0d contexts never signalled", no_evt));
      check(spurious == 0, $sformatf("%0d contexts with more events than writes", spurious));
      check(bad_seq == 0, $sformatf("%0d ring records out of sequence", bad_seq));
      check(bad_ctx == 0, $sformatf("%0d ring records with a bad context", bad_ctx));
      check(n_records > RING, $sformatf("ring wrapped: %0d records in %0d slots", n_records, RING));
      check(n_records < n_writes, $sformatf("merging: %0d events for %0d context writes", n_records, n_writes));
      ppc_rd(1, 32'h2000_4010, p0);
      ppc_rd(1, 32'h2000_4018, p1);
      check(p0 == 0 && p1 == 0, "no context left pending");
      $display("guests %0d, context writes %0d, events %0d (merged %0d)", NCTX, n_writes, n_records, n_writes - n_records);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
  end
endmodule
