// ricenic_top: the reconfigurable Gigabit Ethernet NIC, both FPGAs.
//
// Virtex side: the PLB (plb_xbar) joins five masters (0: PowerPC 0,
// 1: PowerPC 1, 2: MAC transmit, 3: MAC receive, 4: DMA front end) to
// eight slaves (0: DDR controller, 1: 32 KB BRAM, 2: UART, 3: MAC
// transmit registers, 4: MAC receive registers, 5: DMA registers,
// 6: hardware event registers, 7: SRAM window through the bridge).
// The hardware event unit writes its ring into the 2 KB scratchpad,
// whose other port belongs to the second PowerPC.
// Spartan side: the bridge end hands SRAM accesses to the SRAM
// controller and DMA flits to the back-end DMA; the SRAM controller's
// context events travel back over the link to the hardware event unit.
//
// Parts not designed here are reached through ports: the two PowerPC
// 405 cores (PLB master ports, scratchpad port), the DDR controller and
// memory (a PLB slave port), the low-level Gigabit MAC core and PHY
// (transmit and receive byte streams), the PCI core (master side for
// DMA, target side for host access to the SRAM), the SRAM chip and the
// RS-232 line. Both FPGAs run on one clock here.
//
// The set of units and their connections follow the document's system
// diagram; the address map, bus protocol and link format are this
// design's own (see ricenic_pkg).
module ricenic_top
  import ricenic_pkg::*;
#(
  parameter int BRAM_BYTES  = 32768,
  parameter int SP_BYTES    = 2048,
  parameter int SRAM_BYTES  = 2097152,
  parameter int NCTX        = 128,
  parameter int CTX_BYTES   = 4096,
  parameter int DMA_BURST   = 2048,
  parameter int MAC_BUF     = 2048,
  parameter int UART_DIV    = 868
) (
  input  logic        clk,
  input  logic        rst_n,
  // PowerPC PLB master ports
  input  plb_req_t    ppc0_req,
  output plb_rsp_t    ppc0_rsp,
  input  plb_req_t    ppc1_req,
  output plb_rsp_t    ppc1_rsp,
  // PowerPC 1 port of the scratchpad
  input  logic        sp_en,
  input  logic        sp_we,
  input  logic [$clog2(SP_BYTES/8)-1:0] sp_addr,
  input  logic [63:0] sp_wdata,
  input  logic [7:0]  sp_be,
  output logic [63:0] sp_rdata,
  // DDR controller (PLB slave)
  output plb_req_t    ddr_req,
  input  plb_rsp_t    ddr_rsp,
  // RS-232
  output logic        uart_txd,
  input  logic        uart_rxd,
  // low-level Gigabit MAC core
  output logic [7:0]  gmac_tx_data,
  output logic        gmac_tx_valid,
  output logic        gmac_tx_last,
  input  logic        gmac_tx_ready,
  input  logic [7:0]  gmac_rx_data,
  input  logic        gmac_rx_valid,
  input  logic        gmac_rx_last,
  input  logic        gmac_rx_err,
  // PCI core, master side (DMA)
  output logic        pci_cmd_valid,
  input  logic        pci_cmd_ready,
  output logic        pci_cmd_we,
  output logic [63:0] pci_cmd_addr,
  output logic [11:0] pci_cmd_len,
  input  logic        pci_rd_valid,
  input  logic [63:0] pci_rd_data,
  input  logic        pci_wr_ready,
  output logic [63:0] pci_wr_data,
  input  logic        pci_done,
  // PCI core, target side (host PIO to the SRAM)
  input  logic        pio_req,
  input  logic        pio_we,
  input  logic [$clog2(SRAM_BYTES)-1:0] pio_addr,
  input  logic [63:0] pio_wdata,
  input  logic [7:0]  pio_be,
  output logic        pio_ack,
  output logic [63:0] pio_rdata,
  // SRAM chip
  output logic        sram_ce,
  output logic        sram_we,
  output logic [$clog2(SRAM_BYTES)-4:0] sram_addr,
  output logic [63:0] sram_wdata,
  output logic [7:0]  sram_be,
  input  logic [63:0] sram_rdata
);
  localparam int NM = 5;
  localparam int NS = 8;

  plb_req_t m_req [NM];
  plb_rsp_t m_rsp [NM];
  plb_req_t s_req [NS];
  plb_rsp_t s_rsp [NS];

  assign m_req[0] = ppc0_req;
  assign m_req[1] = ppc1_req;
  assign ppc0_rsp = m_rsp[0];
  assign ppc1_rsp = m_rsp[1];
  assign ddr_req  = s_req[0];
  assign s_rsp[0] = ddr_rsp;

  plb_xbar #(.NM(NM), .NS(NS)) u_plb (
    .clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);

  plb_ram #(.BYTES(BRAM_BYTES)) u_bram (
    .clk, .rst_n, .req(s_req[1]), .rsp(s_rsp[1]));

  uart_plb #(.DIV(UART_DIV)) u_uart (
    .clk, .rst_n, .req(s_req[2]), .rsp(s_rsp[2]), .txd(uart_txd), .rxd(uart_rxd));

  mac_tx #(.BUF_BYTES(MAC_BUF)) u_mac_tx (
    .clk, .rst_n, .s_req(s_req[3]), .s_rsp(s_rsp[3]), .m_req(m_req[2]), .m_rsp(m_rsp[2]),
    .tx_data(gmac_tx_data), .tx_valid(gmac_tx_valid), .tx_last(gmac_tx_last), .tx_ready(gmac_tx_ready));

  mac_rx #(.BUF_BYTES(MAC_BUF)) u_mac_rx (
    .clk, .rst_n, .s_req(s_req[4]), .s_rsp(s_rsp[4]), .m_req(m_req[3]), .m_rsp(m_rsp[3]),
    .rx_data(gmac_rx_data), .rx_valid(gmac_rx_valid), .rx_last(gmac_rx_last), .rx_err(gmac_rx_err));

  // DMA front end <-> Virtex bridge
  br_flit_t fe_out, fe_in;
  logic fe_out_valid, fe_out_ready, fe_in_valid, fe_in_ready;
  dma_frontend #(.BURST(DMA_BURST)) u_dma_fe (
    .clk, .rst_n, .s_req(s_req[5]), .s_rsp(s_rsp[5]), .m_req(m_req[4]), .m_rsp(m_rsp[4]),
    .out_flit(fe_out), .out_valid(fe_out_valid), .out_ready(fe_out_ready),
    .in_flit(fe_in), .in_valid(fe_in_valid), .in_ready(fe_in_ready));

  // hardware events and scratchpad
  logic       evt_valid;
  logic [6:0] evt_ctx;
  logic       hs_en, hs_we;
  logic [$clog2(SP_BYTES/8)-1:0] hs_addr;
  logic [63:0] hs_wdata, hs_rdata;
  hw_events #(.NCTX(NCTX), .RING(SP_BYTES/8)) u_evt (
    .clk, .rst_n, .evt_valid, .evt_ctx(evt_ctx[$clog2(NCTX)-1:0]), .s_req(s_req[6]), .s_rsp(s_rsp[6]),
    .sp_en(hs_en), .sp_we(hs_we), .sp_addr(hs_addr), .sp_wdata(hs_wdata));

  scratchpad #(.BYTES(SP_BYTES)) u_sp (
    .clk, .a_en(sp_en), .a_we(sp_we), .a_addr(sp_addr), .a_wdata(sp_wdata), .a_be(sp_be),
    .a_rdata(sp_rdata), .b_en(hs_en), .b_we(hs_we), .b_addr(hs_addr), .b_wdata(hs_wdata),
    .b_rdata(hs_rdata));

  // inter-FPGA link
  br_flit_t v2s, s2v;
  logic v2s_valid, v2s_ready, s2v_valid, s2v_ready;

  bridge_virtex #(.SRAM_MASK(32'(SRAM_BYTES - 1))) u_br_v (
    .clk, .rst_n, .s_req(s_req[7]), .s_rsp(s_rsp[7]),
    .dma_out_flit(fe_out), .dma_out_valid(fe_out_valid), .dma_out_ready(fe_out_ready),
    .dma_in_flit(fe_in), .dma_in_valid(fe_in_valid), .dma_in_ready(fe_in_ready),
    .evt_valid, .evt_ctx,
    .link_tx(v2s), .link_tx_valid(v2s_valid), .link_tx_ready(v2s_ready),
    .link_rx(s2v), .link_rx_valid(s2v_valid), .link_rx_ready(s2v_ready));

  // ---------------- Spartan FPGA
  logic        n_req, n_we, n_ack;
  logic [20:0] n_addr;
  logic [63:0] n_wdata, n_rdata;
  logic [7:0]  n_be;
  logic        sevt_valid, sevt_ready;
  logic [$clog2(NCTX)-1:0] sevt_ctx;
  br_flit_t be_in, be_out;
  logic be_in_valid, be_in_ready, be_out_valid, be_out_ready;

  bridge_spartan u_br_s (
    .clk, .rst_n,
    .link_rx(v2s), .link_rx_valid(v2s_valid), .link_rx_ready(v2s_ready),
    .link_tx(s2v), .link_tx_valid(s2v_valid), .link_tx_ready(s2v_ready),
    .n_req, .n_we, .n_addr, .n_wdata, .n_be, .n_ack, .n_rdata,
    .evt_valid(sevt_valid), .evt_ctx(7'(sevt_ctx)), .evt_ready(sevt_ready),
    .dma_in_flit(be_in), .dma_in_valid(be_in_valid), .dma_in_ready(be_in_ready),
    .dma_out_flit(be_out), .dma_out_valid(be_out_valid), .dma_out_ready(be_out_ready));

  dma_backend #(.BUF_BYTES(DMA_BURST)) u_dma_be (
    .clk, .rst_n,
    .in_flit(be_in), .in_valid(be_in_valid), .in_ready(be_in_ready),
    .out_flit(be_out), .out_valid(be_out_valid), .out_ready(be_out_ready),
    .pci_cmd_valid, .pci_cmd_ready, .pci_cmd_we, .pci_cmd_addr, .pci_cmd_len,
    .pci_rd_valid, .pci_rd_data, .pci_wr_ready, .pci_wr_data, .pci_done);

  sram_ctrl #(.SRAM_BYTES(SRAM_BYTES), .NCTX(NCTX), .CTX_BYTES(CTX_BYTES)) u_sram (
    .clk, .rst_n,
    .h_req(pio_req), .h_we(pio_we), .h_addr(pio_addr), .h_wdata(pio_wdata), .h_be(pio_be),
    .h_ack(pio_ack), .h_rdata(pio_rdata),
    .n_req, .n_we, .n_addr($clog2(SRAM_BYTES)'(n_addr)), .n_wdata, .n_be, .n_ack, .n_rdata,
    .evt_valid(sevt_valid), .evt_ctx(sevt_ctx), .evt_ready(sevt_ready),
    .sram_ce, .sram_we, .sram_addr, .sram_wdata, .sram_be, .sram_rdata);
endmodule
