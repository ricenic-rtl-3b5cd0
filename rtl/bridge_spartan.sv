// bridge_spartan: Spartan end of the link to the Virtex FPGA.
//
// Incoming flits are sorted by kind: BR_PIO_RD / BR_PIO_WR become one
// access on the SRAM controller's NIC port, and the answer goes back as
// a flit of the same kind carrying the read data; DMA flits go to the
// back-end DMA. Outgoing, context events from the SRAM controller go
// first, then PIO answers, then back-end DMA flits. The PIO path holds
// one access at a time, matching the Virtex end. Both FPGAs are modelled
// on one clock.
//
// The document shows this bridge between the Virtex bridge, the back-end
// DMA and the SRAM controller (Fig. 2); everything else here is this
// design's own.
module bridge_spartan
  import ricenic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // link from / to the Virtex
  input  br_flit_t    link_rx,
  input  logic        link_rx_valid,
  output logic        link_rx_ready,
  output br_flit_t    link_tx,
  output logic        link_tx_valid,
  input  logic        link_tx_ready,
  // SRAM controller, NIC port
  output logic        n_req,
  output logic        n_we,
  output logic [20:0] n_addr,
  output logic [63:0] n_wdata,
  output logic [7:0]  n_be,
  input  logic        n_ack,
  input  logic [63:0] n_rdata,
  // context events from the SRAM controller
  input  logic        evt_valid,
  input  logic [6:0]  evt_ctx,
  output logic        evt_ready,
  // back-end DMA
  output br_flit_t    dma_in_flit,
  output logic        dma_in_valid,
  input  logic        dma_in_ready,
  input  br_flit_t    dma_out_flit,
  input  logic        dma_out_valid,
  output logic        dma_out_ready
);
  typedef enum logic [1:0] {P_IDLE, P_ACC, P_RSP} pio_e;
  pio_e pst;
  br_flit_t pio;

  logic is_pio;
  assign is_pio = (link_rx.kind == BR_PIO_RD) || (link_rx.kind == BR_PIO_WR);

  assign dma_in_flit   = link_rx;
  assign dma_in_valid  = link_rx_valid && !is_pio;
  assign link_rx_ready = is_pio ? (pst == P_IDLE) : dma_in_ready;

  assign n_req   = (pst == P_ACC);
  assign n_we    = (pio.kind == BR_PIO_WR);
  assign n_addr  = pio.addr[20:0];
  assign n_wdata = pio.data;
  assign n_be    = pio.be;

  always_comb begin
    link_tx       = dma_out_flit;
    link_tx_valid = dma_out_valid;
    dma_out_ready = 1'b0;
    evt_ready     = 1'b0;
    if (evt_valid) begin
      link_tx       = '0;
      link_tx.kind  = BR_EVENT;
      link_tx.addr  = 64'(evt_ctx);
      link_tx_valid = 1'b1;
      evt_ready     = link_tx_ready;
    end else if (pst == P_RSP) begin
      link_tx       = pio;
      link_tx_valid = 1'b1;
    end else begin
      dma_out_ready = link_tx_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst <= P_IDLE; pio <= '0;
    end else begin
      unique case (pst)
        P_IDLE: if (link_rx_valid && is_pio) begin
          pio <= link_rx;
          pst <= P_ACC;
        end
        P_ACC: if (n_ack) begin
          if (pio.kind == BR_PIO_RD) pio.data <= n_rdata;
          pst <= P_RSP;
        end
        P_RSP: if (link_tx_ready && !evt_valid) pst <= P_IDLE;
        default: pst <= P_IDLE;
      endcase
    end
  end
endmodule
