// bridge_virtex: Virtex end of the link to the Spartan FPGA.
//
// It carries three kinds of traffic over one flit channel in each
// direction (br_flit_t, valid/ready):
//  * PIO: a PLB access to the SRAM window becomes a BR_PIO_RD or
//    BR_PIO_WR flit with the SRAM byte offset; the PLB acknowledge is
//    given when the matching response flit returns, with its read data.
//    One PIO access is outstanding at a time.
//  * DMA: flits from the DMA front end are forwarded to the Spartan;
//    returning BR_DMA_RD and BR_DMA_WR flits go back to the front end.
//  * Events: BR_EVENT flits from the SRAM controller (a host write into a
//    context) are handed to the hardware event unit; they are always
//    accepted.
// On the outgoing link a pending PIO request goes before DMA flits.
// Both FPGAs are modelled on one clock.
//
// The document shows the two bridges and what crosses them (Fig. 2); the
// flit format, the single link and the priorities are this design's own.
module bridge_virtex
  import ricenic_pkg::*;
#(
  parameter logic [31:0] SRAM_MASK = 32'h001F_FFFF
) (
  input  logic       clk,
  input  logic       rst_n,
  // PLB slave for the SRAM window
  input  plb_req_t   s_req,
  output plb_rsp_t   s_rsp,
  // DMA front end
  input  br_flit_t   dma_out_flit,
  input  logic       dma_out_valid,
  output logic       dma_out_ready,
  output br_flit_t   dma_in_flit,
  output logic       dma_in_valid,
  input  logic       dma_in_ready,
  // hardware events
  output logic       evt_valid,
  output logic [6:0] evt_ctx,
  // link to the Spartan
  output br_flit_t   link_tx,
  output logic       link_tx_valid,
  input  logic       link_tx_ready,
  input  br_flit_t   link_rx,
  input  logic       link_rx_valid,
  output logic       link_rx_ready
);
  typedef enum logic [1:0] {P_IDLE, P_SEND, P_WAIT, P_ACK} pio_e;
  pio_e pst;
  logic [63:0] pio_data;

  // outgoing link
  always_comb begin
    link_tx       = dma_out_flit;
    link_tx_valid = dma_out_valid;
    dma_out_ready = link_tx_ready;
    if (pst == P_SEND) begin
      link_tx       = '0;
      link_tx.kind  = s_req.we ? BR_PIO_WR : BR_PIO_RD;
      link_tx.addr  = 64'(s_req.addr & SRAM_MASK);
      link_tx.data  = s_req.wdata;
      link_tx.be    = s_req.be;
      link_tx_valid = 1'b1;
      dma_out_ready = 1'b0;
    end
  end

  // incoming link
  logic is_pio, is_dma, is_evt;
  assign is_pio = (link_rx.kind == BR_PIO_RD) || (link_rx.kind == BR_PIO_WR);
  assign is_evt = (link_rx.kind == BR_EVENT);
  assign is_dma = !is_pio && !is_evt;

  assign dma_in_flit   = link_rx;
  assign dma_in_valid  = link_rx_valid && is_dma;
  assign evt_valid     = link_rx_valid && is_evt;
  assign evt_ctx       = link_rx.addr[6:0];
  assign link_rx_ready = is_evt || (is_pio && pst == P_WAIT) || (is_dma && dma_in_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst <= P_IDLE; pio_data <= '0;
    end else begin
      unique case (pst)
        P_IDLE: if (s_req.valid) pst <= P_SEND;
        P_SEND: if (link_tx_ready) pst <= P_WAIT;
        P_WAIT: if (link_rx_valid && is_pio) begin
          pio_data <= link_rx.data;
          pst      <= P_ACK;
        end
        P_ACK:  pst <= P_IDLE;
        default: pst <= P_IDLE;
      endcase
    end
  end
  assign s_rsp.ack   = (pst == P_ACK);
  assign s_rsp.rdata = pio_data;
endmodule
