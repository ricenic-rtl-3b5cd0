// uart_plb: serial console UART on the PLB, through which the embedded
// processors talk to a terminal over RS-232.
//
// Frames are 8 data bits, no parity, one stop bit, least significant bit
// first. The bit time is DIV clock cycles and can be changed at run time.
// Transmit and receive each have a 16-byte FIFO.
//
// Registers (64-bit PLB words, offset from the UART base):
//   0x00 write: queue byte wdata[7:0] for transmission (dropped if full)
//   0x08 read:  {55'0, valid, byte}; pops the receive FIFO when valid
//   0x10 read:  status {tx_idle, rx_overrun, rx_avail, tx_full} in [3:0]
//   0x18 read/write: bit time in clock cycles
// Each access is acknowledged one cycle after it is presented.
//
// The document gives the UART's purpose and its place on the PLB; the
// frame format, baud rate, FIFOs and registers are this design's choices.
module uart_plb
  import ricenic_pkg::*;
#(
  parameter int DIV = 868  // 100 MHz / 115200 baud
) (
  input  logic     clk,
  input  logic     rst_n,
  input  plb_req_t req,
  output plb_rsp_t rsp,
  output logic     txd,
  input  logic     rxd
);
  logic ack_q;
  logic [63:0] rdata_q;
  logic [15:0] div_q;
  logic acc;
  assign acc = req.valid && !ack_q;
  logic [1:0] reg_sel;
  assign reg_sel = req.addr[4:3];

  // ---------------- transmit
  logic tx_push, tx_pop, tx_full, tx_empty;
  logic [7:0] tx_head;
  logic [4:0] tx_cnt;
  sync_fifo #(.WIDTH(8), .DEPTH(16)) u_txf (
    .clk, .rst_n, .push(tx_push), .wdata(req.wdata[7:0]), .pop(tx_pop),
    .rdata(tx_head), .full(tx_full), .empty(tx_empty), .count(tx_cnt));
  assign tx_push = acc && req.we && reg_sel == 2'd0;

  logic        tx_busy;
  logic [9:0]  tx_shift;
  logic [3:0]  tx_bits;
  logic [15:0] tx_timer;
  assign tx_pop = !tx_busy && !tx_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy <= 1'b0; tx_shift <= '1; tx_bits <= '0; tx_timer <= '0;
    end else if (!tx_busy) begin
      if (!tx_empty) begin
        tx_busy  <= 1'b1;
        tx_shift <= {1'b1, tx_head, 1'b0};
        tx_bits  <= 4'd10;
        tx_timer <= div_q - 1'b1;
      end
    end else if (tx_timer != 0) begin
      tx_timer <= tx_timer - 1'b1;
    end else begin
      tx_shift <= {1'b1, tx_shift[9:1]};
      tx_timer <= div_q - 1'b1;
      tx_bits  <= tx_bits - 1'b1;
      if (tx_bits == 4'd1) tx_busy <= 1'b0;
    end
  end
  assign txd = tx_busy ? tx_shift[0] : 1'b1;

  // ---------------- receive
  logic [2:0]  rx_sync;
  logic        rx_busy;
  logic [15:0] rx_timer;
  logic [3:0]  rx_bits;
  logic [7:0]  rx_shift;
  logic        rx_push, rx_pop, rx_full, rx_empty, rx_ovr;
  logic [7:0]  rx_head;
  logic [4:0]  rx_cnt;
  logic        rx_in;
  assign rx_in = rx_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync <= '1; rx_busy <= 1'b0; rx_timer <= '0; rx_bits <= '0;
      rx_shift <= '0; rx_push <= 1'b0; rx_ovr <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[1:0], rxd};
      rx_push <= 1'b0;
      if (!rx_busy) begin
        if (!rx_in) begin            // start bit edge: sample mid-bit
          rx_busy  <= 1'b1;
          rx_timer <= {1'b0, div_q[15:1]};
          rx_bits  <= 4'd0;
        end
      end else if (rx_timer != 0) begin
        rx_timer <= rx_timer - 1'b1;
      end else begin
        rx_timer <= div_q - 1'b1;
        rx_bits  <= rx_bits + 1'b1;
        if (rx_bits == 4'd0) begin
          if (rx_in) rx_busy <= 1'b0;          // glitch, not a start bit
        end else if (rx_bits <= 4'd8) begin
          rx_shift <= {rx_in, rx_shift[7:1]};
        end else begin                          // stop bit
          rx_busy <= 1'b0;
          if (rx_in) begin
            if (rx_full) rx_ovr <= 1'b1;
            else         rx_push <= 1'b1;
          end
        end
      end
    end
  end

  sync_fifo #(.WIDTH(8), .DEPTH(16)) u_rxf (
    .clk, .rst_n, .push(rx_push), .wdata(rx_shift), .pop(rx_pop),
    .rdata(rx_head), .full(rx_full), .empty(rx_empty), .count(rx_cnt));
  assign rx_pop = acc && !req.we && reg_sel == 2'd1;

  // ---------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q <= 1'b0; rdata_q <= '0; div_q <= 16'(DIV);
    end else begin
      ack_q <= acc;
      if (acc) begin
        if (req.we && reg_sel == 2'd3) div_q <= req.wdata[15:0];
        unique case (reg_sel)
          2'd0: rdata_q <= '0;
          2'd1: rdata_q <= {55'd0, !rx_empty, rx_empty ? 8'd0 : rx_head};
          2'd2: rdata_q <= {60'd0, !tx_busy && tx_empty, rx_ovr, !rx_empty, tx_full};
          2'd3: rdata_q <= {48'd0, div_q};
        endcase
      end
    end
  end
  assign rsp.ack   = ack_q;
  assign rsp.rdata = rdata_q;
endmodule
