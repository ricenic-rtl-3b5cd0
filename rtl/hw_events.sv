// hw_events: hardware event notification for the virtual machine
// contexts. It tells the firmware which of the 128 SRAM contexts a
// guest has written, so the firmware does not have to poll them all.
//
// An event (context number) from the SRAM controller, through the
// bridge, sets that context's pending bit. If the bit was clear, a
// record {sequence number [63:32], context [6:0]} is written into the
// next slot of a ring in the scratchpad and the producer index advances.
// If the bit was already set the event is merged with the pending one.
// Firmware reads the ring up to the producer index, services each
// context and clears its pending bit; since at most NCTX records can be
// pending and the ring has RING slots (RING >= NCTX), it never overflows.
//
// Registers (PLB, acknowledge one cycle after the request):
//   0x00 read: producer index (events recorded)
//   0x08 write: clear the pending bit of context wdata[6:0]
//   0x10 read: pending bits 63..0; 0x18 read: pending bits 127..64
//   (0x10/0x18 assume NCTX = 128)
// Set wins over clear for the same context in the same cycle.
//
// The notification's purpose and its links to the bridge and the
// scratchpad follow the document; the pending bits, ring and registers
// are this design's own.
module hw_events
  import ricenic_pkg::*;
#(
  parameter int NCTX = 128,
  parameter int RING = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       evt_valid,
  input  logic [$clog2(NCTX)-1:0] evt_ctx,
  input  plb_req_t   s_req,
  output plb_rsp_t   s_rsp,
  // scratchpad write port
  output logic       sp_en,
  output logic       sp_we,
  output logic [$clog2(RING)-1:0] sp_addr,
  output logic [63:0] sp_wdata
);
  localparam int CW = $clog2(NCTX);
  logic [NCTX-1:0] pending;
  logic [31:0]     prod;
  logic s_ack, s_acc;
  logic [63:0] s_rdata;
  logic [1:0] rsel;
  assign s_acc = s_req.valid && !s_ack;
  assign rsel  = s_req.addr[4:3];

  logic new_evt;
  assign new_evt = evt_valid && !pending[evt_ctx];

  assign sp_en    = new_evt;
  assign sp_we    = new_evt;
  assign sp_addr  = prod[$clog2(RING)-1:0];
  assign sp_wdata = {prod, 32'(evt_ctx)};

  logic [NCTX-1:0] pend_rd;
  assign pend_rd = pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0; prod <= '0; s_ack <= 1'b0; s_rdata <= '0;
    end else begin
      s_ack <= s_acc;
      if (s_acc && s_req.we && rsel == 2'd1) pending[s_req.wdata[CW-1:0]] <= 1'b0;
      if (new_evt) begin
        pending[evt_ctx] <= 1'b1;
        prod <= prod + 1'b1;
      end
      if (s_acc) begin
        unique case (rsel)
          2'd0: s_rdata <= {32'd0, prod};
          2'd1: s_rdata <= '0;
          2'd2: s_rdata <= 64'(pend_rd);
          2'd3: s_rdata <= 64'(pend_rd >> 64);
        endcase
      end
    end
  end
  assign s_rsp.ack = s_ack;
  assign s_rsp.rdata = s_rdata;

  // elaboration-time check: the ring must hold one record per context
  if (RING < NCTX) begin : g_ring_too_small
    $error("event ring smaller than the number of contexts");
  end
endmodule
