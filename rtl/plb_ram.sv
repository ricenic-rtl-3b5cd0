// plb_ram: on-FPGA block RAM (BRAM) on the PLB, 32 KB by default as in
// the NIC's memory budget. It holds BYTES/8 words of 64 bits and
// honours the eight byte enables on writes. A request is acknowledged
// one cycle after it is presented, with read data in the same cycle as
// the acknowledge. Only the low address bits select the word; the bus
// has already decoded the region. The size follows the document; the
// one-cycle latency is this design's own choice.
module plb_ram
  import ricenic_pkg::*;
#(
  parameter int BYTES = 32768
) (
  input  logic     clk,
  input  logic     rst_n,
  input  plb_req_t req,
  output plb_rsp_t rsp
);
  localparam int WORDS = BYTES / 8;
  localparam int AW    = $clog2(WORDS);
  logic [63:0] mem [WORDS];
  logic [AW-1:0] idx;
  logic ack_q;
  logic [63:0] rdata_q;

  assign idx = req.addr[AW+2:3];

  always_ff @(posedge clk) begin
    if (req.valid && !ack_q) begin
      if (req.we) begin
        for (int b = 0; b < 8; b++)
          if (req.be[b]) mem[idx][8*b +: 8] <= req.wdata[8*b +: 8];
      end
      rdata_q <= mem[idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_q <= 1'b0;
    else        ack_q <= req.valid && !ack_q;
  end

  assign rsp.ack   = ack_q;
  assign rsp.rdata = rdata_q;
endmodule
