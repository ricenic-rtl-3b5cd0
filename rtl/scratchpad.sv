// scratchpad: 2 KB dual-port on-chip memory between the hardware event
// unit and the second PowerPC processor. Port A serves the processor
// (read and byte-enabled write); port B is written by the hardware event
// unit with event records and can also be read. Both ports are
// synchronous: read data appears the cycle after en. If both ports write
// the same word in one cycle, port B's data is kept. The size follows
// the document; the organisation as 256 words of 64 bits is this
// design's own.
module scratchpad #(
  parameter int BYTES = 2048
) (
  input  logic        clk,
  input  logic        a_en,
  input  logic        a_we,
  input  logic [$clog2(BYTES/8)-1:0] a_addr,
  input  logic [63:0] a_wdata,
  input  logic [7:0]  a_be,
  output logic [63:0] a_rdata,
  input  logic        b_en,
  input  logic        b_we,
  input  logic [$clog2(BYTES/8)-1:0] b_addr,
  input  logic [63:0] b_wdata,
  output logic [63:0] b_rdata
);
  logic [63:0] mem [BYTES/8];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we)
        for (int b = 0; b < 8; b++)
          if (a_be[b] && !(b_en && b_we && b_addr == a_addr)) mem[a_addr][8*b +: 8] <= a_wdata[8*b +: 8];
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end
endmodule
