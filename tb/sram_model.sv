// sram_model: behavioural model of the synchronous 64-bit SRAM chip for
// testbenches. A write with ce and we stores the enabled bytes on the
// rising edge; a read with ce returns the word on rdata from the next
// rising edge on. The array (mem) is public for loading and checking.
module sram_model #(
  parameter int WORDS = 262144
) (
  input  logic        clk,
  input  logic        ce,
  input  logic        we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [63:0] wdata,
  input  logic [7:0]  be,
  output logic [63:0] rdata
);
  logic [63:0] mem [WORDS];
  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;
  always @(posedge clk) begin
    if (ce) begin
      if (we) begin
        for (int b = 0; b < 8; b++) if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule
