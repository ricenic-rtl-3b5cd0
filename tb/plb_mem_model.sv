// plb_mem_model: behavioural PLB slave memory for testbenches (stands in
// for NIC memory such as the DDR SDRAM). WORDS 64-bit words, byte
// enables honoured, acknowledge after a random 1..MAXLAT cycles. The
// array is public (mem) so a testbench can load and inspect it.
module plb_mem_model
  import ricenic_pkg::*;
#(
  parameter int WORDS  = 4096,
  parameter int MAXLAT = 3
) (
  input  logic     clk,
  input  plb_req_t req,
  output plb_rsp_t rsp
);
  logic [63:0] mem [WORDS];
  int wait_cnt = -1;
  initial begin
    rsp = '0;
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end
  always @(posedge clk) begin
    rsp.ack <= 1'b0;
    if (req.valid && !rsp.ack) begin
      if (wait_cnt < 0) wait_cnt = $urandom_range(MAXLAT - 1, 0);
      if (wait_cnt == 0) begin
        int idx;
        idx = int'(req.addr[31:3]) % WORDS;
        if (req.we) begin
          for (int b = 0; b < 8; b++) if (req.be[b]) mem[idx][8*b +: 8] <= req.wdata[8*b +: 8];
        end
        rsp.rdata <= mem[idx];
        rsp.ack   <= 1'b1;
        wait_cnt = -1;
      end else wait_cnt--;
    end
  end
endmodule
