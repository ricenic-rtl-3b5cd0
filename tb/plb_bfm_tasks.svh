// Bus-functional PLB master tasks for testbenches. The including module
// declares clk, preq (plb_req_t, driven here) and prsp (plb_rsp_t).
// Requests are driven on the falling edge and held until an
// acknowledge is seen on a falling edge; the request is then dropped.
// plb_lat returns the number of rising edges from request to acknowledge.
int plb_lat;

task automatic plb_wr(input logic [31:0] a, input logic [63:0] d, input logic [7:0] be = 8'hFF);
  @(negedge clk);
  preq.valid = 1'b1; preq.we = 1'b1; preq.addr = a; preq.wdata = d; preq.be = be;
  plb_lat = 0;
  do begin @(negedge clk); plb_lat++; end while (!prsp.ack);
  preq.valid = 1'b0; preq.we = 1'b0;
endtask

task automatic plb_rd(input logic [31:0] a, output logic [63:0] d);
  @(negedge clk);
  preq.valid = 1'b1; preq.we = 1'b0; preq.addr = a; preq.wdata = '0; preq.be = 8'hFF;
  plb_lat = 0;
  do begin @(negedge clk); plb_lat++; end while (!prsp.ack);
  d = prsp.rdata;
  preq.valid = 1'b0;
endtask
