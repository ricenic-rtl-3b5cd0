// tb_plb_xbar: three masters run random reads and writes at once
// through the bus to two memory slaves with random latency and to an
// unmapped address. Each master owns a disjoint address range and keeps
// its own reference copy, so every read can be checked. Also checks that
// an unmapped access completes with zero data and that round-robin
// arbitration lets every master finish its share while all compete.
// Timing: whenever a transfer is acknowledged while another master is
// waiting, the grant must pass to that master at the same clock edge,
// with no idle cycle (counted as handovers; a miss is a failure).
module tb_plb_xbar;
  import ricenic_pkg::*;
  localparam int NM = 3, NS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  plb_req_t m_req [NM];
  plb_rsp_t m_rsp [NM];
  plb_req_t s_req [NS];
  plb_rsp_t s_rsp [NS];
  int checks = 0, failures = 0;

  plb_xbar #(.NM(NM), .NS(NS),
             .BASE({32'h2000_0000, 32'h1000_0000}),
             .MASK({32'hFFFF_0000, 32'hFFFF_0000})) dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);
  plb_mem_model #(.WORDS(8192), .MAXLAT(4)) s0 (.clk, .req(s_req[0]), .rsp(s_rsp[0]));
  plb_mem_model #(.WORDS(8192), .MAXLAT(4)) s1 (.clk, .req(s_req[1]), .rsp(s_rsp[1]));

  initial for (int m = 0; m < NM; m++) m_req[m] = '0;

  task automatic access(input int m, input logic we, input logic [31:0] a, input logic [63:0] wd,
                        output logic [63:0] rd);
    @(negedge clk);
    m_req[m].valid = 1'b1; m_req[m].we = we; m_req[m].addr = a; m_req[m].wdata = wd; m_req[m].be = '1;
    do @(negedge clk); while (!m_rsp[m].ack);
    rd = m_rsp[m].rdata;
    m_req[m].valid = 1'b0;
  endtask

  // handover check, sampled just after the inputs settle for the next edge
  int handovers = 0, missed = 0;
  bit expect_ho = 0;
  int prev_owner = 0;
  always @(negedge clk) begin
    #1;
    if (expect_ho) begin
      if (dut.busy && int'(dut.owner) != prev_owner) handovers++;
      else missed++;
    end
    expect_ho = 0;
    if (rst_n && dut.done) begin
      for (int m = 0; m < NM; m++)
        if (m != int'(dut.owner) && m_req[m].valid) expect_ho = 1;
      prev_owner = int'(dut.owner);
    end
  end

  int done_ops [NM];
  logic [63:0] refm [NM][64];

  task automatic master(input int m);
    logic [63:0] d;
    logic [31:0] base;
    for (int i = 0; i < 64; i++) begin
      refm[m][i] = {32'(m), 32'(i)};
      base = (i % 2 == 0) ? 32'h1000_0000 : 32'h2000_0000;
      access(m, 1'b1, base + 32'(m * 1024 + i * 8), refm[m][i], d);
    end
    for (int k = 0; k < 200; k++) begin
      int i;
      logic [31:0] a;
      i = $urandom % 64;
      a = ((i % 2 == 0) ? 32'h1000_0000 : 32'h2000_0000) + 32'(m * 1024 + i * 8);
      if ($urandom % 3 == 0) begin
        refm[m][i] = {$urandom, $urandom};
        access(m, 1'b1, a, refm[m][i], d);
      end else begin
        access(m, 1'b0, a, '0, d);
        checks++;
        if (d !== refm[m][i]) begin failures++; $display("m%0d word %0d: %h vs %h", m, i, d, refm[m][i]); end
      end
      done_ops[m]++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] d;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      master(0);
      master(1);
      master(2);
      begin
        // while the others run, check fairness: nobody lags far behind
        repeat (2000) @(posedge clk);
        checks++;
        if (done_ops[0] - done_ops[1] > 3 || done_ops[1] - done_ops[0] > 3 ||
            done_ops[2] - done_ops[0] > 3 || done_ops[0] - done_ops[2] > 3) begin
          failures++; $display("unfair: %0d %0d %0d", done_ops[0], done_ops[1], done_ops[2]);
        end
      end
    join
    checks++;
    if (missed != 0 || handovers < 100) begin
      failures++; $display("handovers %0d, missed %0d", handovers, missed);
    end
    access(0, 1'b0, 32'h7000_0000, '0, d);
    checks++;
    if (d !== '0) begin failures++; $display("unmapped read %h", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
