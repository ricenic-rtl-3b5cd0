// tb_hw_events: random context events; a reference model of the pending
// bits decides which events are new. Checks each ring record written to
// the scratchpad port (slot, sequence number, context), that repeated
// events for a pending context are merged, the producer index and
// pending-bit registers, and that clearing a context re-arms it.
module tb_hw_events;
  import ricenic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  plb_req_t preq = '0;
  plb_rsp_t prsp;
  logic evt_valid = 0;
  logic [6:0] evt_ctx = '0;
  logic sp_en, sp_we;
  logic [7:0] sp_addr;
  logic [63:0] sp_wdata;
  int checks = 0, failures = 0;
  `include "tb/plb_bfm_tasks.svh"

  hw_events dut (.clk, .rst_n, .evt_valid, .evt_ctx, .s_req(preq), .s_rsp(prsp),
                 .sp_en, .sp_we, .sp_addr, .sp_wdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [63:0] ring [$];
  logic [7:0] slots [$];
  always @(posedge clk) if (sp_en && sp_we) begin ring.push_back(sp_wdata); slots.push_back(sp_addr); end

  logic [127:0] pend = '0;
  int exp_ctx [$];
  int merged = 0;

  task automatic event_in(input int c);
    @(negedge clk);
    evt_valid = 1; evt_ctx = 7'(c);
    if (!pend[c]) begin pend[c] = 1'b1; exp_ctx.push_back(c); end
    else merged++;
    @(negedge clk);
    evt_valid = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] r, r2;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 100; k++) event_in($urandom % 40);
    repeat (3) @(negedge clk);
    check(merged > 0, "some events merged");
    check(ring.size() == exp_ctx.size(), $sformatf("%0d records, expected %0d", ring.size(), exp_ctx.size()));
    foreach (ring[i]) if (i < exp_ctx.size())
      check(ring[i] == {32'(i), 32'(exp_ctx[i])} && slots[i] == 8'(i), $sformatf("record %0d: %h", i, ring[i]));
    plb_rd(32'h2000_4000, r);
    check(r[31:0] == exp_ctx.size(), "producer index");
    plb_rd(32'h2000_4010, r);
    plb_rd(32'h2000_4018, r2);
    check({r2, r} == pend, "pending bits");
    // firmware services every other pending context
    foreach (exp_ctx[i]) if (i % 2 == 0) begin
      plb_wr(32'h2000_4008, 64'(exp_ctx[i]));
      pend[exp_ctx[i]] = 1'b0;
    end
    plb_rd(32'h2000_4010, r);
    plb_rd(32'h2000_4018, r2);
    check({r2, r} == pend, "pending bits after clears");
    // cleared contexts notify again, pending ones stay merged
    for (int k = 0; k < 60; k++) event_in($urandom % 128);
    repeat (3) @(negedge clk);
    check(ring.size() == exp_ctx.size(), $sformatf("%0d records after re-arm, expected %0d", ring.size(), exp_ctx.size()));
    foreach (ring[i]) if (i < exp_ctx.size())
      check(ring[i][6:0] == 7'(exp_ctx[i]), $sformatf("record %0d context", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
