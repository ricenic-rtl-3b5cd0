// tb_mac_rx: frames of random bytes arrive from the low-level MAC into
// buffers the test posts at scattered, out-of-order addresses. Checks
// the bytes written to memory (and that bytes past the frame end inside
// the buffer are untouched), each completion's address, length, error
// flag and checksum (computed here), the drop of a frame when no buffer
// is posted, of a frame too large for its buffer, of a frame that
// arrives while both buffer halves are busy, and the counters.
module tb_mac_rx;
  import ricenic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  plb_req_t preq = '0;
  plb_rsp_t prsp;
  plb_req_t m_req;
  plb_rsp_t m_rsp;
  logic [7:0] rx_data = '0;
  logic rx_valid = 0, rx_last = 0, rx_err = 0;
  int checks = 0, failures = 0;
  `include "tb/plb_bfm_tasks.svh"

  mac_rx dut (.clk, .rst_n, .s_req(preq), .s_rsp(prsp), .m_req, .m_rsp,
              .rx_data, .rx_valid, .rx_last, .rx_err);
  plb_mem_model #(.WORDS(4096), .MAXLAT(3)) nicmem (.clk, .req(m_req), .rsp(m_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] mbyte(input int a);
    return nicmem.mem[a >> 3][8*(a % 8) +: 8];
  endfunction

  function automatic logic [15:0] ref_sum(input logic [7:0] f [$], input int cs);
    logic [16:0] s;
    logic [15:0] sum = 0;
    for (int k = cs; k < f.size(); k++) begin
      s = {1'b0, sum} + (((k - cs) % 2 == 0) ? {1'b0, f[k], 8'h00} : {9'h000, f[k]});
      sum = s[15:0] + 16'(s[16]);
    end
    return sum;
  endfunction

  task automatic send(input logic [7:0] f [$], input bit err);
    foreach (f[i]) begin
      @(negedge clk);
      rx_valid = 1; rx_data = f[i]; rx_last = (i == f.size() - 1); rx_err = err && rx_last;
      // an idle gap now and then, as between GMII bursts of the core
    end
    @(negedge clk);
    rx_valid = 0; rx_last = 0; rx_err = 0;
    repeat (12) @(negedge clk);   // inter-frame gap
  endtask

  function automatic void rand_frame(ref logic [7:0] f [$], input int n);
    f = {};
    for (int i = 0; i < n; i++) f.push_back(8'($urandom));
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] f [$];
  logic [7:0] sent [4][$];
  int lens [4] = '{60, 1514, 97, 333};
  int addrs [4] = '{24576, 512, 16384, 8200};
  rx_desc_t d;
  rx_cmpl_t c;
  logic [63:0] r;
  initial begin
    for (int i = 0; i < 4096; i++) nicmem.mem[i] = 64'hDEAD_BEEF_DEAD_BEEF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // no buffer posted: the first frame is dropped
    rand_frame(f, 80);
    send(f, 0);
    // post four buffers at scattered addresses, out of address order
    foreach (addrs[i]) begin
      d = '0; d.addr = addrs[i]; d.len = 11'(1600);
      plb_wr(32'h2000_2000, d);
    end
    foreach (lens[i]) begin
      rand_frame(sent[i], lens[i]);
      send(sent[i], i == 2);
      repeat (1000) @(negedge clk);  // let the copy finish
    end
    // a frame larger than its buffer is dropped
    d = '0; d.addr = 0; d.len = 11'(64);
    plb_wr(32'h2000_2000, d);
    rand_frame(f, 100);
    send(f, 0);
    repeat (200) @(negedge clk);
    foreach (lens[i]) begin
      automatic int bad = 0;
      plb_rd(32'h2000_2008, r);
      c = rx_cmpl_t'(r);
      check(c.valid, $sformatf("completion %0d present", i));
      check(c.addr == addrs[i], $sformatf("completion %0d address %0d", i, c.addr));
      check(c.len == lens[i], $sformatf("completion %0d length %0d", i, c.len));
      check(c.err == (i == 2), $sformatf("completion %0d error flag", i));
      check(c.csum == ref_sum(sent[i], 34), $sformatf("completion %0d checksum %h vs %h", i, c.csum, ref_sum(sent[i], 34)));
      foreach (sent[i][k]) if (mbyte(addrs[i] + k) !== sent[i][k]) bad++;
      check(bad == 0, $sformatf("frame %0d: %0d wrong bytes in memory", i, bad));
      check(mbyte(addrs[i] + lens[i]) == 8'hDE || mbyte(addrs[i] + lens[i]) == 8'hAD ||
            mbyte(addrs[i] + lens[i]) == 8'hBE || mbyte(addrs[i] + lens[i]) == 8'hEF,
            $sformatf("frame %0d: byte past the end overwritten", i));
    end
    plb_rd(32'h2000_2008, r);
    c = rx_cmpl_t'(r);
    check(c.valid && c.len == 0 && c.err && c.addr == 0, "too-small buffer handed back");
    plb_rd(32'h2000_2008, r);
    check(r[63] == 1'b0, "completion queue empty");
    plb_rd(32'h2000_2010, r);
    check(r[63:32] == 2, $sformatf("dropped count %0d", r[63:32]));
    // two frames fill both halves of the buffer while the first is still
    // being copied out; a third arriving then is dropped
    for (int i = 0; i < 3; i++) begin
      d = '0; d.addr = 20000 + i * 2048; d.len = 11'(1600);
      plb_wr(32'h2000_2000, d);
    end
    rand_frame(f, 1000);
    send(f, 0);
    rand_frame(sent[1], 60);
    send(sent[1], 0);
    rand_frame(f, 60);
    send(f, 0);
    repeat (1500) @(negedge clk);
    plb_rd(32'h2000_2008, r);
    c = rx_cmpl_t'(r);
    check(c.valid && c.len == 1000 && c.addr == 20000, "frame before the overrun kept");
    plb_rd(32'h2000_2008, r);
    c = rx_cmpl_t'(r);
    check(c.valid && c.len == 60 && c.addr == 22048 && c.csum == ref_sum(sent[1], 34),
          "second frame kept in the other half");
    plb_rd(32'h2000_2008, r);
    check(r[63] == 1'b0, "third frame, with both halves busy, dropped");
    plb_rd(32'h2000_2010, r);
    check(r[63:32] == 3, $sformatf("dropped count after overrun %0d", r[63:32]));
    check(r[31:0] == 6, $sformatf("received count %0d", r[31:0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
