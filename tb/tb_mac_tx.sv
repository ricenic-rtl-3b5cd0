// tb_mac_tx: gather transmit with checksum insertion. Frames are built
// from fragments at unaligned addresses in a memory model; the expected
// frame and its ones-complement checksum are computed here from the
// memory contents and compared byte by byte with the stream sent to the
// low-level MAC, which applies random back-pressure. Also checks the
// last marker, the sent-frame counter and that a frame without csum_en
// goes out unchanged.
module tb_mac_tx;
  import ricenic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  plb_req_t preq = '0;
  plb_rsp_t prsp;
  plb_req_t m_req;
  plb_rsp_t m_rsp;
  logic [7:0] tx_data;
  logic tx_valid, tx_last, tx_ready;
  int checks = 0, failures = 0;
  `include "tb/plb_bfm_tasks.svh"

  mac_tx dut (.clk, .rst_n, .s_req(preq), .s_rsp(prsp), .m_req, .m_rsp,
              .tx_data, .tx_valid, .tx_last, .tx_ready);
  plb_mem_model #(.WORDS(4096), .MAXLAT(3)) nicmem (.clk, .req(m_req), .rsp(m_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] mbyte(input int a);
    return nicmem.mem[a >> 3][8*(a % 8) +: 8];
  endfunction

  // receive side
  logic [7:0] rx [$];
  logic [7:0] frames [$][$];
  always @(posedge clk) tx_ready <= ($urandom % 4) != 0;
  always @(posedge clk) if (tx_valid && tx_ready) begin
    rx.push_back(tx_data);
    if (tx_last) begin frames.push_back(rx); rx = {}; end
  end

  // expected frames
  logic [7:0] exp_f [$][$];
  typedef struct { int addr; int len; } frag_t;

  task automatic send_frame(input frag_t fr [], input bit csum, input int cs, input int ci);
    logic [7:0] f [$];
    logic [16:0] s;
    logic [15:0] sum;
    tx_desc_t d;
    foreach (fr[i]) for (int k = 0; k < fr[i].len; k++) f.push_back(mbyte(fr[i].addr + k));
    if (csum) begin
      sum = 0;
      for (int k = cs; k < f.size(); k++) begin
        s = {1'b0, sum} + (((k - cs) % 2 == 0) ? {1'b0, f[k], 8'h00} : {9'h000, f[k]});
        sum = s[15:0] + 16'(s[16]);
      end
      f[ci] = ~sum[15:8];
      f[ci + 1] = ~sum[7:0];
    end
    exp_f.push_back(f);
    foreach (fr[i]) begin
      d = '0;
      d.addr = fr[i].addr; d.len = 11'(fr[i].len); d.eop = (i == fr.size() - 1);
      d.csum_en = csum; d.csum_start = 8'(cs); d.csum_ins = 8'(ci);
      plb_wr(32'h2000_1000, d);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] r;
  initial begin
    for (int i = 0; i < 4096; i++) nicmem.mem[i] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frame 1: Ethernet header, IP+TCP headers, payload, from three places
    send_frame('{'{addr: 100, len: 14}, '{addr: 2003, len: 40}, '{addr: 5001, len: 300}}, 1'b1, 34, 50);
    // frame 2: one aligned fragment, no checksum
    send_frame('{'{addr: 8192, len: 64}}, 1'b0, 0, 0);
    // frame 3: odd checksum start and odd length, a zero-length fragment
    send_frame('{'{addr: 777, len: 21}, '{addr: 1200, len: 0}, '{addr: 9001, len: 1001}}, 1'b1, 35, 41);
    // frame 4: maximum-size frame, one fragment
    send_frame('{'{addr: 12000, len: 1514}}, 1'b1, 34, 50);
    wait (frames.size() == 4);
    foreach (exp_f[i]) begin
      check(frames[i].size() == exp_f[i].size(), $sformatf("frame %0d length %0d vs %0d", i, frames[i].size(), exp_f[i].size()));
      if (frames[i].size() == exp_f[i].size()) begin
        automatic int bad = 0;
        foreach (exp_f[i][k]) if (frames[i][k] !== exp_f[i][k]) bad++;
        check(bad == 0, $sformatf("frame %0d has %0d wrong bytes", i, bad));
        check(frames[i][50] === exp_f[i][50] && frames[i][51] === exp_f[i][51], $sformatf("frame %0d checksum", i));
      end
    end
    plb_rd(32'h2000_1008, r);
    check(r[63:32] == 4, $sformatf("frames sent %0d", r[63:32]));
    check(r[15:0] == 0, "queue drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
