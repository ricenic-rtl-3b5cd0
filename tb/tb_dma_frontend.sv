// tb_dma_frontend: the front end is driven through its registers; a
// model of the back end and host memory answers on the flit channel
// with random delays. A 5000-byte host-to-NIC descriptor and a
// 4096-byte NIC-to-host descriptor must arrive intact, split into bursts
// of at most 2048 bytes (2048, 2048, 904 and 2048, 2048), with consecutive
// host addresses; the completion counter must count both.
module tb_dma_frontend;
  import ricenic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  plb_req_t preq = '0;
  plb_rsp_t prsp;
  plb_req_t m_req;
  plb_rsp_t m_rsp;
  br_flit_t out_flit, in_flit;
  logic out_valid, out_ready, in_valid, in_ready;
  int checks = 0, failures = 0;
  `include "tb/plb_bfm_tasks.svh"

  dma_frontend dut (.clk, .rst_n, .s_req(preq), .s_rsp(prsp), .m_req, .m_rsp,
                    .out_flit, .out_valid, .out_ready, .in_flit, .in_valid, .in_ready);
  plb_mem_model #(.WORDS(4096), .MAXLAT(3)) nicmem (.clk, .req(m_req), .rsp(m_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // back-end and host memory model
  logic [63:0] host [int];
  int burst_len [$];
  logic [63:0] burst_addr [$];
  initial begin
    out_ready = 0; in_valid = 0; in_flit = '0;
    forever begin
      br_flit_t f;
      @(negedge clk);
      out_ready = ($urandom % 3) != 0;
      if (out_valid && out_ready) begin
        f = out_flit;
        burst_len.push_back(int'(f.len));
        burst_addr.push_back(f.addr);
        if (f.kind == BR_DMA_RD) begin
          for (int w = 0; w < f.len / 8; w++) begin
            @(negedge clk);
            out_ready = 0;
            repeat ($urandom % 3) @(negedge clk);
            in_flit = '0; in_flit.kind = BR_DMA_RD; in_flit.data = host[int'(f.addr) / 8 + w];
            in_flit.last = (w == f.len / 8 - 1);
            in_valid = 1;
            while (!in_ready) @(negedge clk);
            @(negedge clk);
            in_valid = 0;
          end
        end else if (f.kind == BR_DMA_WR) begin
          int w;
          w = 0;
          while (w < f.len / 8) begin
            @(negedge clk);
            out_ready = ($urandom % 3) != 0;
            if (out_valid && out_ready) begin
              if (out_flit.kind != BR_DMA_DATA) $display("unexpected flit kind");
              host[int'(f.addr) / 8 + w] = out_flit.data;
              w++;
            end
          end
          @(negedge clk);
          out_ready = 0;
          repeat (5) @(negedge clk);
          in_flit = '0; in_flit.kind = BR_DMA_WR; in_flit.last = 1;
          in_valid = 1;
          while (!in_ready) @(negedge clk);
          @(negedge clk);
          in_valid = 0;
        end
      end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("timeout: state %0d, %0d bursts seen, %0d done", dut.st, burst_len.size(), dut.n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] r;
  initial begin
    for (int i = 0; i < 4096; i++) nicmem.mem[i] = {$urandom, $urandom};
    for (int i = 0; i < 625; i++) host[32'h10_0000 / 8 + i] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // host -> NIC: 5000 bytes from host 0x100000 to NIC 0x1000
    plb_wr(32'h2000_3000, 64'h10_0000);
    plb_wr(32'h2000_3008, {15'd0, 1'b0, 16'd5000, 32'h1000});
    // NIC -> host: 4096 bytes from NIC 0x4000 to host 0x20_0000
    plb_wr(32'h2000_3000, 64'h20_0000);
    plb_wr(32'h2000_3008, {15'd0, 1'b1, 16'd4096, 32'h4000});
    do begin repeat (200) @(posedge clk); plb_rd(32'h2000_3010, r); end while (r[31:0] != 2);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 625; i++) if (nicmem.mem[32'h1000 / 8 + i] !== host[32'h10_0000 / 8 + i]) bad++;
      check(bad == 0, $sformatf("host->NIC: %0d wrong words", bad));
      bad = 0;
      for (int i = 0; i < 512; i++) if (host[32'h20_0000 / 8 + i] !== nicmem.mem[32'h4000 / 8 + i]) bad++;
      check(bad == 0, $sformatf("NIC->host: %0d wrong words", bad));
    end
    check(burst_len.size() == 5, $sformatf("%0d bursts", burst_len.size()));
    if (burst_len.size() == 5) begin
      check(burst_len[0] == 2048 && burst_len[1] == 2048 && burst_len[2] == 904, "read burst sizes");
      check(burst_len[3] == 2048 && burst_len[4] == 2048, "write burst sizes");
      check(burst_addr[1] == 64'h10_0800 && burst_addr[2] == 64'h10_1000, "read burst addresses");
      check(burst_addr[4] == 64'h20_0800, "write burst address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
