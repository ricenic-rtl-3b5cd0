// tb_plb_ram: random byte-enabled writes and reads against a reference
// array; checks data and the one-cycle acknowledge latency.
module tb_plb_ram;
  import ricenic_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  plb_req_t preq = '0;
  plb_rsp_t prsp;
  int checks = 0, failures = 0;
  `include "tb/plb_bfm_tasks.svh"

  plb_ram #(.BYTES(32768)) dut (.clk, .rst_n, .req(preq), .rsp(prsp));

  logic [63:0] ref_mem [4096];
  logic [63:0] d, w;
  logic [7:0] be;
  int idx;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4096; i += 1) begin
      ref_mem[i] = {$urandom, $urandom};
    end
    for (int i = 0; i < 4096; i += 7) plb_wr(32'h1000_0000 + i*8, ref_mem[i]);
    for (int k = 0; k < 600; k++) begin
      idx = ($urandom % 585) * 7;
      if ($urandom % 2) begin
        w = {$urandom, $urandom}; be = 8'($urandom);
        plb_wr(32'h1000_0000 + idx*8, w, be);
        for (int b = 0; b < 8; b++) if (be[b]) ref_mem[idx][8*b +: 8] = w[8*b +: 8];
      end else begin
        plb_rd(32'h1000_0000 + idx*8, d);
        checks++;
        if (d !== ref_mem[idx]) begin failures++; $display("mismatch at %0d: %h vs %h", idx, d, ref_mem[idx]); end
        checks++;
        if (plb_lat != 1) begin failures++; $display("latency %0d", plb_lat); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
