// tb_scratchpad: random traffic on both ports against a reference
// array: byte-enabled writes on port A, whole-word writes on port B,
// reads on both with one-cycle latency, and B winning a same-word
// collision.
module tb_scratchpad;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [7:0] a_addr = '0, b_addr = '0, a_be = '0;
  logic [63:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  scratchpad dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_be, .a_rdata,
                  .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  logic [63:0] refm [256];
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through port B
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 8'(i); b_wdata = {$urandom, $urandom}; refm[i] = b_wdata;
    end
    @(negedge clk); b_en = 0; b_we = 0;
    for (int k = 0; k < 2000; k++) begin
      logic [63:0] ea, eb;
      bit ra, rb;
      @(negedge clk);
      a_en = 1; a_we = ($urandom % 2); a_addr = 8'($urandom % 16); a_be = 8'($urandom); a_wdata = {$urandom, $urandom};
      b_en = ($urandom % 2); b_we = ($urandom % 2); b_addr = 8'($urandom % 16); b_wdata = {$urandom, $urandom};
      ra = !a_we; rb = b_en && !b_we;
      ea = refm[a_addr]; eb = refm[b_addr];
      if (a_we) for (int b = 0; b < 8; b++)
        if (a_be[b] && !(b_en && b_we && b_addr == a_addr)) refm[a_addr][8*b +: 8] = a_wdata[8*b +: 8];
      if (b_en && b_we) refm[b_addr] = b_wdata;
      @(negedge clk);
      a_en = 0; b_en = 0;
      if (ra) begin checks++; if (a_rdata !== ea) begin failures++; $display("A read %0d", k); end end
      if (rb) begin checks++; if (b_rdata !== eb) begin failures++; $display("B read %0d", k); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
