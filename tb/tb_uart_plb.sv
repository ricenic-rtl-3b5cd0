// tb_uart_plb: sends bytes through the transmit register and decodes
// the serial line independently (8N1 at DIV cycles per bit, bit time
// measured); drives serial bytes into rxd and reads them back through
// the receive register; checks status bits and the divisor register.
module tb_uart_plb;
  import ricenic_pkg::*;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  plb_req_t preq = '0;
  plb_rsp_t prsp;
  logic txd, rxd = 1'b1;
  int checks = 0, failures = 0;
  `include "tb/plb_bfm_tasks.svh"

  uart_plb #(.DIV(DIV)) dut (.clk, .rst_n, .req(preq), .rsp(prsp), .txd, .rxd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // independent serial decoder
  logic [7:0] got [$];
  // each bit is sampled a quarter and three quarters into its DIV-cycle
  // slot; both samples must agree, which also checks the bit time
  int bad_timing = 0;
  initial begin
    forever begin
      logic [9:0] f;
      @(negedge txd);
      for (int i = 0; i < 10; i++) begin
        logic s1, s2;
        repeat (DIV/4) @(posedge clk);
        s1 = txd;
        repeat (DIV/2) @(posedge clk);
        s2 = txd;
        repeat (DIV/4) @(posedge clk);
        if (s1 !== s2) bad_timing++;
        f[i] = s1;
      end
      if (f[0] !== 1'b0 || f[9] !== 1'b1) bad_timing++;
      got.push_back(f[8:1]);
    end
  end

  task automatic send_serial(input logic [7:0] b);
    rxd = 1'b0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (DIV) @(posedge clk); end
    rxd = 1'b1; repeat (DIV) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] msg [6] = '{8'h52, 8'h69, 8'h63, 8'h65, 8'h0D, 8'hA5};
  logic [63:0] d;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    plb_wr(32'h2000_0018, DIV);
    plb_rd(32'h2000_0018, d);
    check(d[15:0] == DIV, "divisor register");
    plb_rd(32'h2000_0010, d);
    check(d[3:0] == 4'b1000, "status idle");
    foreach (msg[i]) plb_wr(32'h2000_0000, {56'd0, msg[i]});
    wait (got.size() == 6);
    foreach (msg[i]) check(got[i] == msg[i], $sformatf("tx byte %0d %h vs %h", i, got[i], msg[i]));
    check(bad_timing == 0, "bit timing and framing");
    plb_rd(32'h2000_0008, d);
    check(d[8] == 1'b0, "rx empty");
    for (int i = 0; i < 5; i++) send_serial(8'h30 + 8'(i * 37));
    plb_rd(32'h2000_0010, d);
    check(d[1] == 1'b1, "rx available");
    for (int i = 0; i < 5; i++) begin
      plb_rd(32'h2000_0008, d);
      check(d[8:0] == {1'b1, 8'h30 + 8'(i * 37)}, $sformatf("rx byte %0d: %h", i, d[8:0]));
    end
    plb_rd(32'h2000_0010, d);
    check(d[1] == 1'b0, "rx drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
