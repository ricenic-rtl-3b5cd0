// tb_sram_ctrl: host and NIC ports hammer the SRAM at once with random
// reads and writes to disjoint word sets, checked against a reference.
// Host writes inside the 512 KB context region must raise an event
// with context number address/4096 (checked against the address); host
// writes above it and NIC writes must raise none. Checks the
// three-cycle access latency and that the event back-pressure holds the
// host's acknowledge.
module tb_sram_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_req = 0, h_we = 0, h_ack, n_req = 0, n_we = 0, n_ack;
  logic [20:0] h_addr = '0, n_addr = '0;
  logic [63:0] h_wdata = '0, n_wdata = '0, h_rdata, n_rdata;
  logic [7:0] h_be = '1, n_be = '1;
  logic evt_valid, evt_ready = 0;
  logic [6:0] evt_ctx;
  logic sram_ce, sram_we;
  logic [17:0] sram_addr;
  logic [63:0] sram_wdata, sram_rdata;
  logic [7:0] sram_be;
  int checks = 0, failures = 0;

  sram_ctrl dut (.clk, .rst_n, .h_req, .h_we, .h_addr, .h_wdata, .h_be, .h_ack, .h_rdata,
    .n_req, .n_we, .n_addr, .n_wdata, .n_be, .n_ack, .n_rdata, .evt_valid, .evt_ctx, .evt_ready,
    .sram_ce, .sram_we, .sram_addr, .sram_wdata, .sram_be, .sram_rdata);
  sram_model #(.WORDS(262144)) chip (.clk, .ce(sram_ce), .we(sram_we), .addr(sram_addr),
    .wdata(sram_wdata), .be(sram_be), .rdata(sram_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // event sink with random back-pressure
  int events [$];
  always @(negedge clk) evt_ready = ($urandom % 3) == 0;
  always @(posedge clk) if (evt_valid && evt_ready) events.push_back(int'(evt_ctx));

  logic [63:0] refm [logic [17:0]];
  int exp_events [$];
  int lat_bad = 0;

  task automatic host(input logic we, input logic [20:0] a, input logic [63:0] d, output logic [63:0] q);
    int n;
    @(negedge clk);
    h_req = 1; h_we = we; h_addr = a; h_wdata = d;
    n = 0;
    do begin @(negedge clk); n++; end while (!h_ack);
    q = h_rdata; h_req = 0;
    if (!we && n < 3) lat_bad++;
  endtask
  task automatic nic(input logic we, input logic [20:0] a, input logic [63:0] d, output logic [63:0] q);
    @(negedge clk);
    n_req = 1; n_we = we; n_addr = a; n_wdata = d;
    do @(negedge clk); while (!n_ack);
    q = n_rdata; n_req = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin : host_side
        logic [63:0] q;
        logic [20:0] a;
        for (int k = 0; k < 300; k++) begin
          // even word indices belong to the host
          a = 21'(($urandom % 4096) * 2 * 8 * (($urandom % 2) ? 1 : 64));
          if ($urandom % 2) begin
            refm[a[20:3]] = {$urandom, $urandom};
            host(1'b1, a, refm[a[20:3]], q);
            if (a < 21'h80000) exp_events.push_back(int'(a[18:12]));
          end else if (refm.exists(a[20:3])) begin
            host(1'b0, a, '0, q);
            check(q === refm[a[20:3]], $sformatf("host read %h", a));
          end
        end
      end
      begin : nic_side
        logic [63:0] q;
        logic [20:0] a;
        for (int k = 0; k < 300; k++) begin
          a = 21'((($urandom % 4096) * 2 + 1) * 8);
          if ($urandom % 2) begin
            refm[a[20:3]] = {$urandom, $urandom};
            nic(1'b1, a, refm[a[20:3]], q);
          end else if (refm.exists(a[20:3])) begin
            nic(1'b0, a, '0, q);
            check(q === refm[a[20:3]], $sformatf("nic read %h", a));
          end
        end
      end
    join
    repeat (10) @(posedge clk);
    check(events.size() == exp_events.size(), $sformatf("%0d events, expected %0d", events.size(), exp_events.size()));
    if (events.size() == exp_events.size())
      foreach (events[i]) check(events[i] == exp_events[i], $sformatf("event %0d context %0d vs %0d", i, events[i], exp_events[i]));
    check(lat_bad == 0, "read latency at least three cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
