// pci_host_model: behavioural model of the PCI core's master side and of
// host main memory, for testbenches. A command is accepted after a few
// cycles; a read returns len/8 words from host memory with random gaps;
// a write takes len/8 words with random wr_ready and then pulses done.
// host is a public associative array indexed by 8-byte word address.
// bursts counts commands; max_len keeps the longest burst seen.
module pci_host_model (
  input  logic        clk,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_we,
  input  logic [63:0] cmd_addr,
  input  logic [11:0] cmd_len,
  output logic        rd_valid,
  output logic [63:0] rd_data,
  output logic        wr_ready,
  input  logic [63:0] wr_data,
  output logic        done
);
  logic [63:0] host [longint];
  int bursts = 0, rd_bursts = 0, wr_bursts = 0, max_len = 0;

  function automatic logic [63:0] rd_word(input longint a);
    return host.exists(a) ? host[a] : 64'd0;
  endfunction

  initial begin
    cmd_ready = 0; rd_valid = 0; rd_data = '0; wr_ready = 0; done = 0;
    forever begin
      @(negedge clk);
      if (cmd_valid) begin
        longint a;
        int n;
        logic we;
        a = longint'(cmd_addr >> 3); n = int'(cmd_len) / 8; we = cmd_we;
        repeat ($urandom % 4) @(negedge clk);
        cmd_ready = 1;
        @(negedge clk);
        cmd_ready = 0;
        bursts++;
        if (int'(cmd_len) > max_len) max_len = int'(cmd_len);
        if (!we) begin
          rd_bursts++;
          for (int w = 0; w < n; w++) begin
            while ($urandom % 4 == 0) begin rd_valid = 0; @(negedge clk); end
            rd_valid = 1; rd_data = rd_word(a + w);
            @(negedge clk);
          end
          rd_valid = 0;
        end else begin
          int w;
          wr_bursts++;
          w = 0;
          while (w < n) begin
            wr_ready = ($urandom % 4) != 0;
            if (wr_ready) begin host[a + w] = wr_data; w++; end
            @(negedge clk);
          end
          wr_ready = 0;
          repeat (2) @(negedge clk);
          done = 1;
          @(negedge clk);
          done = 0;
        end
      end
    end
  end
endmodule
