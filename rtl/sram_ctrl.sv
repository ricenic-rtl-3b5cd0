// sram_ctrl: controller of the 2 MB SRAM on the Spartan FPGA, shared by
// the host (programmed I/O through the PCI target) and the NIC (through
// the bridge), with the context partition used for direct guest access
// by virtual machines.
//
// Two request ports (host and NIC) are served one access at a time,
// alternating when both wait. An access drives the SRAM chip for one
// cycle (synchronous SRAM, read data one cycle later) and is acknowledged
// on the cycle after that, so every access takes three cycles from
// request to acknowledge. The SRAM is assumed 64 bits wide with byte
// writes (2 MB = 256 K words).
//
// The low NCTX*CTX_BYTES bytes (128 contexts of 4 KB = 512 KB) form the
// context region. A host write that lands in it raises an event carrying
// the context number (address bits [18:12]) toward the hardware event
// unit; the host's acknowledge waits until the event is accepted, so no
// update is ever missed.
//
// The SRAM size, the sharing between host and NIC and the 128 x 4 KB
// contexts with update notification follow the document; the port
// widths, timing and arbitration are this design's own.
module sram_ctrl #(
  parameter int SRAM_BYTES = 2097152,
  parameter int NCTX       = 128,
  parameter int CTX_BYTES  = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // host PIO port (from the PCI target)
  input  logic        h_req,
  input  logic        h_we,
  input  logic [$clog2(SRAM_BYTES)-1:0] h_addr,
  input  logic [63:0] h_wdata,
  input  logic [7:0]  h_be,
  output logic        h_ack,
  output logic [63:0] h_rdata,
  // NIC port (from the bridge)
  input  logic        n_req,
  input  logic        n_we,
  input  logic [$clog2(SRAM_BYTES)-1:0] n_addr,
  input  logic [63:0] n_wdata,
  input  logic [7:0]  n_be,
  output logic        n_ack,
  output logic [63:0] n_rdata,
  // context update events
  output logic        evt_valid,
  output logic [$clog2(NCTX)-1:0] evt_ctx,
  input  logic        evt_ready,
  // SRAM chip
  output logic        sram_ce,
  output logic        sram_we,
  output logic [$clog2(SRAM_BYTES)-4:0] sram_addr,
  output logic [63:0] sram_wdata,
  output logic [7:0]  sram_be,
  input  logic [63:0] sram_rdata
);
  localparam int AW = $clog2(SRAM_BYTES);
  localparam int CW = $clog2(NCTX);
  localparam int OW = $clog2(CTX_BYTES);

  typedef enum logic [1:0] {C_IDLE, C_ACCESS, C_DATA, C_EVENT} state_e;
  state_e st;
  logic          who;        // 1: host owns the current access
  logic          last_host;  // host was served last
  logic          we_q;
  logic [AW-1:0] addr_q;
  logic [63:0]   wdata_q, rdata_q;
  logic [7:0]    be_q;
  logic          done;

  logic in_ctx;
  assign in_ctx = (addr_q < AW'(NCTX * CTX_BYTES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; who <= 1'b0; last_host <= 1'b0; we_q <= 1'b0;
      addr_q <= '0; wdata_q <= '0; be_q <= '0; rdata_q <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (!done && (h_req || n_req)) begin
          // alternate when both are waiting
          if (h_req && (!n_req || !last_host)) begin
            who <= 1'b1; we_q <= h_we; addr_q <= h_addr; wdata_q <= h_wdata; be_q <= h_be;
          end else begin
            who <= 1'b0; we_q <= n_we; addr_q <= n_addr; wdata_q <= n_wdata; be_q <= n_be;
          end
          st <= C_ACCESS;
        end
        C_ACCESS: st <= C_DATA;
        C_DATA: begin
          rdata_q   <= sram_rdata;
          last_host <= who;
          if (who && we_q && in_ctx) st <= C_EVENT;
          else begin st <= C_IDLE; done <= 1'b1; end
        end
        C_EVENT: if (evt_ready) begin st <= C_IDLE; done <= 1'b1; end
        default: st <= C_IDLE;
      endcase
    end
  end

  assign sram_ce    = (st == C_ACCESS);
  assign sram_we    = (st == C_ACCESS) && we_q;
  assign sram_addr  = addr_q[AW-1:3];
  assign sram_wdata = wdata_q;
  assign sram_be    = be_q;

  assign evt_valid  = (st == C_EVENT);
  assign evt_ctx    = addr_q[OW +: CW];

  assign h_ack   = done && who;
  assign n_ack   = done && !who;
  assign h_rdata = rdata_q;
  assign n_rdata = rdata_q;
endmodule
