// dma_frontend: Virtex half of the descriptor-driven DMA assist unit,
// which moves data between NIC memory (on the PLB) and host main memory
// (across the inter-FPGA bridge and the PCI bus).
//
// Firmware first writes the 64-bit host address (register 0x00), then a
// command word (register 0x08: nic address [31:0], length in bytes
// [47:32], direction [48], 1 = NIC to host); the command write queues
// the descriptor. Each descriptor is cut into bursts of at most BURST
// bytes (2 KB, the size of the back-end data buffer). For a host-to-NIC
// burst a BR_DMA_RD request is sent over the bridge and the data words
// that come back pass through a four-word FIFO and are written to NIC
// memory one PLB write each, so the link and the bus work in parallel. For a
// NIC-to-host burst a BR_DMA_WR request is sent, followed by the words
// read from NIC memory as BR_DMA_DATA flits, and the unit waits for the
// back end's completion flit. Register 0x10 reads
// {queue count[15:0], 16'0, descriptors completed[31:0]}.
// Addresses and lengths are multiples of 8 bytes. Descriptors of
// several bursts give scatter/gather by queueing one descriptor per
// region.
//
// The 2 KB burst size, descriptor control and split into a front and a
// back end follow the document; the register layout, bridge protocol and
// one-burst-at-a-time operation are this design's own.
module dma_frontend
  import ricenic_pkg::*;
#(
  parameter int QDEPTH = 16,
  parameter int BURST  = 2048
) (
  input  logic     clk,
  input  logic     rst_n,
  input  plb_req_t s_req,
  output plb_rsp_t s_rsp,
  output plb_req_t m_req,
  input  plb_rsp_t m_rsp,
  // flits to / from the back end through the bridge
  output br_flit_t out_flit,
  output logic     out_valid,
  input  logic     out_ready,
  input  br_flit_t in_flit,
  input  logic     in_valid,
  output logic     in_ready
);
  // ---------------- registers and descriptor queue
  logic s_ack, s_acc;
  logic [63:0] s_rdata, host_stage;
  logic [1:0] rsel;
  assign s_acc = s_req.valid && !s_ack;
  assign rsel  = s_req.addr[4:3];

  localparam int DW = 64 + 49;
  logic q_push, q_pop, q_full, q_empty;
  logic [DW-1:0] q_head;
  logic [$clog2(QDEPTH+1)-1:0] q_cnt;
  logic [31:0] n_done;
  assign q_push = s_acc && s_req.we && rsel == 2'd1;
  sync_fifo #(.WIDTH(DW), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .push(q_push), .wdata({host_stage, s_req.wdata[48:0]}), .pop(q_pop),
    .rdata(q_head), .full(q_full), .empty(q_empty), .count(q_cnt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_ack <= 1'b0; s_rdata <= '0; host_stage <= '0;
    end else begin
      s_ack <= s_acc;
      if (s_acc) begin
        if (s_req.we && rsel == 2'd0) host_stage <= s_req.wdata;
        s_rdata <= (rsel == 2'd2) ? {16'(q_cnt), 16'd0, n_done} :
                   (rsel == 2'd0) ? host_stage : 64'd0;
      end
    end
  end
  assign s_rsp.ack = s_ack;
  assign s_rsp.rdata = s_rdata;

  // ---------------- burst engine
  typedef enum logic [2:0] {D_IDLE, D_REQ, D_RDWR, D_WRRD, D_WRSEND, D_WRDONE, D_NEXT} state_e;
  state_e st;
  logic [63:0] host;
  logic [31:0] nic;
  logic [16:0] remain;     // bytes left in the descriptor
  logic        dir;        // 1: NIC to host
  logic [11:0] blen;       // bytes in this burst
  logic [11:0] bcnt;       // bytes of this burst moved
  logic [63:0] word;

  assign q_pop = (st == D_IDLE) && !q_empty;

  // host -> NIC data words wait here, so taking words off the link
  // overlaps with writing earlier ones to NIC memory
  logic f_push, f_pop, f_full, f_empty;
  logic [63:0] f_head;
  logic [2:0]  f_cnt;
  assign f_push = (st == D_RDWR) && in_valid && in_flit.kind == BR_DMA_RD && !f_full;
  assign f_pop  = (st == D_RDWR) && m_rsp.ack;
  sync_fifo #(.WIDTH(64), .DEPTH(4)) u_in (
    .clk, .rst_n, .push(f_push), .wdata(in_flit.data), .pop(f_pop),
    .rdata(f_head), .full(f_full), .empty(f_empty), .count(f_cnt));

  always_comb begin
    out_flit  = '0;
    out_valid = 1'b0;
    out_flit.addr = host;
    out_flit.len  = blen;
    out_flit.be   = '1;
    if (st == D_REQ) begin
      out_valid     = 1'b1;
      out_flit.kind = dir ? BR_DMA_WR : BR_DMA_RD;
    end else if (st == D_WRSEND) begin
      out_valid     = 1'b1;
      out_flit.kind = BR_DMA_DATA;
      out_flit.data = word;
      out_flit.last = (bcnt + 12'd8 == blen);
    end
  end

  assign in_ready = ((st == D_RDWR) && !f_full) || (st == D_WRDONE);

  always_comb begin
    m_req = PLB_REQ_IDLE;
    m_req.addr  = nic + 32'(bcnt);
    m_req.be    = '1;
    m_req.wdata = (st == D_RDWR) ? f_head : word;
    if (st == D_RDWR)  begin m_req.valid = !f_empty; m_req.we = 1'b1; end
    if (st == D_WRRD)  begin m_req.valid = 1'b1; m_req.we = 1'b0; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; host <= '0; nic <= '0; remain <= '0; dir <= 1'b0;
      blen <= '0; bcnt <= '0; word <= '0; n_done <= '0;
    end else begin
      unique case (st)
        D_IDLE: if (!q_empty) begin
          host   <= q_head[DW-1:49];
          nic    <= q_head[31:0];
          remain <= {1'b0, q_head[47:32]};
          dir    <= q_head[48];
          st     <= D_NEXT;
        end
        D_NEXT: begin
          if (remain == 0) begin
            n_done <= n_done + 1'b1;
            st     <= D_IDLE;
          end else begin
            blen <= (remain > 17'(BURST)) ? 12'(BURST) : 12'(remain);
            bcnt <= '0;
            st   <= D_REQ;
          end
        end
        D_REQ: if (out_ready) st <= dir ? D_WRRD : D_RDWR;
        // host -> NIC: data words come back, each written to NIC memory
        D_RDWR: if (m_rsp.ack) begin
          bcnt <= bcnt + 12'd8;
          if (bcnt + 12'd8 == blen) st <= D_NEXT;
          if (bcnt + 12'd8 == blen) begin
            host   <= host + 64'(blen);
            nic    <= nic + 32'(blen);
            remain <= remain - 17'(blen);
          end
        end
        // NIC -> host: read a word, send it, then wait for completion
        D_WRRD: if (m_rsp.ack) begin
          word <= m_rsp.rdata;
          st   <= D_WRSEND;
        end
        D_WRSEND: if (out_ready) begin
          bcnt <= bcnt + 12'd8;
          st   <= (bcnt + 12'd8 == blen) ? D_WRDONE : D_WRRD;
        end
        D_WRDONE: if (in_valid && in_flit.kind == BR_DMA_WR) begin
          host   <= host + 64'(blen);
          nic    <= nic + 32'(blen);
          remain <= remain - 17'(blen);
          st     <= D_NEXT;
        end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
