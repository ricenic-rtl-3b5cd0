// mac_rx: receive half of the descriptor-driven Gigabit MAC unit.
//
// Firmware places receive buffers anywhere in NIC memory by writing
// 64-bit buffer descriptors (rx_desc_t) into a FIFO queue; buffers are
// consumed in queue order, so no circular receive ring is imposed. A
// frame arriving from the low-level MAC core (one byte per valid cycle,
// last on the final byte, err with last if the core saw a bad frame) is
// stored in one half of a two-frame buffer while the 16-bit
// ones-complement sum from byte csum_start (register, default 34:
// Ethernet plus a 20-byte IPv4 header) to the end of the frame is
// accumulated. At the end of the frame the head buffer descriptor is
// taken and the half is handed to the copy engine, which writes the
// frame into that buffer with 64-bit PLB writes (partial byte enables on
// the last word) and queues a completion (rx_cmpl_t: buffer, length,
// error, checksum). Meanwhile the next frame is received into the other
// half. Firmware adds the pseudo-header to verify the TCP/UDP checksum.
//
// A word costs about three cycles on an idle bus, so copying (about 2.7
// bytes per cycle) keeps up with the byte stream and back-to-back frames
// are all kept. A frame is dropped and counted when no buffer is posted
// at its end, or when it starts while both halves are still occupied.
// When the head buffer is too small for the frame (or the frame is
// longer than BUF_BYTES), the frame is dropped and the buffer is handed
// back as a completion with length 0 and the error flag set.
//
// Registers: 0x00 write pushes a buffer descriptor; 0x08 read pops a
// completion (valid bit 63 clear when the queue is empty); 0x10 read
// gives {frames dropped[31:0], frames received[31:0]}; 0x18 read/write
// csum_start. Acknowledge one cycle after the request.
//
// Descriptor queues and arbitrary buffer placement follow the document;
// the formats, registers, the two-frame buffer and the drop policy are
// this design's own.
module mac_rx
  import ricenic_pkg::*;
#(
  parameter int QDEPTH     = 32,
  parameter int BUF_BYTES  = 2048,
  parameter int CSUM_START = 34
) (
  input  logic       clk,
  input  logic       rst_n,
  input  plb_req_t   s_req,
  output plb_rsp_t   s_rsp,
  output plb_req_t   m_req,
  input  plb_rsp_t   m_rsp,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  input  logic       rx_last,
  input  logic       rx_err
);
  localparam int BW = $clog2(BUF_BYTES);

  // ---------------- registers and queues
  logic s_ack, s_acc;
  logic [63:0] s_rdata;
  logic [1:0] rsel;
  assign s_acc = s_req.valid && !s_ack;
  assign rsel  = s_req.addr[4:3];

  logic d_push, d_pop, d_full, d_empty;
  logic [63:0] d_head;
  logic [$clog2(QDEPTH+1)-1:0] d_cnt;
  assign d_push = s_acc && s_req.we && rsel == 2'd0;
  sync_fifo #(.WIDTH(64), .DEPTH(QDEPTH)) u_dq (
    .clk, .rst_n, .push(d_push), .wdata(s_req.wdata), .pop(d_pop),
    .rdata(d_head), .full(d_full), .empty(d_empty), .count(d_cnt));

  logic c_push, c_pop, c_full, c_empty;
  logic [63:0] c_head, c_wdata;
  logic [$clog2(QDEPTH+1)-1:0] c_cnt;
  assign c_pop = s_acc && !s_req.we && rsel == 2'd1;
  sync_fifo #(.WIDTH(64), .DEPTH(QDEPTH)) u_cq (
    .clk, .rst_n, .push(c_push), .wdata(c_wdata), .pop(c_pop),
    .rdata(c_head), .full(c_full), .empty(c_empty), .count(c_cnt));

  logic [31:0] n_recv, n_drop;
  logic [7:0]  csum_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_ack <= 1'b0; s_rdata <= '0; csum_start <= 8'(CSUM_START);
    end else begin
      s_ack <= s_acc;
      if (s_acc) begin
        if (s_req.we && rsel == 2'd3) csum_start <= s_req.wdata[7:0];
        unique case (rsel)
          2'd0: s_rdata <= {48'd0, 16'(d_cnt)};
          2'd1: s_rdata <= c_empty ? 64'd0 : c_head;
          2'd2: s_rdata <= {n_drop, n_recv};
          2'd3: s_rdata <= {56'd0, csum_start};
        endcase
      end
    end
  end
  assign s_rsp.ack = s_ack;
  assign s_rsp.rdata = s_rdata;

  // ---------------- frame buffer: two halves of BUF_BYTES
  logic [63:0] fbuf [2*BUF_BYTES/8];

  // receive side
  logic         rb;         // half being received into
  logic         r_drop;     // the frame being received is discarded
  logic         in_frame;   // a frame is arriving
  logic [BW:0]  wptr;       // bytes of the frame stored
  logic [15:0]  rsum;
  logic [1:0]   full;       // half holds a frame for the copy engine
  rx_desc_t     desc;
  assign desc = rx_desc_t'(d_head);

  // per-half frame record
  logic [BW:0]  flen [2];
  logic         ferr [2];
  logic [31:0]  base [2];
  logic [15:0]  fsum [2];

  logic         r_start, r_take;   // first byte of a frame; byte stored
  assign r_start = rx_valid && !in_frame;
  assign r_take  = rx_valid && (r_start ? !full[rb] : !r_drop);

  always_ff @(posedge clk) begin
    if (r_take && wptr < (BW+1)'(BUF_BYTES))
      fbuf[{rb, wptr[BW-1:3]}][8*wptr[2:0] +: 8] <= rx_data;
  end

  logic [BW:0] nlen;
  assign nlen = wptr + 1'b1;
  logic [15:0] sum_in;       // running sum including this byte
  assign sum_in = (wptr >= (BW+1)'(csum_start))
                  ? csum_add(rsum, (wptr[0] ^ csum_start[0]) ? {8'h00, rx_data} : {rx_data, 8'h00})
                  : rsum;
  logic fits;
  logic too_small;   // a buffer is posted but the frame does not fit in it
  assign fits      = !d_empty && ({1'b0, desc.len} >= 12'(nlen)) && (nlen <= (BW+1)'(BUF_BYTES));
  assign too_small = !d_empty && !fits;
  logic r_end;       // last byte of a kept frame
  assign r_end = r_take && rx_last;
  assign d_pop = r_end && !d_empty;

  // copy side
  logic          cb;        // half being copied out
  logic [BW-3:0] cptr;      // word being copied
  logic          c_cmpl;    // words done, completion pending
  rx_cmpl_t cmpl;
  always_comb begin
    cmpl = '0;
    cmpl.valid = 1'b1;
    cmpl.csum  = fsum[cb];
    cmpl.err   = ferr[cb];
    cmpl.len   = 11'(flen[cb]);
    cmpl.addr  = base[cb];
  end
  assign c_push  = full[cb] && c_cmpl && !c_full;
  assign c_wdata = cmpl;

  logic [BW:0] wbytes;   // frame bytes left from this word on
  assign wbytes = flen[cb] - (BW+1)'({cptr, 3'b000});
  always_comb begin
    m_req = PLB_REQ_IDLE;
    m_req.addr  = base[cb] + 32'({cptr, 3'b000});
    m_req.wdata = fbuf[{cb, cptr[BW-4:0]}];
    m_req.we    = 1'b1;
    m_req.valid = full[cb] && !c_cmpl;
    for (int b = 0; b < 8; b++) m_req.be[b] = (wbytes > (BW+1)'(b));
  end

  logic set_full;
  assign set_full = r_end && !d_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb <= 1'b0; r_drop <= 1'b0; in_frame <= 1'b0; wptr <= '0; rsum <= '0; full <= '0;
      cb <= 1'b0; cptr <= '0; c_cmpl <= 1'b0; n_recv <= '0; n_drop <= '0;
      for (int i = 0; i < 2; i++) begin
        flen[i] <= '0; ferr[i] <= 1'b0; base[i] <= '0; fsum[i] <= '0;
      end
    end else begin
      // receive
      if (rx_valid) begin
        in_frame <= !rx_last;
        if (r_start) r_drop <= full[rb];
        if (r_take) begin
          wptr <= nlen;
          rsum <= sum_in;
        end
        if (rx_last) begin
          wptr <= '0;
          rsum <= '0;
          if (!r_take || !fits) n_drop <= n_drop + 1'b1;
          if (set_full) begin
            flen[rb] <= fits ? nlen : '0;
            ferr[rb] <= fits ? rx_err : 1'b1;
            base[rb] <= {desc.addr[31:3], 3'b000};
            fsum[rb] <= sum_in;
            rb       <= ~rb;
          end
        end
      end
      // copy out
      if (full[cb] && !c_cmpl && (flen[cb] == 0 || m_rsp.ack)) begin
        cptr <= cptr + 1'b1;
        if (flen[cb] == 0 || (BW+1)'({cptr, 3'b000}) + (BW+1)'(8) >= flen[cb]) c_cmpl <= 1'b1;
      end
      if (c_push) begin
        if (flen[cb] != 0) n_recv <= n_recv + 1'b1;
        cptr   <= '0;
        c_cmpl <= 1'b0;
        cb     <= ~cb;
      end
      for (int i = 0; i < 2; i++) begin
        if (set_full && rb == 1'(i)) full[i] <= 1'b1;
        else if (c_push && cb == 1'(i)) full[i] <= 1'b0;
      end
    end
  end
endmodule
