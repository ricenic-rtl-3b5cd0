// mac_tx: transmit half of the descriptor-driven Gigabit MAC unit.
//
// Firmware writes 64-bit transmit descriptors (tx_desc_t) into a FIFO
// queue. Each descriptor names one fragment of a frame anywhere in NIC
// memory (any byte address, any length); fragments are gathered until a
// descriptor with eop set, so a frame can be built from discontinuous
// regions. Gathering reads 64-bit words over the PLB and stores all the
// fragment bytes of a word in one cycle: the frame buffer is split into
// eight byte lanes, each with its own write port, so bytes can land at
// any alignment. When the first descriptor of a frame has csum_en set,
// the 16-bit ones-complement sum of the frame from byte csum_start to
// its end is accumulated while gathering, and its complement is written
// big-endian at byte csum_ins. As in common checksum offload, firmware
// seeds the checksum field with the pseudo-header sum.
//
// The buffer holds two frames: while one is streamed to the low-level
// MAC core (one byte per cycle, valid/ready, last on the final byte; the
// core adds preamble and CRC), the next is gathered into the other half.
// A word costs one PLB read (three cycles on an idle bus) plus one copy
// cycle, so gathering runs at about two bytes per cycle, faster than the
// byte stream drains: frames go out back to back. Frames longer than
// BUF_BYTES are cut to BUF_BYTES.
//
// Registers: 0x00 write pushes a descriptor (dropped when the queue is
// full); 0x08 read gives {frames sent[31:0], 16'0, queue count[15:0]}.
// Register accesses are acknowledged one cycle after they are presented.
//
// Descriptors in FIFO queues, gather and checksum insertion at a
// firmware-chosen location follow the document; the descriptor layout,
// the two-frame store-and-forward buffer and the registers are this
// design's own choices.
module mac_tx
  import ricenic_pkg::*;
#(
  parameter int QDEPTH    = 32,
  parameter int BUF_BYTES = 2048
) (
  input  logic       clk,
  input  logic       rst_n,
  // register port
  input  plb_req_t   s_req,
  output plb_rsp_t   s_rsp,
  // data fetch master
  output plb_req_t   m_req,
  input  plb_rsp_t   m_rsp,
  // byte stream to the low-level MAC core
  output logic [7:0] tx_data,
  output logic       tx_valid,
  output logic       tx_last,
  input  logic       tx_ready
);
  localparam int BW = $clog2(BUF_BYTES);

  // ---------------- register port and descriptor queue
  logic s_ack;
  logic [63:0] s_rdata;
  logic s_acc;
  assign s_acc = s_req.valid && !s_ack;
  logic q_push, q_pop, q_full, q_empty;
  logic [63:0] q_head;
  logic [$clog2(QDEPTH+1)-1:0] q_cnt;
  logic [31:0] frames_sent;

  assign q_push = s_acc && s_req.we && s_req.addr[3] == 1'b0;
  sync_fifo #(.WIDTH(64), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .push(q_push), .wdata(s_req.wdata), .pop(q_pop),
    .rdata(q_head), .full(q_full), .empty(q_empty), .count(q_cnt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_ack <= 1'b0; s_rdata <= '0;
    end else begin
      s_ack <= s_acc;
      if (s_acc) s_rdata <= {frames_sent, 16'd0, 16'(q_cnt)};
    end
  end
  assign s_rsp.ack = s_ack;
  assign s_rsp.rdata = s_rdata;

  // ---------------- frame buffer: two banks of BUF_BYTES, eight byte lanes
  localparam int ROWS = 2 * BUF_BYTES / 8;
  localparam int RW   = $clog2(ROWS);
  logic          ln_we    [8];
  logic [RW-1:0] ln_waddr [8];
  logic [7:0]    ln_wdata [8];
  logic [RW-1:0] ln_raddr;
  logic [7:0]    ln_rdata [8];
  for (genvar j = 0; j < 8; j++) begin : g_lane
    logic [7:0] mem [ROWS];
    always_ff @(posedge clk) if (ln_we[j]) mem[ln_waddr[j]] <= ln_wdata[j];
    assign ln_rdata[j] = mem[ln_raddr];
  end

  // ---------------- gather / checksum
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_COPY, S_INS, S_DONE} state_e;
  state_e st;
  tx_desc_t    cur;
  logic [63:0] word;
  logic [BW:0] wptr;       // bytes gathered so far in this frame
  logic [11:0] remain;     // bytes left in this fragment
  logic        f_csum;
  logic [7:0]  f_start, f_ins;
  logic [15:0] sum;
  logic        gb;         // bank being gathered
  logic [1:0]  full;       // bank holds a complete frame
  logic [BW:0] flen [2];   // length of the frame in each bank

  tx_desc_t    hd;
  assign hd    = tx_desc_t'(q_head);
  // a new frame may only start once its bank has been sent
  assign q_pop = (st == S_IDLE) && !q_empty && !(wptr == 0 && full[gb]);

  // bytes of the fetched word taken in this copy cycle
  logic [3:0]  navail, ncopy;
  assign navail = 4'd8 - {1'b0, cur.addr[2:0]};
  assign ncopy  = (remain < 12'(navail)) ? remain[3:0] : navail;

  // checksum of the copied bytes: a plain 20-bit sum folded twice
  logic [19:0] wsum;
  logic [16:0] fold1;
  logic [15:0] sum_next;
  always_comb begin
    wsum = {4'd0, sum};
    for (int k = 0; k < 8; k++) begin
      logic [BW:0] pos;
      logic [7:0]  b;
      pos = wptr + (BW+1)'(k);
      b   = word[8*((32'(cur.addr[2:0]) + k) % 8) +: 8];
      if (4'(k) < ncopy && pos >= (BW+1)'(f_start))
        wsum = wsum + ((pos[0] ^ f_start[0]) ? {12'd0, b} : {4'd0, b, 8'h00});
    end
    fold1    = {1'b0, wsum[15:0]} + {13'd0, wsum[19:16]};
    sum_next = fold1[15:0] + {15'd0, fold1[16]};
  end

  // lane writes: gathered bytes, or the two checksum bytes
  always_comb begin
    for (int j = 0; j < 8; j++) begin
      logic [2:0]  k;
      logic [BW:0] pos;
      k   = 3'(j) - wptr[2:0];          // which copied byte lands in lane j
      pos = wptr + (BW+1)'(k);
      ln_we[j]    = (st == S_COPY) && ({1'b0, k} < ncopy) && pos < (BW+1)'(BUF_BYTES);
      ln_waddr[j] = {gb, pos[BW-1:3]};
      ln_wdata[j] = word[8*((32'(cur.addr[2:0]) + 32'(k)) % 8) +: 8];
      if (st == S_INS) begin
        ln_we[j]    = (3'(j) == f_ins[2:0]) || (3'(j) == f_ins[2:0] + 3'd1);
        pos         = (3'(j) == f_ins[2:0]) ? (BW+1)'(f_ins) : (BW+1)'(f_ins) + 1'b1;
        ln_waddr[j] = {gb, pos[BW-1:3]};
        ln_wdata[j] = (3'(j) == f_ins[2:0]) ? ~sum[15:8] : ~sum[7:0];
      end
    end
  end

  always_comb begin
    m_req = PLB_REQ_IDLE;
    if (st == S_FETCH) begin
      m_req.valid = 1'b1;
      m_req.addr  = {cur.addr[31:3], 3'b000};
      m_req.be    = '1;
    end
  end

  // ---------------- send
  logic        sb;         // bank being sent
  logic [BW:0] sptr;       // byte being sent
  logic        s_last;
  assign ln_raddr = {sb, sptr[BW-1:3]};
  assign tx_data  = ln_rdata[sptr[2:0]];
  assign tx_valid = full[sb];
  assign s_last   = (sptr + 1'b1 == flen[sb]);
  assign tx_last  = tx_valid && s_last;

  logic set_full, clr_full;
  assign set_full = (st == S_DONE);
  assign clr_full = tx_valid && tx_ready && s_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur <= '0; word <= '0; wptr <= '0; remain <= '0;
      f_csum <= 1'b0; f_start <= '0; f_ins <= '0; sum <= '0;
      gb <= 1'b0; sb <= 1'b0; full <= '0; flen[0] <= '0; flen[1] <= '0;
      sptr <= '0; frames_sent <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (q_pop) begin
          cur    <= hd;
          remain <= {1'b0, hd.len};
          if (wptr == 0) begin
            f_csum  <= hd.csum_en;
            f_start <= hd.csum_start;
            f_ins   <= hd.csum_ins;
            sum     <= '0;
          end
          if (hd.len != 0)                  st <= S_FETCH;
          else if (!hd.eop || wptr == 0)    st <= S_IDLE;  // empty fragment or frame
          else if (wptr == 0 ? hd.csum_en : f_csum) st <= S_INS;
          else                              st <= S_DONE;
        end
        S_FETCH: if (m_rsp.ack) begin
          word <= m_rsp.rdata;
          st   <= S_COPY;
        end
        S_COPY: begin
          if (f_csum) sum <= sum_next;
          wptr     <= wptr + (BW+1)'(ncopy);
          cur.addr <= cur.addr + 32'(ncopy);
          remain   <= remain - 12'(ncopy);
          if (remain == 12'(ncopy)) begin
            if (!cur.eop)    st <= S_IDLE;
            else if (f_csum) st <= S_INS;
            else             st <= S_DONE;
          end else begin
            st <= S_FETCH;
          end
        end
        S_INS:  st <= S_DONE;
        S_DONE: begin
          flen[gb] <= (wptr > (BW+1)'(BUF_BYTES)) ? (BW+1)'(BUF_BYTES) : wptr;
          wptr     <= '0;
          gb       <= ~gb;
          st       <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase

      if (tx_valid && tx_ready) begin
        sptr <= sptr + 1'b1;
        if (s_last) begin
          sptr        <= '0;
          sb          <= ~sb;
          frames_sent <= frames_sent + 1'b1;
        end
      end
      for (int i = 0; i < 2; i++) begin
        if (set_full && gb == 1'(i)) full[i] <= 1'b1;
        else if (clr_full && sb == 1'(i)) full[i] <= 1'b0;
      end
    end
  end
endmodule
