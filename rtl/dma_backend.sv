// dma_backend: Spartan half of the DMA assist unit. It owns the 2 KB
// data buffer and drives the PCI core's master side, one burst at a
// time.
//
//  * BR_DMA_RD (host address, length): the burst is read from host
//    memory with one PCI master read command; the returned words fill
//    the buffer, then the buffer is sent back to the front end as
//    BR_DMA_RD data flits (last set on the final word).
//  * BR_DMA_WR (host address, length) followed by BR_DMA_DATA flits: the
//    words fill the buffer, then one PCI master write command sends them
//    (the core takes pci_wr_data on each cycle with pci_wr_ready), and
//    after pci_done a BR_DMA_WR flit tells the front end the burst is in
//    host memory.
// Lengths are multiples of 8 bytes and at most BUF_BYTES.
//
// The PCI master interface (command valid/ready, read data valid, write
// data ready, done) is an assumed simplified view of the vendor PCI
// core. The buffer size and the back-end role follow the document; the
// rest is this design's own.
module dma_backend
  import ricenic_pkg::*;
#(
  parameter int BUF_BYTES = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  br_flit_t    in_flit,
  input  logic        in_valid,
  output logic        in_ready,
  output br_flit_t    out_flit,
  output logic        out_valid,
  input  logic        out_ready,
  // PCI core, master side
  output logic        pci_cmd_valid,
  input  logic        pci_cmd_ready,
  output logic        pci_cmd_we,
  output logic [63:0] pci_cmd_addr,
  output logic [11:0] pci_cmd_len,
  input  logic        pci_rd_valid,
  input  logic [63:0] pci_rd_data,
  input  logic        pci_wr_ready,
  output logic [63:0] pci_wr_data,
  input  logic        pci_done
);
  localparam int WW = $clog2(BUF_BYTES / 8);
  logic [63:0] buffer [BUF_BYTES/8];

  typedef enum logic [2:0] {B_IDLE, B_RDCMD, B_RDFILL, B_RDSEND, B_WRFILL, B_WRCMD, B_WRDATA, B_WRDONE} state_e;
  state_e st;
  logic [63:0] haddr;
  logic [11:0] blen;
  logic [WW:0] nwords, ptr;

  assign nwords = (WW+1)'(blen >> 3);

  assign in_ready = (st == B_IDLE) || (st == B_WRFILL);

  always_ff @(posedge clk) begin
    if (st == B_RDFILL && pci_rd_valid) buffer[ptr[WW-1:0]] <= pci_rd_data;
    if (st == B_WRFILL && in_valid && in_flit.kind == BR_DMA_DATA) buffer[ptr[WW-1:0]] <= in_flit.data;
  end

  assign pci_cmd_valid = (st == B_RDCMD) || (st == B_WRCMD);
  assign pci_cmd_we    = (st == B_WRCMD);
  assign pci_cmd_addr  = haddr;
  assign pci_cmd_len   = blen;
  assign pci_wr_data   = buffer[ptr[WW-1:0]];

  always_comb begin
    out_flit = '0;
    out_flit.addr = haddr;
    out_flit.len  = blen;
    out_flit.be   = '1;
    out_valid = 1'b0;
    if (st == B_RDSEND) begin
      out_valid     = 1'b1;
      out_flit.kind = BR_DMA_RD;
      out_flit.data = buffer[ptr[WW-1:0]];
      out_flit.last = (ptr + 1'b1 == nwords);
    end else if (st == B_WRDONE) begin
      out_valid     = 1'b1;
      out_flit.kind = BR_DMA_WR;
      out_flit.last = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; haddr <= '0; blen <= '0; ptr <= '0;
    end else begin
      unique case (st)
        B_IDLE: if (in_valid) begin
          haddr <= in_flit.addr;
          blen  <= in_flit.len;
          ptr   <= '0;
          if (in_flit.kind == BR_DMA_RD) st <= B_RDCMD;
          else if (in_flit.kind == BR_DMA_WR) st <= B_WRFILL;
        end
        B_RDCMD:  if (pci_cmd_ready) st <= B_RDFILL;
        B_RDFILL: if (pci_rd_valid) begin
          ptr <= ptr + 1'b1;
          if (ptr + 1'b1 == nwords) begin ptr <= '0; st <= B_RDSEND; end
        end
        B_RDSEND: if (out_ready) begin
          ptr <= ptr + 1'b1;
          if (ptr + 1'b1 == nwords) st <= B_IDLE;
        end
        B_WRFILL: if (in_valid && in_flit.kind == BR_DMA_DATA) begin
          ptr <= ptr + 1'b1;
          if (ptr + 1'b1 == nwords) begin ptr <= '0; st <= B_WRCMD; end
        end
        B_WRCMD:  if (pci_cmd_ready) st <= B_WRDATA;
        B_WRDATA: begin
          if (pci_wr_ready && ptr != nwords) ptr <= ptr + 1'b1;
          if (pci_done) st <= B_WRDONE;
        end
        B_WRDONE: if (out_ready) st <= B_IDLE;
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
