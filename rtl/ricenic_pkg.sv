// ricenic_pkg: types and constants shared by the NIC blocks.
//
// The processor local bus (PLB) is modelled as a single-beat 64-bit
// request/acknowledge bus: a master holds a request (plb_req_t) until the
// addressed slave returns an acknowledge (plb_rsp_t.ack) for one cycle,
// together with read data. Width 64 matches the 64-bit descriptors the
// MAC and DMA units accept; single-beat transfers and the address map
// below are this design's own choices.
//
// The link between the Virtex and the Spartan FPGA carries bridge flits
// (br_flit_t) in each direction with a valid/ready handshake. The flit
// kinds (br_kind_e) are this design's own encoding.
package ricenic_pkg;

  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;   // byte address, 8-byte aligned for data words
    logic [63:0] wdata;
    logic [7:0]  be;     // byte enables, bit i covers wdata[8*i+7:8*i]
  } plb_req_t;

  typedef struct packed {
    logic        ack;
    logic [63:0] rdata;
  } plb_rsp_t;

  localparam plb_req_t PLB_REQ_IDLE = '{valid: 1'b0, we: 1'b0, addr: '0, wdata: '0, be: '0};
  localparam plb_rsp_t PLB_RSP_IDLE = '{ack: 1'b0, rdata: '0};

  // PLB address map (base, mask of the bits compared)
  localparam logic [31:0] MAP_DDR_BASE   = 32'h0000_0000, MAP_DDR_MASK   = 32'hF000_0000;
  localparam logic [31:0] MAP_BRAM_BASE  = 32'h1000_0000, MAP_BRAM_MASK  = 32'hFFFF_8000;
  localparam logic [31:0] MAP_UART_BASE  = 32'h2000_0000, MAP_UART_MASK  = 32'hFFFF_F000;
  localparam logic [31:0] MAP_MACTX_BASE = 32'h2000_1000, MAP_MACTX_MASK = 32'hFFFF_F000;
  localparam logic [31:0] MAP_MACRX_BASE = 32'h2000_2000, MAP_MACRX_MASK = 32'hFFFF_F000;
  localparam logic [31:0] MAP_DMA_BASE   = 32'h2000_3000, MAP_DMA_MASK   = 32'hFFFF_F000;
  localparam logic [31:0] MAP_EVT_BASE   = 32'h2000_4000, MAP_EVT_MASK   = 32'hFFFF_F000;
  localparam logic [31:0] MAP_SRAM_BASE  = 32'h3000_0000, MAP_SRAM_MASK  = 32'hFFE0_0000;

  // MAC transmit descriptor (64 bits, one PLB write)
  typedef struct packed {
    logic [2:0]  rsvd;
    logic [7:0]  csum_ins;   // byte offset in the frame where the 16-bit checksum goes
    logic [7:0]  csum_start; // byte offset in the frame where summing starts
    logic        csum_en;    // insert a TCP/UDP checksum into this frame
    logic        eop;        // last fragment of the frame
    logic [10:0] len;        // fragment length in bytes
    logic [31:0] addr;       // fragment byte address in NIC memory
  } tx_desc_t;

  // MAC receive buffer descriptor
  typedef struct packed {
    logic [20:0] rsvd;
    logic [10:0] len;        // buffer size in bytes
    logic [31:0] addr;       // buffer byte address, 8-byte aligned
  } rx_desc_t;

  // MAC receive completion
  typedef struct packed {
    logic        valid;      // set in every completion read from the queue
    logic [2:0]  rsvd;
    logic [15:0] csum;       // ones-complement sum from RX_CSUM_START to frame end
    logic        err;        // frame error reported by the low-level MAC
    logic [10:0] len;        // frame length in bytes
    logic [31:0] addr;       // buffer it was written to
  } rx_cmpl_t;

  // Inter-FPGA bridge
  typedef enum logic [2:0] {
    BR_PIO_RD   = 3'd0,  // V->S read SRAM word        S->V: read data
    BR_PIO_WR   = 3'd1,  // V->S write SRAM word       S->V: write ack
    BR_DMA_RD   = 3'd2,  // V->S host->NIC burst req   S->V: burst data word
    BR_DMA_WR   = 3'd3,  // V->S NIC->host burst req   S->V: burst done
    BR_DMA_DATA = 3'd4,  // V->S data word of a NIC->host burst
    BR_EVENT    = 3'd5   // S->V context update event (ctx in addr)
  } br_kind_e;

  typedef struct packed {
    br_kind_e    kind;
    logic [63:0] addr;   // SRAM byte address, host address or context number
    logic [63:0] data;
    logic [7:0]  be;
    logic [11:0] len;    // burst length in bytes (DMA requests)
    logic        last;   // last data word of a burst
  } br_flit_t;

  // 16-bit ones-complement addition with end-around carry
  function automatic logic [15:0] csum_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

endpackage
