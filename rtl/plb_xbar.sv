// plb_xbar: the processor local bus (PLB) that joins the processors,
// the MAC, the DMA front end and the memories and registers on the
// Virtex FPGA.
//
// It is a shared bus: one transfer at a time. When idle, a round-robin
// arbiter picks one of the NM masters with a valid request; the grant
// is held until the slave selected by the address acknowledges. The
// slave is found by comparing (addr & MASK[i]) with BASE[i]. A request
// that matches no slave is acknowledged by the bus itself with zero
// read data so that no master can hang.
//
// Timing: the grant is registered, so a transfer on an idle bus takes one
// arbitration cycle plus the slave's latency; the acknowledge is passed to
// the master in the cycle the slave gives it. When another master is
// waiting, the grant passes to it in the acknowledge cycle, so transfers
// of different masters follow each other every two cycles with
// single-cycle slaves. A master must drop or change its request in the
// cycle after its acknowledge.
//
// The document names the PLB and shows which units sit on it (Fig. 2);
// arbitration, single-beat transfers and the address map are this
// design's own choices.
module plb_xbar
  import ricenic_pkg::*;
#(
  parameter int NM = 5,
  parameter int NS = 8,
  parameter logic [NS-1:0][31:0] BASE = {MAP_SRAM_BASE, MAP_EVT_BASE, MAP_DMA_BASE, MAP_MACRX_BASE,
                                         MAP_MACTX_BASE, MAP_UART_BASE, MAP_BRAM_BASE, MAP_DDR_BASE},
  parameter logic [NS-1:0][31:0] MASK = {MAP_SRAM_MASK, MAP_EVT_MASK, MAP_DMA_MASK, MAP_MACRX_MASK,
                                         MAP_MACTX_MASK, MAP_UART_MASK, MAP_BRAM_MASK, MAP_DDR_MASK}
) (
  input  logic     clk,
  input  logic     rst_n,
  input  plb_req_t m_req [NM],
  output plb_rsp_t m_rsp [NM],
  output plb_req_t s_req [NS],
  input  plb_rsp_t s_rsp [NS]
);
  localparam int MW = (NM > 1) ? $clog2(NM) : 1;
  localparam int SW = (NS > 1) ? $clog2(NS) : 1;

  logic          busy;
  logic [MW-1:0] owner, last;
  logic [SW-1:0] sel;
  logic          hit;
  logic [MW-1:0] pick;
  logic          any;
  plb_req_t      cur;

  // round-robin pick among the waiting masters, starting after the last
  // owner; the current owner is not a candidate for the next grant
  logic [NM-1:0] want;
  always_comb begin
    for (int m = 0; m < NM; m++) want[m] = m_req[m].valid && !(busy && owner == MW'(m));
  end
  always_comb begin
    pick = last;
    any  = 1'b0;
    for (int k = 1; k <= NM; k++) begin
      logic [MW-1:0] idx;
      idx = MW'((int'(last) + k) % NM);
      if (!any && want[idx]) begin
        pick = idx;
        any  = 1'b1;
      end
    end
  end

  assign cur = m_req[owner];

  always_comb begin
    sel = '0;
    hit = 1'b0;
    for (int s = 0; s < NS; s++) begin
      if (!hit && ((cur.addr & MASK[s]) == BASE[s])) begin
        sel = SW'(s);
        hit = 1'b1;
      end
    end
  end

  logic done;
  assign done = busy && (hit ? s_rsp[sel].ack : 1'b1);

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      s_req[s] = cur;
      s_req[s].valid = busy && hit && (sel == SW'(s)) && cur.valid;
    end
    for (int m = 0; m < NM; m++) begin
      m_rsp[m] = PLB_RSP_IDLE;
      if (busy && owner == MW'(m)) begin
        m_rsp[m].ack   = done;
        m_rsp[m].rdata = hit ? s_rsp[sel].rdata : '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
      last  <= MW'(NM - 1);
    end else if (!busy) begin
      if (any) begin
        busy  <= 1'b1;
        owner <= pick;
        last  <= pick;
      end
    end else if (done || !cur.valid) begin
      if (any) begin
        owner <= pick;    // hand over without an idle cycle
        last  <= pick;
      end else begin
        busy  <= 1'b0;
      end
    end
  end

  // A granted master keeps its request until acknowledged. Reset clears
  // busy, so the property needs no disable condition.
  a_hold: assert property (@(posedge clk)
    busy && !done |=> !busy || done || $stable(m_req[owner]));
endmodule
