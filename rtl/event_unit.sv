// event_unit: central event buffer, masks and wait-for-event logic of the tile.
//
// Every event line of the tile (RedMulE, the two iDMA channels, FractalSync,
// Spatz CC) is edge-detected and latched into one bit of a 32-bit buffer;
// a bit stays set until software clears it by writing a one to it in
// CORE_BUFFER_CLEAR, so no event is lost while the core is busy. CORE_MASK
// selects which events software sees (masked buffer, wake-up) and CORE_IRQ_MASK
// which of those also raise irq_o. A rising edge that coincides with a clear of
// the same bit wins over a software clear.
//
// Two access ports:
//  * periph (OBI, 4 KiB window): register reads/writes, answered one cycle
//    after the (always immediate) grant.
//  * direct link (PULP native: req/add/wen/wdata/be -> gnt/r_valid/r_rdata,
//    wen low = write): the core's event-load path. A read of CORE_EVENT_WAIT or
//    CORE_EVENT_WAIT_CLEAR with no enabled event pending does not answer;
//    instead core_clock_en_o drops (it drives the core's clock gate) until an
//    enabled event arrives, then the read returns the masked buffer and the
//    clock is re-enabled in the same cycle. WAIT_CLEAR also clears the returned
//    bits. Through the periph port the wait registers return at once.
// Register offsets 0x00/0x1C/0x20/0x28/0x38/0x3C are the published ones;
// CORE_IRQ_MASK at 0x0C and CORE_BUFFER_IRQ_MASKED at 0x24 follow the PULP
// event unit layout and are this design's choice. Reset: masks and buffer 0.
module event_unit
  import magia_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic [31:0] evt_i,
  // memory-mapped configuration port
  input  obi_req_t    periph_req_i,
  output obi_rsp_t    periph_rsp_o,
  // eu_direct_link from the core data demux
  input  logic        dl_req_i,
  input  logic [31:0] dl_add_i,
  input  logic        dl_wen_i,
  input  logic [31:0] dl_wdata_i,
  input  logic [3:0]  dl_be_i,
  output logic        dl_gnt_o,
  output logic        dl_r_valid_o,
  output logic [31:0] dl_r_rdata_o,
  // to the core
  output logic        core_clock_en_o,
  output logic        irq_o
);
  logic [31:0] evt_q, buffer_q, buffer_n, mask_q, irq_mask_q;
  logic [31:0] rising, set_buf, clr_bits, clr_wait, masked_now;
  logic        dl_pending_q, dl_wclr_q;
  logic        p_rvalid_q, dl_rvalid_q;
  logic [31:0] p_rdata_q, dl_rdata_q;
  logic [IDW-1:0] p_rid_q;

  assign rising     = evt_i & ~evt_q;
  assign set_buf    = buffer_q | rising;
  assign masked_now = set_buf & mask_q;

  function automatic logic [31:0] rd_reg(logic [11:0] off, logic [31:0] buf_v, logic [31:0] m, logic [31:0] im);
    unique case (off)
      EU_CORE_MASK:              return m;
      EU_CORE_IRQ_MASK:          return im;
      EU_CORE_BUFFER:            return buf_v;
      EU_CORE_BUFFER_MASKED,
      EU_CORE_EVENT_WAIT,
      EU_CORE_EVENT_WAIT_CLEAR:  return buf_v & m;
      EU_CORE_BUFFER_IRQ_MASKED: return buf_v & m & im;
      default:                   return '0;
    endcase
  endfunction

  // request decode
  logic        p_acc, p_wr, dl_acc, dl_wr, dl_is_wait, dl_is_wclr, p_is_wclr;
  logic [11:0] p_off, dl_off;
  logic        dl_wake;
  assign p_off  = periph_req_i.addr[11:0] - EU_BASE[11:0];
  assign dl_off = dl_add_i[11:0] - EU_BASE[11:0];
  assign p_acc  = periph_req_i.req;
  assign p_wr   = p_acc && periph_req_i.we;
  assign dl_gnt_o = dl_req_i && !dl_pending_q;
  assign dl_acc = dl_gnt_o;
  assign dl_wr  = dl_acc && !dl_wen_i;
  assign dl_is_wait = dl_acc && dl_wen_i &&
                      (dl_off == EU_CORE_EVENT_WAIT || dl_off == EU_CORE_EVENT_WAIT_CLEAR);
  assign dl_is_wclr = dl_off == EU_CORE_EVENT_WAIT_CLEAR;
  assign p_is_wclr  = p_acc && !periph_req_i.we && p_off == EU_CORE_EVENT_WAIT_CLEAR;
  // a sleeping wait completes as soon as an enabled event is buffered
  assign dl_wake = dl_pending_q && (masked_now != '0);

  always_comb begin
    // software clears lose against a coinciding new edge; a wait-and-clear
    // consumes exactly the bits it returns (new edges included)
    clr_bits = '0;
    clr_wait = '0;
    if (p_wr && p_off == EU_CORE_BUFFER_CLEAR)   clr_bits |= periph_req_i.wdata;
    if (dl_wr && dl_off == EU_CORE_BUFFER_CLEAR) clr_bits |= dl_wdata_i;
    if (p_is_wclr)                               clr_wait |= masked_now;
    if (dl_is_wait && dl_is_wclr && masked_now != '0) clr_wait |= masked_now;
    if (dl_wake && dl_wclr_q)                    clr_wait |= masked_now;
    buffer_n = ((buffer_q & ~clr_bits) | rising) & ~clr_wait;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      evt_q <= '0; buffer_q <= '0; mask_q <= '0; irq_mask_q <= '0;
      dl_pending_q <= 1'b0; dl_wclr_q <= 1'b0;
      p_rvalid_q <= 1'b0; p_rdata_q <= '0; p_rid_q <= '0;
      dl_rvalid_q <= 1'b0; dl_rdata_q <= '0;
    end else begin
      evt_q    <= evt_i;
      buffer_q <= buffer_n;
      // periph port
      p_rvalid_q <= p_acc;
      p_rid_q    <= periph_req_i.aid;
      p_rdata_q  <= '0;
      if (p_acc && !periph_req_i.we) p_rdata_q <= rd_reg(p_off, set_buf, mask_q, irq_mask_q);
      if (p_wr && p_off == EU_CORE_MASK)     mask_q     <= be_merge(mask_q, periph_req_i.wdata, periph_req_i.be);
      if (p_wr && p_off == EU_CORE_IRQ_MASK) irq_mask_q <= be_merge(irq_mask_q, periph_req_i.wdata, periph_req_i.be);
      // direct link
      dl_rvalid_q <= 1'b0;
      if (dl_wr && dl_off == EU_CORE_MASK)     mask_q     <= be_merge(mask_q, dl_wdata_i, dl_be_i);
      if (dl_wr && dl_off == EU_CORE_IRQ_MASK) irq_mask_q <= be_merge(irq_mask_q, dl_wdata_i, dl_be_i);
      if (dl_acc) begin
        if (dl_is_wait && masked_now == '0) begin
          dl_pending_q <= 1'b1;            // go to sleep
          dl_wclr_q    <= dl_is_wclr;
        end else begin
          dl_rvalid_q <= 1'b1;
          dl_rdata_q  <= dl_wen_i ? rd_reg(dl_off, set_buf, mask_q, irq_mask_q) : '0;
        end
      end
      if (dl_wake) begin
        dl_pending_q <= 1'b0;
        dl_rvalid_q  <= 1'b1;
        dl_rdata_q   <= masked_now;
      end
    end
  end

  assign periph_rsp_o = '{gnt: periph_req_i.req, rvalid: p_rvalid_q, rdata: p_rdata_q,
                          err: 1'b0, rid: p_rid_q};
  assign dl_r_valid_o    = dl_rvalid_q;
  assign dl_r_rdata_o    = dl_rdata_q;
  assign core_clock_en_o = !dl_pending_q;
  assign irq_o           = |(buffer_q & mask_q & irq_mask_q);
endmodule
