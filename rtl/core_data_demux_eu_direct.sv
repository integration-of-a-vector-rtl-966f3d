// core_data_demux_eu_direct: splits the control core's data port.
//
// Accesses to the Event Unit window (0x0000_0700-0x0000_16FF) leave on the
// eu_direct_link (PULP native handshake: req/add/wen/wdata/be, gnt, r_valid,
// r_rdata; wen is low for a write), bypassing the OBI crossbar so that an
// event-wait load reaches the Event Unit without arbitration. Everything else
// goes to the crossbar unchanged. Responses of both sides are merged back.
// To keep responses in order the demux remembers the side of the access in
// flight and holds off (gnt low) a request to the other side until that
// response has arrived; requests to the same side pass freely. The window and
// the split are published; the ordering rule is this design's.
module core_data_demux_eu_direct
  import magia_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  obi_req_t    core_req_i,
  output obi_rsp_t    core_rsp_o,
  output obi_req_t    xbar_req_o,
  input  obi_rsp_t    xbar_rsp_i,
  output logic        dl_req_o,
  output logic [31:0] dl_add_o,
  output logic        dl_wen_o,
  output logic [31:0] dl_wdata_o,
  output logic [3:0]  dl_be_o,
  input  logic        dl_gnt_i,
  input  logic        dl_r_valid_i,
  input  logic [31:0] dl_r_rdata_i
);
  logic to_eu, block, pend_q, pend_eu_q, gnt, rvalid;
  logic [1:0] cnt_q;

  assign to_eu  = core_req_i.addr >= EU_BASE && core_req_i.addr <= EU_END;
  assign rvalid = dl_r_valid_i | xbar_rsp_i.rvalid;
  // another side still owes a response
  assign block  = pend_q && (pend_eu_q != to_eu);

  always_comb begin
    xbar_req_o     = core_req_i;
    xbar_req_o.req = core_req_i.req && !to_eu && !block;
    dl_req_o       = core_req_i.req && to_eu && !block;
    dl_add_o       = core_req_i.addr;
    dl_wen_o       = !core_req_i.we;
    dl_wdata_o     = core_req_i.wdata;
    dl_be_o        = core_req_i.be;
    gnt            = to_eu ? (dl_req_o && dl_gnt_i) : (xbar_req_o.req && xbar_rsp_i.gnt);
    core_rsp_o        = '0;
    core_rsp_o.gnt    = gnt;
    core_rsp_o.rvalid = rvalid;
    core_rsp_o.rdata  = dl_r_valid_i ? dl_r_rdata_i : xbar_rsp_i.rdata;
    core_rsp_o.err    = !dl_r_valid_i && xbar_rsp_i.err;
    core_rsp_o.rid    = dl_r_valid_i ? '0 : xbar_rsp_i.rid;
  end

  // outstanding-response bookkeeping
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q <= '0; pend_eu_q <= 1'b0;
    end else begin
      cnt_q <= cnt_q + {1'b0, gnt} - {1'b0, rvalid};
      if (gnt) pend_eu_q <= to_eu;
    end
  end
  assign pend_q = cnt_q != 2'd0;
endmodule
