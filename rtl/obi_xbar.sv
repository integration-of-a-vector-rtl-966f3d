// obi_xbar: the tile's OBI crossbar with the tile address map.
//
// Masters (NM = 3): 0 control core (after the Event Unit demux), 1 external
// requests arriving from the AXI side (NoC / other tiles), 2 Snitch core of
// Spatz CC. Slaves, decoded from the address:
//   S_L1      TILE_BASE + 0x0001_0000 .. TILE_BASE + 0x000F_FFFF (stack + L1 SPM,
//             TILE_BASE = tile_id * 1 MiB) -> the HCI port of the TCDM
//   S_REDMULE 0x0100-0x01FF  S_IDMA 0x0200-0x05FF  S_FSYNC 0x0600-0x06FF
//   S_EU      0x0700-0x16FF  S_SPATZ 0x1700-0x17FF
//   S_ERR     0x0000-0x00FF (null-pointer guard) and 0x1800-0xFFFF (reserved):
//             answered internally with err = 1 and rdata = 0
//   S_L2      everything else (shared L2 at 0xC000_0000, other tiles, boot ROM):
//             the AXI-side port
// Each slave has a round-robin arbiter; the winner's request is forwarded with
// aid = master index and the slave's grant is returned to it. Each master may
// have one access in flight: a new request becomes eligible in the cycle after
// the previous response, so one master issues at most one access every two
// cycles (the grant and response paths stay free of combinational loops). Responses are routed
// back by rid. Slaves must answer in order and with a registered rvalid.
// The address map is published; the single outstanding access per master and
// the error slave are this design's choices.
module obi_xbar
  import magia_pkg::*;
#(
  parameter int unsigned NM = 3
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic [7:0] tile_id_i,
  input  obi_req_t mst_req_i [NM],
  output obi_rsp_t mst_rsp_o [NM],
  output obi_req_t slv_req_o [7],
  input  obi_rsp_t slv_rsp_i [7]
);
  typedef enum logic [2:0] {
    S_L1 = 3'd0, S_REDMULE = 3'd1, S_IDMA = 3'd2, S_FSYNC = 3'd3,
    S_EU = 3'd4, S_SPATZ = 3'd5, S_L2 = 3'd6, S_ERR = 3'd7
  } slv_e;

  localparam int unsigned NS = 8;   // 7 external slaves + error slave
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  function automatic slv_e decode(logic [31:0] a, logic [7:0] tid);

    if (a < 32'h0001_0000) begin
      if      (a < 32'h0000_0100) return S_ERR;
      else if (a < 32'h0000_0200) return S_REDMULE;
      else if (a < 32'h0000_0600) return S_IDMA;
      else if (a < 32'h0000_0700) return S_FSYNC;
      else if (a < 32'h0000_1700) return S_EU;
      else if (a < 32'h0000_1800) return S_SPATZ;
      else                        return S_ERR;
    end
    if (a[31:20] == {4'd0, tid} && a[19:16] != 4'd0) return S_L1;
    return S_L2;
  endfunction

  slv_e        sel [NM];
  logic [NM-1:0] busy_q, eligible;
  logic [NM-1:0] gnt_m [NS];
  logic [MW-1:0] win   [NS];
  logic          wv    [NS];
  obi_rsp_t      srsp  [NS];
  obi_req_t      sreq  [NS];
  // error slave
  logic          err_rvalid_q;
  logic [IDW-1:0] err_rid_q;

  for (genvar m = 0; m < NM; m++) begin : g_m
    assign sel[m] = decode(mst_req_i[m].addr, tile_id_i);
  end

  // a master is eligible again in the cycle after its response
  assign eligible = ~busy_q;

  for (genvar s = 0; s < NS; s++) begin : g_s
    logic [NM-1:0] reqs;
    for (genvar m = 0; m < NM; m++) begin : g_r
      assign reqs[m] = mst_req_i[m].req && eligible[m] && (sel[m] == slv_e'(s));
    end
    rr_arbiter #(.N(NM)) i_arb (
      .clk_i, .rst_ni, .req_i(reqs), .advance_i(srsp[s].gnt),
      .gnt_o(gnt_m[s]), .idx_o(win[s]), .valid_o(wv[s])
    );
    always_comb begin
      sreq[s]     = mst_req_i[win[s]];
      sreq[s].req = wv[s];
      sreq[s].aid = IDW'(win[s]);
    end
    if (s < 7) begin : g_ext
      assign slv_req_o[s] = sreq[s];
      assign srsp[s]      = slv_rsp_i[s];
    end else begin : g_err
      assign srsp[s] = '{gnt: sreq[s].req, rvalid: err_rvalid_q, rdata: '0,
                         err: err_rvalid_q, rid: err_rid_q};
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      err_rvalid_q <= 1'b0; err_rid_q <= '0;
    end else begin
      err_rvalid_q <= sreq[S_ERR].req;
      err_rid_q    <= sreq[S_ERR].aid;
    end
  end

  // master side
  always_comb begin
    for (int m = 0; m < NM; m++) begin
      mst_rsp_o[m] = '0;
      for (int s = 0; s < NS; s++)
        if (gnt_m[s][m] && srsp[s].gnt) mst_rsp_o[m].gnt = 1'b1;
      for (int s = 0; s < NS; s++)
        if (srsp[s].rvalid && srsp[s].rid[MW-1:0] == MW'(m)) begin
          mst_rsp_o[m].rvalid = 1'b1;
          mst_rsp_o[m].rdata  = srsp[s].rdata;
          mst_rsp_o[m].err    = srsp[s].err;
        end
      mst_rsp_o[m].rid = mst_req_i[m].aid;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) busy_q <= '0;
    else
      for (int m = 0; m < NM; m++)
        if (mst_rsp_o[m].gnt)         busy_q[m] <= 1'b1;
        else if (mst_rsp_o[m].rvalid) busy_q[m] <= 1'b0;
  end
endmodule
