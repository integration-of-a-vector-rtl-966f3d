// idma_obi_ctrl_decoder: splits the 1 KiB iDMA control window between the two
// channel register sets.
//
// Addresses 0x200-0x3FF go to channel 0 (AXI-to-OBI, L2 -> L1), 0x400-0x5FF to
// channel 1 (OBI-to-AXI, L1 -> L2): address bit 10 selects the channel and the
// low 9 bits are the register offset passed on. The grant of the selected
// channel is returned at once; the response of whichever channel answers is
// forwarded (the channels answer one cycle after their grant, so answers never
// overlap). Published: the two base addresses; the bit-10 decode follows from
// them.
module idma_obi_ctrl_decoder
  import magia_pkg::*;
(
  input  obi_req_t req_i,
  output obi_rsp_t rsp_o,
  output obi_req_t ch_req_o [2],
  input  obi_rsp_t ch_rsp_i [2]
);
  logic sel;
  assign sel = req_i.addr[10];

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      ch_req_o[c]      = req_i;
      ch_req_o[c].req  = req_i.req && (sel == c[0]);
      ch_req_o[c].addr = {23'd0, req_i.addr[8:0]};
    end
    rsp_o        = ch_rsp_i[0].rvalid ? ch_rsp_i[0] : ch_rsp_i[1];
    rsp_o.gnt    = sel ? ch_rsp_i[1].gnt : ch_rsp_i[0].gnt;
    if (!ch_rsp_i[0].rvalid && !ch_rsp_i[1].rvalid) rsp_o.rvalid = 1'b0;
  end
endmodule
