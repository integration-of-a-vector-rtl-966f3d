// hci_interconnect: L1 interconnect between the tile's memory masters and the
// word-interleaved TCDM banks.
//
// Each master port carries a 32-bit request (byte address within the 1 MiB L1
// window). Consecutive words go to consecutive banks: bank = addr[2 +: log2(NB)],
// row = the bits above. Every bank has its own round-robin arbiter, so
// contention is resolved locally: masters hitting different banks proceed in the
// same cycle, and of several masters hitting one bank one is granted and the
// others see gnt low (a stall) and retry. A granted request is answered in the
// next cycle (r_valid + r_data, also for writes, with the request's aid echoed as rid), which is the single-cycle
// access latency. The per-bank arbitration is as published; treating every
// port (including the 16 lanes of the 512-bit RedMulE port) as an independent
// 32-bit port of equal priority is this design's simplification.
module hci_interconnect
  import magia_pkg::*;
#(
  parameter int unsigned NM    = 24,
  parameter int unsigned NB    = magia_pkg::N_BANKS,
  parameter int unsigned WORDS = magia_pkg::BANK_WORDS,
  localparam int unsigned BW   = $clog2(NB),
  localparam int unsigned RW   = $clog2(WORDS),
  localparam int unsigned MW   = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  obi_req_t mst_req_i [NM],
  output obi_rsp_t mst_rsp_o [NM],
  // bank side
  output logic          bank_req_o   [NB],
  output logic          bank_we_o    [NB],
  output logic [3:0]    bank_be_o    [NB],
  output logic [RW-1:0] bank_addr_o  [NB],
  output logic [31:0]   bank_wdata_o [NB],
  input  logic [31:0]   bank_rdata_i [NB]
);
  logic [NB-1:0] bank_gnt_vec [NM];    // [master][bank]
  logic [MW-1:0] winner       [NB];
  logic          bank_valid   [NB];
  logic [MW-1:0] winner_q     [NB];
  logic          rvalid_q     [NB];
  logic [IDW-1:0] aid_q       [NB];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic [NM-1:0] reqs, gnts;
    for (genvar m = 0; m < NM; m++) begin : g_req
      assign reqs[m] = mst_req_i[m].req && (mst_req_i[m].addr[2 +: BW] == BW'(b));
      assign bank_gnt_vec[m][b] = gnts[m];
    end
    rr_arbiter #(.N(NM)) i_arb (
      .clk_i, .rst_ni, .req_i(reqs), .advance_i(1'b1),
      .gnt_o(gnts), .idx_o(winner[b]), .valid_o(bank_valid[b])
    );
    assign bank_req_o[b]   = bank_valid[b];
    assign bank_we_o[b]    = mst_req_i[winner[b]].we;
    assign bank_be_o[b]    = mst_req_i[winner[b]].be;
    assign bank_addr_o[b]  = mst_req_i[winner[b]].addr[2+BW +: RW];
    assign bank_wdata_o[b] = mst_req_i[winner[b]].wdata;

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        rvalid_q[b] <= 1'b0;
        winner_q[b] <= '0;
        aid_q[b]    <= '0;
      end else begin
        rvalid_q[b] <= bank_valid[b];
        winner_q[b] <= winner[b];
        aid_q[b]    <= mst_req_i[winner[b]].aid;
      end
    end
  end

  // responses: a master has at most one bank answering per cycle
  always_comb begin
    for (int m = 0; m < NM; m++) begin
      mst_rsp_o[m]       = '0;
      mst_rsp_o[m].gnt   = |bank_gnt_vec[m];
      mst_rsp_o[m].rid   = '0;
    end
    for (int b = 0; b < NB; b++) begin
      if (rvalid_q[b]) begin
        mst_rsp_o[winner_q[b]].rvalid = 1'b1;
        mst_rsp_o[winner_q[b]].rdata  = bank_rdata_i[b];
        mst_rsp_o[winner_q[b]].rid    = aid_q[b];
      end
    end
  end

  // a master never addresses two banks at once, so it sees at most one grant
  for (genvar m = 0; m < NM; m++) begin : g_chk
    assert property (@(posedge clk_i) disable iff (!rst_ni) $onehot0(bank_gnt_vec[m]));
  end
endmodule
