// tcdm: the L1 scratchpad of the tile, 32 banks behind the HCI.
//
// 1 MiB of tightly-coupled data memory made of NB word-interleaved tcdm_bank
// instances (32 KiB, 32 bit each) and the hci_interconnect that arbitrates the
// NM master ports per bank. Requests carry a byte address; only the low
// log2(NB*WORDS*4) bits are used, so the L1 window of the tile map
// (0x0001_0000-0x000F_FFFF) maps one-to-one onto the banks. Timing: grant in the
// request cycle when the bank is free, response in the next cycle.
module tcdm
  import magia_pkg::*;
#(
  parameter int unsigned NM    = 24,
  parameter int unsigned NB    = magia_pkg::N_BANKS,
  parameter int unsigned WORDS = magia_pkg::BANK_WORDS
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  obi_req_t mst_req_i [NM],
  output obi_rsp_t mst_rsp_o [NM]
);
  localparam int unsigned RW = $clog2(WORDS);
  logic          bank_req   [NB];
  logic          bank_we    [NB];
  logic [3:0]    bank_be    [NB];
  logic [RW-1:0] bank_addr  [NB];
  logic [31:0]   bank_wdata [NB];
  logic [31:0]   bank_rdata [NB];

  hci_interconnect #(.NM(NM), .NB(NB), .WORDS(WORDS)) i_hci (
    .clk_i, .rst_ni, .mst_req_i, .mst_rsp_o,
    .bank_req_o(bank_req), .bank_we_o(bank_we), .bank_be_o(bank_be),
    .bank_addr_o(bank_addr), .bank_wdata_o(bank_wdata), .bank_rdata_i(bank_rdata)
  );

  for (genvar b = 0; b < NB; b++) begin : g_bank
    tcdm_bank #(.WORDS(WORDS)) i_bank (
      .clk_i, .req_i(bank_req[b]), .we_i(bank_we[b]), .be_i(bank_be[b]),
      .addr_i(bank_addr[b]), .wdata_i(bank_wdata[b]), .rdata_o(bank_rdata[b])
    );
  end
endmodule
