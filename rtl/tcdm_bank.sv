// tcdm_bank: one bank of the L1 tightly-coupled data memory.
//
// A single-port SRAM of WORDS x 32 bit (32 KiB by default, as each of the 32
// L1 banks is), with per-byte write enables. A request is always accepted; a
// read returns its data in the following cycle, which gives the interconnect
// its single-cycle access latency. Writes update the addressed bytes at the
// clock edge. The silicon uses compiled SRAM macros; this array stands in for
// one. Contents are not reset (as in an SRAM).
module tcdm_bank #(
  parameter int unsigned WORDS = 8192,
  localparam int unsigned AWL  = $clog2(WORDS)
) (
  input  logic           clk_i,
  input  logic           req_i,
  input  logic           we_i,
  input  logic [3:0]     be_i,
  input  logic [AWL-1:0] addr_i,
  input  logic [31:0]    wdata_i,
  output logic [31:0]    rdata_o
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk_i) begin
    if (req_i) begin
      if (we_i) begin
        for (int i = 0; i < 4; i++)
          if (be_i[i]) mem[addr_i][8*i +: 8] <= wdata_i[8*i +: 8];
      end else begin
        rdata_o <= mem[addr_i];
      end
    end
  end
endmodule
