// spatz_bootrom: boot ROM of Spatz CC at 0x1000_0000.
//
// Three RV32I instructions that hand the Snitch core to the address the host
// left in SPATZ_TASKBIN (0x0000_170C):
//   0x00  lui  t0, 0x1          t0 = 0x0000_1000
//   0x04  lw   t1, 0x70C(t0)    t1 = SPATZ_TASKBIN
//   0x08  jalr x0, 0(t1)        jump to it
// Any other word reads as 0. Port: a request is granted at once and its data
// returned in the next cycle (rvalid); writes are ignored and flagged with err.
// The three-instruction flow is as published; the exact encoding (lui+lw+jalr,
// as the register lies beyond a 12-bit immediate) is this design's.
module spatz_bootrom
  import magia_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  obi_req_t req_i,
  output obi_rsp_t rsp_o
);
  localparam logic [31:0] ROM [3] = '{32'h0000_12B7, 32'h70C2_A303, 32'h0003_0067};

  logic        rvalid_q, err_q;
  logic [31:0] rdata_q;
  logic [IDW-1:0] rid_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rvalid_q <= 1'b0; rdata_q <= '0; err_q <= 1'b0; rid_q <= '0;
    end else begin
      rvalid_q <= req_i.req;
      rid_q    <= req_i.aid;
      err_q    <= req_i.req && req_i.we;
      rdata_q  <= (req_i.addr[31:4] == SPATZ_BOOT_ADDR[31:4] && req_i.addr[3:2] != 2'd3)
                  ? ROM[req_i.addr[3:2]] : '0;
    end
  end

  assign rsp_o = '{gnt: req_i.req, rvalid: rvalid_q, rdata: rdata_q, err: err_q, rid: rid_q};
endmodule
