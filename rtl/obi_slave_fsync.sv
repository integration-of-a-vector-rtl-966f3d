// obi_slave_fsync: memory-mapped control port of the FractalSync barrier.
//
// Registers (OBI slave, 256 B window):
//   0x00 AGGR_REG    aggregation level (size of the barrier group)
//   0x04 ID_REG      barrier identifier
//   0x08 CONTROL_REG any write starts a barrier with the current AGGR/ID
//   0x0C STATUS_REG  bit 2 = a barrier is in progress
// Starting a barrier raises sync_req_o for one cycle with aggr_o/id_o stable and
// sets busy; the FractalSync network answers with done_i or error_i, which clear
// busy and are re-issued as one-cycle done_o/error_o events for the Event Unit.
// A CONTROL write while busy is ignored. Answers come one cycle after the
// immediate grant. The register map is published; the one-cycle request pulse
// and the ignore-while-busy rule are this design's choices.
module obi_slave_fsync
  import magia_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  obi_req_t    req_i,
  output obi_rsp_t    rsp_o,
  output logic        sync_req_o,
  output logic [31:0] aggr_o,
  output logic [31:0] id_o,
  input  logic        done_i,
  input  logic        error_i,
  output logic        done_o,
  output logic        error_o
);
  logic [31:0] aggr_q, id_q, rdata_q;
  logic        busy_q, req_q, done_q, error_q, rvalid_q;
  logic [IDW-1:0] rid_q;
  logic [7:0]  off;
  assign off = req_i.addr[7:0];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      aggr_q <= '0; id_q <= '0; busy_q <= 1'b0; req_q <= 1'b0;
      done_q <= 1'b0; error_q <= 1'b0; rvalid_q <= 1'b0; rdata_q <= '0; rid_q <= '0;
    end else begin
      req_q    <= 1'b0;
      done_q   <= done_i;
      error_q  <= error_i;
      rvalid_q <= req_i.req;
      rid_q    <= req_i.aid;
      rdata_q  <= '0;
      if (done_i || error_i) busy_q <= 1'b0;
      if (req_i.req && req_i.we) begin
        unique case (off)
          8'h00: aggr_q <= be_merge(aggr_q, req_i.wdata, req_i.be);
          8'h04: id_q   <= be_merge(id_q, req_i.wdata, req_i.be);
          8'h08: if (!busy_q) begin busy_q <= 1'b1; req_q <= 1'b1; end
          default: ;
        endcase
      end else if (req_i.req) begin
        unique case (off)
          8'h00: rdata_q <= aggr_q;
          8'h04: rdata_q <= id_q;
          8'h0C: rdata_q <= {29'd0, busy_q, 2'b00};
          default: ;
        endcase
      end
    end
  end

  assign rsp_o      = '{gnt: req_i.req, rvalid: rvalid_q, rdata: rdata_q, err: 1'b0, rid: rid_q};
  assign sync_req_o = req_q;
  assign aggr_o     = aggr_q;
  assign id_o       = id_q;
  assign done_o     = done_q;
  assign error_o    = error_q;
endmodule
