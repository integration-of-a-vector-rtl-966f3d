// spatz_ctrl_regs: host/accelerator control registers of Spatz CC.
//
// Seven 32-bit registers on one OBI slave port, reached by both the control
// core (host) and the Snitch core of Spatz CC through the OBI crossbar:
//   0x00 SPATZ_CLK_EN  bit 0 enables the Spatz CC clock (drives its clock gate)
//   0x04 SPATZ_READY   set to 1 by the Spatz runtime once it waits for work,
//                      cleared by it after the first task
//   0x08 SPATZ_START   host writes 1; bit 0 is the Snitch machine external
//                      interrupt; Snitch writes 0 to acknowledge
//   0x0C SPATZ_TASKBIN task (or, at boot, runtime) entry address
//   0x10 SPATZ_DATA    pointer to the task parameters in L1
//   0x14 SPATZ_RETURN  task exit code (0 ok, 1-255 task error, 0x100-0x1FF trap)
//   0x18 SPATZ_DONE    writing 1 emits a one-cycle done_o pulse; reads 0
// The first six hold their value until overwritten. Writes honour byte enables,
// reads and writes are answered one cycle after the (immediate) grant, unknown
// offsets read 0 and ignore writes. Register set and behaviour are as
// published; reset values (all 0) and the byte-enable handling are this design's
// choice. start_o (= SPATZ_START bit 0) also feeds the Event Unit start event.
module spatz_ctrl_regs
  import magia_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  obi_req_t req_i,
  output obi_rsp_t rsp_o,
  output logic     clk_en_o,
  output logic     irq_o,
  output logic     start_o,
  output logic     done_o
);
  typedef enum logic [2:0] {
    R_CLK_EN = 3'd0, R_READY = 3'd1, R_START = 3'd2, R_TASKBIN = 3'd3,
    R_DATA = 3'd4, R_RETURN = 3'd5, R_DONE = 3'd6
  } reg_e;

  logic [31:0] regs_q [6];
  logic        done_q, rvalid_q;
  logic [31:0] rdata_q;
  logic [IDW-1:0] rid_q;
  logic        in_range;
  logic [2:0]  idx;

  assign in_range = (req_i.addr[7:0] < 8'h1C) && (req_i.addr[1:0] == 2'b00);
  assign idx      = req_i.addr[4:2];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < 6; i++) regs_q[i] <= '0;
      done_q <= 1'b0; rvalid_q <= 1'b0; rdata_q <= '0; rid_q <= '0;
    end else begin
      done_q   <= 1'b0;
      rvalid_q <= req_i.req;
      rid_q    <= req_i.aid;
      rdata_q  <= '0;
      if (req_i.req && in_range) begin
        if (req_i.we) begin
          if (reg_e'(idx) == R_DONE) done_q <= req_i.wdata[0] & req_i.be[0];
          else regs_q[idx] <= be_merge(regs_q[idx], req_i.wdata, req_i.be);
        end else if (reg_e'(idx) != R_DONE) begin
          rdata_q <= regs_q[idx];
        end
      end
    end
  end

  assign rsp_o    = '{gnt: req_i.req, rvalid: rvalid_q, rdata: rdata_q, err: 1'b0, rid: rid_q};
  assign clk_en_o = regs_q[R_CLK_EN][0];
  assign start_o  = regs_q[R_START][0];
  assign irq_o    = regs_q[R_START][0];
  assign done_o   = done_q;
endmodule
