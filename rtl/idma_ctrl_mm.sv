// idma_ctrl_mm: memory-mapped front end of one iDMA channel.
//
// Holds the transfer descriptor written by software and hands it to the DMA
// back end. Offsets (one 512 B window per channel):
//   0x00 CONF  0xD0 DST_ADDR  0xD8 SRC_ADDR  0xE0 LENGTH (bytes)
//   0xE8 DST_STRIDE_2  0xF0 SRC_STRIDE_2  0xF8 REPS_2
//   0x100 DST_STRIDE_3 0x108 SRC_STRIDE_3 0x110 REPS_3          (all RW)
//   0x04 STATUS  R  bit 0 = channel busy (a job queued or in flight)
//   0x44 NEXT_ID R  submits the descriptor and returns its transfer id
//   0x84 DONE_ID R  id of the last completed transfer
// Ids start at 1 and increase by one per submission; the back end completes
// jobs in order, one done_i pulse each, so DONE_ID counts completions. A
// submitted job waits in a one-entry output register (job_valid_o/job_ready_i
// handshake); a NEXT_ID read is not granted while that register is still full.
// Status lines: irq_busy_o (level), irq_start_o (one cycle per submission),
// irq_done_o (one cycle per completion), irq_error_o (one cycle per back-end
// error). Register map and id mechanism are published; id numbering, in-order
// completion and the one-entry queue are this design's choices.
module idma_ctrl_mm
  import magia_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_ni,
  input  obi_req_t  req_i,
  output obi_rsp_t  rsp_o,
  output idma_job_t job_o,
  output logic      job_valid_o,
  input  logic      job_ready_i,
  input  logic      done_i,
  input  logic      error_i,
  output logic      irq_busy_o,
  output logic      irq_start_o,
  output logic      irq_done_o,
  output logic      irq_error_o
);
  idma_job_t   d_q, job_q;
  logic [31:0] next_id_q, done_id_q, rdata_q;
  logic        job_valid_q, rvalid_q, start_q, done_q, error_q;
  logic [IDW-1:0] rid_q;
  logic [8:0]  off;
  logic        submit, gnt;

  assign off    = req_i.addr[8:0];
  assign submit = req_i.req && !req_i.we && off == 9'h044;
  assign gnt    = req_i.req && !(submit && job_valid_q && !job_ready_i);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      d_q <= '0; job_q <= '0; next_id_q <= 32'd1; done_id_q <= '0; rdata_q <= '0;
      job_valid_q <= 1'b0; rvalid_q <= 1'b0; start_q <= 1'b0; done_q <= 1'b0;
      error_q <= 1'b0; rid_q <= '0;
    end else begin
      rvalid_q <= gnt;
      rid_q    <= req_i.aid;
      rdata_q  <= '0;
      start_q  <= 1'b0;
      done_q   <= done_i;
      error_q  <= error_i;
      if (job_valid_q && job_ready_i) job_valid_q <= 1'b0;
      if (done_i) done_id_q <= done_id_q + 32'd1;
      if (gnt && req_i.we) begin
        unique case (off)
          9'h000: d_q.conf         <= be_merge(d_q.conf, req_i.wdata, req_i.be);
          9'h0D0: d_q.dst_addr     <= be_merge(d_q.dst_addr, req_i.wdata, req_i.be);
          9'h0D8: d_q.src_addr     <= be_merge(d_q.src_addr, req_i.wdata, req_i.be);
          9'h0E0: d_q.length       <= be_merge(d_q.length, req_i.wdata, req_i.be);
          9'h0E8: d_q.dst_stride_2 <= be_merge(d_q.dst_stride_2, req_i.wdata, req_i.be);
          9'h0F0: d_q.src_stride_2 <= be_merge(d_q.src_stride_2, req_i.wdata, req_i.be);
          9'h0F8: d_q.reps_2       <= be_merge(d_q.reps_2, req_i.wdata, req_i.be);
          9'h100: d_q.dst_stride_3 <= be_merge(d_q.dst_stride_3, req_i.wdata, req_i.be);
          9'h108: d_q.src_stride_3 <= be_merge(d_q.src_stride_3, req_i.wdata, req_i.be);
          9'h110: d_q.reps_3       <= be_merge(d_q.reps_3, req_i.wdata, req_i.be);
          default: ;
        endcase
      end else if (gnt) begin
        unique case (off)
          9'h000: rdata_q <= d_q.conf;
          9'h004: rdata_q <= {31'd0, irq_busy_o};
          9'h044: begin
            rdata_q     <= next_id_q;
            job_q       <= d_q;
            job_q.id    <= next_id_q;
            job_valid_q <= 1'b1;
            start_q     <= 1'b1;
            next_id_q   <= next_id_q + 32'd1;
          end
          9'h084: rdata_q <= done_id_q;
          9'h0D0: rdata_q <= d_q.dst_addr;
          9'h0D8: rdata_q <= d_q.src_addr;
          9'h0E0: rdata_q <= d_q.length;
          9'h0E8: rdata_q <= d_q.dst_stride_2;
          9'h0F0: rdata_q <= d_q.src_stride_2;
          9'h0F8: rdata_q <= d_q.reps_2;
          9'h100: rdata_q <= d_q.dst_stride_3;
          9'h108: rdata_q <= d_q.src_stride_3;
          9'h110: rdata_q <= d_q.reps_3;
          default: ;
        endcase
      end
    end
  end

  assign rsp_o       = '{gnt: gnt, rvalid: rvalid_q, rdata: rdata_q, err: 1'b0, rid: rid_q};
  assign job_o       = job_q;
  assign job_valid_o = job_valid_q;
  assign irq_busy_o  = job_valid_q || (next_id_q - 32'd1 != done_id_q);
  assign irq_start_o = start_q;
  assign irq_done_o  = done_q;
  assign irq_error_o = error_q;
endmodule
