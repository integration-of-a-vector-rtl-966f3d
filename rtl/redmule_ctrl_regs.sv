// redmule_ctrl_regs: memory-mapped control of the RedMulE GEMM engine.
//
// The register file that RedMulE exposes in HWPE-CTRL mode, decoded directly
// from an OBI slave port (the OBI-to-HWPE-CTRL conversion is folded in: grant
// at once, answer one cycle later with the request's id). Offsets:
//   0x00 TRIGGER      W  start the configured job (only when acquired, not running)
//   0x04 ACQUIRE      R  0 (the job id) and take the lock if free, else -1
//   0x08 EVT_ENABLE   W  bit 0 enables the event lines towards the Event Unit
//   0x0C STATUS       R  0 = idle, 1 = a job is running
//   0x10 RUNNING_JOB  R  job id (0) while running, else -1
//   0x14 SOFT_CLEAR   W  drop lock, running job, configuration; pulse soft_clear_o
//   0x40 X_PTR, 0x44 W_PTR, 0x48 Z_PTR, 0x4C MCFG0 (M,K), 0x50 MCFG1 (N),
//   0x54 ARITH        RW job configuration, presented on cfg_o
// TRIGGER emits a one-cycle start_o; the engine's done_i ends the job and
// releases the lock. evt_o[0] = busy, evt_o[1] = done, evt_o[2] = engine
// secondary event, all gated by EVT_ENABLE. The single job context (job id
// always 0) and the lock release on completion are this design's choices; the
// register map, lock protocol and status semantics are published.
module redmule_ctrl_regs
  import magia_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  input  obi_req_t     req_i,
  output obi_rsp_t     rsp_o,
  output redmule_cfg_t cfg_o,
  output logic         start_o,
  output logic         soft_clear_o,
  input  logic         done_i,
  input  logic         engine_evt_i,
  output logic [2:0]   evt_o
);
  redmule_cfg_t cfg_q;
  logic locked_q, running_q, evt_en_q, start_q, clear_q, rvalid_q, done_q;
  logic [31:0] rdata_q;
  logic [IDW-1:0] rid_q;
  logic [7:0] off;
  logic rd, wr;
  assign off = req_i.addr[7:0];
  assign rd  = req_i.req && !req_i.we;
  assign wr  = req_i.req &&  req_i.we;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cfg_q <= '0; locked_q <= 1'b0; running_q <= 1'b0; evt_en_q <= 1'b0;
      start_q <= 1'b0; clear_q <= 1'b0; rvalid_q <= 1'b0; rdata_q <= '0; rid_q <= '0;
      done_q <= 1'b0;
    end else begin
      start_q  <= 1'b0;
      clear_q  <= 1'b0;
      done_q   <= done_i && running_q;
      rvalid_q <= req_i.req;
      rid_q    <= req_i.aid;
      rdata_q  <= '0;
      if (done_i && running_q) begin
        running_q <= 1'b0;
        locked_q  <= 1'b0;
      end
      if (rd) begin
        unique case (off)
          8'h04: begin
            rdata_q <= locked_q ? '1 : '0;
            if (!locked_q) locked_q <= 1'b1;
          end
          8'h0C: rdata_q <= {31'd0, running_q};
          8'h10: rdata_q <= running_q ? '0 : '1;
          8'h40: rdata_q <= cfg_q.x_ptr;
          8'h44: rdata_q <= cfg_q.w_ptr;
          8'h48: rdata_q <= cfg_q.z_ptr;
          8'h4C: rdata_q <= cfg_q.mcfg0;
          8'h50: rdata_q <= cfg_q.mcfg1;
          8'h54: rdata_q <= cfg_q.arith;
          default: ;
        endcase
      end
      if (wr) begin
        unique case (off)
          8'h00: if (locked_q && !running_q) begin running_q <= 1'b1; start_q <= 1'b1; end
          8'h08: evt_en_q <= req_i.wdata[0];
          8'h14: begin
            locked_q <= 1'b0; running_q <= 1'b0; evt_en_q <= 1'b0;
            cfg_q <= '0; clear_q <= 1'b1;
          end
          8'h40: cfg_q.x_ptr <= be_merge(cfg_q.x_ptr, req_i.wdata, req_i.be);
          8'h44: cfg_q.w_ptr <= be_merge(cfg_q.w_ptr, req_i.wdata, req_i.be);
          8'h48: cfg_q.z_ptr <= be_merge(cfg_q.z_ptr, req_i.wdata, req_i.be);
          8'h4C: cfg_q.mcfg0 <= be_merge(cfg_q.mcfg0, req_i.wdata, req_i.be);
          8'h50: cfg_q.mcfg1 <= be_merge(cfg_q.mcfg1, req_i.wdata, req_i.be);
          8'h54: cfg_q.arith <= be_merge(cfg_q.arith, req_i.wdata, req_i.be);
          default: ;
        endcase
      end
    end
  end

  assign rsp_o        = '{gnt: req_i.req, rvalid: rvalid_q, rdata: rdata_q, err: 1'b0, rid: rid_q};
  assign cfg_o        = cfg_q;
  assign start_o      = start_q;
  assign soft_clear_o = clear_q;
  assign evt_o        = evt_en_q ? {engine_evt_i, done_q, running_q} : 3'b000;
endmodule
