`timescale 1ns/1ps
// tb_redmule_ctrl_regs: self-checking testbench of redmule_ctrl_regs.
// Walks the acquire / configure / trigger / poll protocol, the lock, the event enable, completion and soft clear.
module tb_redmule_ctrl_regs;
  import magia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  int checks = 0, failures = 0;
  obi_req_t req;
  obi_rsp_t rsp;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one OBI access: request at a falling edge, wait for the grant, return the
  // data of the response that must follow one cycle after the grant
  task automatic access(input logic [31:0] a, input logic we, input logic [31:0] d,
                        input logic [3:0] be, output logic [31:0] rd);
    int n;
    @(negedge clk);
    req = '{req: 1'b1, addr: a, we: we, be: be, wdata: d, aid: 4'd3};
    #1;
    n = 0;
    while (!rsp.gnt && n < 50) begin @(negedge clk); #1; n++; end
    @(posedge clk);
    @(negedge clk);
    req.req = 1'b0;
    checks++;
    if (!rsp.rvalid || rsp.rid != 4'd3) begin
      failures++;
      $display("FAIL no response one cycle after grant at %h", a);
    end
    rd = rsp.rdata;
    @(negedge clk);   // let one-cycle side effects (pulses) be counted
  endtask
  task automatic wr(logic [31:0] a, logic [31:0] d);
    logic [31:0] x;
    access(a, 1'b1, d, 4'hF, x);
  endtask
  task automatic rdchk(string what, logic [31:0] a, logic [31:0] exp);
    logic [31:0] x;
    access(a, 1'b0, '0, 4'hF, x);
    chk(what, x, exp);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  redmule_cfg_t cfg;
  logic start, sclr, done_i, eevt;
  logic [2:0] evt;
  int starts = 0, clears = 0, done_evts = 0;
  redmule_ctrl_regs dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp), .cfg_o(cfg),
    .start_o(start), .soft_clear_o(sclr), .done_i(done_i), .engine_evt_i(eevt), .evt_o(evt));
  always @(posedge clk) begin
    if (start) starts++;
    if (sclr) clears++;
    if (evt[1]) done_evts++;
  end
  initial begin
    req = '0; done_i = 0; eevt = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wr(32'h100, 32'h1);                      // trigger without lock: ignored
    chk("no start without lock", starts, 0);
    rdchk("ACQUIRE free", 32'h104, 32'h0);
    rdchk("ACQUIRE locked", 32'h104, 32'hFFFF_FFFF);
    wr(32'h108, 32'h1);
    wr(32'h140, 32'h0002_0000); wr(32'h144, 32'h0002_4800); wr(32'h148, 32'h0002_9000);
    wr(32'h14C, (32'd96 << 16) | 32'd96); wr(32'h150, 32'd96); wr(32'h154, 32'h4);
    chk("cfg x", cfg.x_ptr, 32'h0002_0000);
    chk("cfg w", cfg.w_ptr, 32'h0002_4800);
    chk("cfg z", cfg.z_ptr, 32'h0002_9000);
    chk("cfg mk", cfg.mcfg0, 32'h0060_0060);
    chk("cfg n", cfg.mcfg1, 32'd96);
    rdchk("ARITH readback", 32'h154, 32'h4);
    rdchk("STATUS idle", 32'h10C, 32'h0);
    rdchk("RUNNING_JOB idle", 32'h110, 32'hFFFF_FFFF);
    wr(32'h100, 32'h1);
    chk("one start", starts, 1);
    rdchk("STATUS busy", 32'h10C, 32'h1);
    rdchk("RUNNING_JOB", 32'h110, 32'h0);
    chk("busy event", {29'd0, evt}, 3'b001);
    @(negedge clk); done_i = 1; @(negedge clk); done_i = 0;
    @(negedge clk);
    rdchk("STATUS idle after done", 32'h10C, 32'h0);
    chk("done event", done_evts, 1);
    rdchk("ACQUIRE again", 32'h104, 32'h0);
    wr(32'h114, 32'h1);
    chk("soft clear pulse", clears, 1);
    chk("cfg cleared", cfg.x_ptr, 32'h0);
    rdchk("ACQUIRE after clear", 32'h104, 32'h0);
    @(negedge clk); eevt = 1; #1;
    chk("events off after clear", {29'd0, evt}, 3'b000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
