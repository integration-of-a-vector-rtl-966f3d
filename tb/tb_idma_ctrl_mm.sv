`timescale 1ns/1ps
// tb_idma_ctrl_mm: self-checking testbench of idma_ctrl_mm.
// Writes descriptors, submits them through NEXT_ID, checks the job handed to the back end, the back-pressure on a full queue, DONE_ID, STATUS and the status lines.
module tb_idma_ctrl_mm;
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

  idma_job_t job;
  logic jv, jr, done_i, err_i, busy, st, dn, er;
  int starts = 0, dones = 0, errs = 0, stalls = 0;
  idma_ctrl_mm dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp), .job_o(job),
    .job_valid_o(jv), .job_ready_i(jr), .done_i(done_i), .error_i(err_i),
    .irq_busy_o(busy), .irq_start_o(st), .irq_done_o(dn), .irq_error_o(er));
  always @(posedge clk) begin
    if (st) starts++;
    if (dn) dones++;
    if (er) errs++;
    if (req.req && !rsp.gnt) stalls++;
  end
  initial begin
    req = '0; jr = 0; done_i = 0; err_i = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    rdchk("STATUS idle", 32'h204, 0);
    rdchk("DONE_ID initial", 32'h284, 0);
    wr(32'h2D0, 32'h0002_0000); wr(32'h2D8, 32'hC000_1000); wr(32'h2E0, 32'd4096);
    wr(32'h2E8, 32'd128); wr(32'h2F0, 32'd256); wr(32'h2F8, 32'd8);
    wr(32'h300, 32'd1); wr(32'h308, 32'd2); wr(32'h310, 32'd3); wr(32'h200, 32'h1);
    rdchk("LENGTH readback", 32'h2E0, 32'd4096);
    rdchk("NEXT_ID first", 32'h244, 32'd1);
    chk("job valid", {31'd0, jv}, 1);
    chk("job id", job.id, 1);
    chk("job src", job.src_addr, 32'hC000_1000);
    chk("job dst", job.dst_addr, 32'h0002_0000);
    chk("job len", job.length, 4096);
    chk("job reps2", job.reps_2, 8);
    chk("job reps3", job.reps_3, 3);
    chk("start line", starts, 1);
    rdchk("STATUS busy", 32'h204, 1);
    // second submission while the first is still queued: stalls until accepted
    fork
      rdchk("NEXT_ID second", 32'h244, 32'd2);
      begin repeat (6) @(posedge clk); @(negedge clk); jr = 1; @(negedge clk); jr = 0; end
    join
    chk("stalled while queue full", {31'd0, stalls >= 4}, 1);
    @(negedge clk); jr = 1; @(negedge clk); jr = 0;
    chk("queue drained", {31'd0, jv}, 0);
    @(negedge clk); done_i = 1; @(negedge clk); done_i = 0;
    rdchk("DONE_ID one", 32'h284, 1);
    rdchk("STATUS still busy", 32'h204, 1);
    @(negedge clk); done_i = 1; err_i = 1; @(negedge clk); done_i = 0; err_i = 0;
    rdchk("DONE_ID two", 32'h284, 2);
    rdchk("STATUS idle again", 32'h204, 0);
    chk("done lines", dones, 2);
    chk("error line", errs, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
