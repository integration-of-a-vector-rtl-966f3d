`timescale 1ns/1ps
// tb_obi_slave_fsync: self-checking testbench of obi_slave_fsync.
// Programs a barrier, checks the request pulse, the busy bit 2 of STATUS_REG and the done/error events, and that a trigger while busy is ignored.
module tb_obi_slave_fsync;
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

  logic sreq, done_i, err_i, done_o, err_o;
  logic [31:0] aggr, id;
  int reqs = 0, dones = 0, errs = 0;
  obi_slave_fsync dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp),
    .sync_req_o(sreq), .aggr_o(aggr), .id_o(id), .done_i(done_i), .error_i(err_i),
    .done_o(done_o), .error_o(err_o));
  always @(posedge clk) begin
    if (sreq) begin reqs++; chk("aggr at request", aggr, 32'd3); end
    if (done_o) dones++;
    if (err_o) errs++;
  end
  initial begin
    req = '0; done_i = 0; err_i = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wr(32'h600, 32'd3);
    wr(32'h604, 32'h55);
    rdchk("ID_REG", 32'h604, 32'h55);
    rdchk("idle status", 32'h60C, 32'h0);
    wr(32'h608, 32'h1);
    rdchk("busy bit 2", 32'h60C, 32'h4);
    wr(32'h608, 32'h1);            // ignored while busy
    chk("one request", reqs, 1);
    @(negedge clk); done_i = 1; @(negedge clk); done_i = 0;
    rdchk("idle after done", 32'h60C, 32'h0);
    chk("done event", dones, 1);
    wr(32'h608, 32'h1);
    chk("second request", reqs, 2);
    @(negedge clk); err_i = 1; @(negedge clk); err_i = 0;
    rdchk("idle after error", 32'h60C, 32'h0);
    chk("error event", errs, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
