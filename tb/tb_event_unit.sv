`timescale 1ns/1ps
// tb_event_unit: self-checking testbench of event_unit.
// Checks edge capture and latching of events, both masks, W1C clearing, the interrupt, and the event wait through the direct link: immediate answer, sleep with the core clock disabled until an enabled event, and wait-and-clear.
module tb_event_unit;
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

  logic [31:0] evt;
  logic dl_req, dl_wen, dl_gnt, dl_rv, cken, irq;
  logic [31:0] dl_add, dl_wd, dl_rd;
  int sleep_cycles = 0;
  event_unit dut (.clk_i(clk), .rst_ni(rst_n), .evt_i(evt), .periph_req_i(req), .periph_rsp_o(rsp),
    .dl_req_i(dl_req), .dl_add_i(dl_add), .dl_wen_i(dl_wen), .dl_wdata_i(dl_wd), .dl_be_i(4'hF),
    .dl_gnt_o(dl_gnt), .dl_r_valid_o(dl_rv), .dl_r_rdata_o(dl_rd),
    .core_clock_en_o(cken), .irq_o(irq));
  always @(posedge clk) if (!cken) sleep_cycles++;

  task automatic pulse(int bitn);
    @(negedge clk); evt[bitn] = 1'b1; @(negedge clk); evt[bitn] = 1'b0;
  endtask
  // direct-link read; returns data and the number of cycles from grant to r_valid
  task automatic dl_read(logic [31:0] a, output logic [31:0] d, output int lat);
    @(negedge clk); dl_req = 1; dl_add = a; dl_wen = 1; #1;
    while (!dl_gnt) begin @(negedge clk); #1; end
    @(posedge clk); @(negedge clk); dl_req = 0;
    lat = 1;
    while (!dl_rv && lat < 200) begin @(negedge clk); lat++; end
    d = dl_rd;
  endtask

  initial begin
    logic [31:0] d; int lat;
    req = '0; evt = '0; dl_req = 0; dl_add = 0; dl_wen = 1; dl_wd = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    pulse(10);
    rdchk("buffer latched", 32'h71C, 32'h400);
    rdchk("masked hidden", 32'h720, 32'h0);
    // a level that stays high is captured once
    @(negedge clk); evt[3] = 1; repeat (4) @(negedge clk);
    rdchk("level captured", 32'h71C, 32'h408);
    wr(32'h728, 32'h8);
    rdchk("W1C cleared bit 3 only", 32'h71C, 32'h400);
    @(negedge clk); evt[3] = 0;
    wr(32'h700, 32'h0000_0504);
    rdchk("mask readback", 32'h700, 32'h504);
    rdchk("masked buffer", 32'h720, 32'h400);
    chk("no irq without irq mask", {31'd0, irq}, 0);
    wr(32'h70C, 32'h400);
    @(negedge clk); chk("irq", {31'd0, irq}, 1);
    rdchk("irq masked buffer", 32'h724, 32'h400);
    wr(32'h728, 32'hFFFF_FFFF);
    @(negedge clk); chk("irq gone", {31'd0, irq}, 0);
    // wait with event already pending: answers in one cycle, no sleep
    pulse(8);
    dl_read(32'h738, d, lat);
    chk("wait data", d, 32'h100);
    chk("wait latency", lat, 1);
    chk("no sleep", sleep_cycles, 0);
    // wait with nothing pending: sleeps until event 2 arrives 20 cycles later
    wr(32'h728, 32'hFFFF_FFFF);
    fork
      dl_read(32'h73C, d, lat);
      begin repeat (20) @(negedge clk); chk("clock gated while waiting", {31'd0, cken}, 0); pulse(31); repeat(3) @(negedge clk);
        // enabled event: the clock must be back after the very next clock edge
        @(negedge clk); evt[2] = 1'b1; chk("still gated before the edge", {31'd0, cken}, 0);
        @(negedge clk); chk("wake latency one cycle", {31'd0, cken}, 1); evt[2] = 1'b0; end
    join
    chk("wake data (masked)", d, 32'h4);
    chk("slept", {31'd0, sleep_cycles >= 20}, 1);
    chk("clock back", {31'd0, cken}, 1);
    rdchk("wait-clear cleared the masked bit", 32'h71C, 32'h8000_0000);
    // event edge coinciding with a clear survives
    @(negedge clk); evt[9] = 1;
    req = '{req: 1'b1, addr: 32'h728, we: 1'b1, be: 4'hF, wdata: 32'h200, aid: 4'd3};
    @(negedge clk); req.req = 0; evt[9] = 0;
    begin logic [31:0] x; access(32'h71C, 0, 0, 4'hF, x); chk("bit 9 kept", x & 32'h200, 32'h200); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
