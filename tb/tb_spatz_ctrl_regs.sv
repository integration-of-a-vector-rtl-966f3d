`timescale 1ns/1ps
// tb_spatz_ctrl_regs: self-checking testbench of spatz_ctrl_regs.
// Runs the host/Spatz protocol on the seven registers: clock enable, ready flag, start interrupt and its acknowledge, task address and data pointer, return code and the one-cycle done pulse.
module tb_spatz_ctrl_regs;
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

  logic clk_en, irq, start, done;
  int done_pulses = 0;
  spatz_ctrl_regs dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp),
                       .clk_en_o(clk_en), .irq_o(irq), .start_o(start), .done_o(done));
  always @(posedge clk) if (done) done_pulses++;

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    chk("clk_en after reset", {31'd0, clk_en}, 0);
    // host: runtime entry, clock on
    wr(32'h170C, 32'h8000_0100);
    wr(32'h1700, 32'h1);
    @(negedge clk); chk("clk_en on", {31'd0, clk_en}, 1);
    rdchk("TASKBIN", 32'h170C, 32'h8000_0100);
    // Spatz runtime: ready
    wr(32'h1704, 32'h1);
    rdchk("READY", 32'h1704, 32'h1);
    // host: task, data pointer, start
    wr(32'h170C, 32'h0002_4000);
    wr(32'h1710, 32'h0003_0000);
    chk("irq low before start", {31'd0, irq}, 0);
    wr(32'h1708, 32'h1);
    @(negedge clk); chk("irq raised by START", {31'd0, irq}, 1);
    chk("start event line", {31'd0, start}, 1);
    // Spatz: acknowledge, clear ready, run, return, done
    wr(32'h1708, 32'h0);
    @(negedge clk); chk("irq cleared by ack", {31'd0, irq}, 0);
    wr(32'h1704, 32'h0);
    rdchk("DATA", 32'h1710, 32'h0003_0000);
    wr(32'h1714, 32'h0000_0105);
    chk("no done before write", done_pulses, 0);
    wr(32'h1718, 32'h1);
    repeat (3) @(posedge clk);
    chk("exactly one done pulse", done_pulses, 1);
    rdchk("DONE reads 0", 32'h1718, 32'h0);
    rdchk("RETURN kept", 32'h1714, 32'h0000_0105);
    // byte-enable write
    begin logic [31:0] x; access(32'h1710, 1'b1, 32'hAABB_CCDD, 4'b0010, x); end
    rdchk("DATA byte lane 1", 32'h1710, 32'h0003_CC00);
    wr(32'h1700, 32'h0);
    @(negedge clk); chk("clk_en off", {31'd0, clk_en}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
