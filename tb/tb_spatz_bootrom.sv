`timescale 1ns/1ps
// tb_spatz_bootrom: self-checking testbench of spatz_bootrom.
// Reads the boot ROM and decodes the three instructions field by field: they must build 0x170C (SPATZ_TASKBIN), load it and jump to the loaded value.
module tb_spatz_bootrom;
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

  spatz_bootrom dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));
  logic [31:0] w0, w1, w2, w3;
  logic [31:0] t0, target;
  initial begin
    req = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    access(32'h1000_0000, 0, 0, 4'hF, w0);
    access(32'h1000_0004, 0, 0, 4'hF, w1);
    access(32'h1000_0008, 0, 0, 4'hF, w2);
    access(32'h1000_000C, 0, 0, 4'hF, w3);
    // w0: lui rd, imm
    chk("w0 opcode LUI", {25'd0, w0[6:0]}, 32'h37);
    t0 = {w0[31:12], 12'd0};
    // w1: lw rd1, imm(rs1 = rd of w0)
    chk("w1 opcode LOAD", {25'd0, w1[6:0]}, 32'h03);
    chk("w1 funct3 word", {29'd0, w1[14:12]}, 2);
    chk("w1 base is lui rd", {27'd0, w1[19:15]}, {27'd0, w0[11:7]});
    chk("address of SPATZ_TASKBIN", t0 + {{20{w1[31]}}, w1[31:20]}, 32'h0000_170C);
    // w2: jalr x0, 0(rd1)
    chk("w2 opcode JALR", {25'd0, w2[6:0]}, 32'h67);
    chk("w2 rd x0", {27'd0, w2[11:7]}, 0);
    chk("w2 rs1 is loaded reg", {27'd0, w2[19:15]}, {27'd0, w1[11:7]});
    chk("w2 offset 0", {20'd0, w2[31:20]}, 0);
    chk("w1 rd not x0", {31'd0, w1[11:7] != 0}, 1);
    chk("unused word", w3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
