`timescale 1ns/1ps
// tb_idma_obi_ctrl_decoder: self-checking testbench of idma_obi_ctrl_decoder.
// Two behavioural channel register files behind the decoder answer with their channel number and offset; accesses to 0x200.. and 0x400.. must reach the right one.
module tb_idma_obi_ctrl_decoder;
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

  obi_req_t ch_req [2];
  obi_rsp_t ch_rsp [2];
  int hits [2];
  idma_obi_ctrl_decoder dut (.req_i(req), .rsp_o(rsp), .ch_req_o(ch_req), .ch_rsp_i(ch_rsp));
  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic rv; logic [31:0] rd; logic [3:0] rid;
    logic [31:0] mem [128];
    assign ch_rsp[c] = '{gnt: ch_req[c].req, rvalid: rv, rdata: rd, err: 1'b0, rid: rid};
    always @(posedge clk) begin
      rv <= ch_req[c].req; rid <= ch_req[c].aid; rd <= '0;
      if (ch_req[c].req) begin
        hits[c]++;
        if (ch_req[c].addr[31:9] != 0) begin failures++; $display("FAIL offset not stripped"); end
        if (ch_req[c].we) mem[ch_req[c].addr[8:2]] <= ch_req[c].wdata;
        else rd <= mem[ch_req[c].addr[8:2]] ^ {c[7:0], 24'd0};
      end
    end
  end
  initial begin
    req = '0; hits[0] = 0; hits[1] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      wr(32'h200 + i*4, 32'h1000 + i);
      wr(32'h400 + i*4, 32'h2000 + i);
    end
    chk("ch0 writes", hits[0], 16);
    chk("ch1 writes", hits[1], 16);
    for (int i = 0; i < 16; i++) begin
      rdchk("ch0 read", 32'h200 + i*4, 32'h1000 + i);
      rdchk("ch1 read", 32'h400 + i*4, 32'h0100_2000 + i);
    end
    wr(32'h2D0, 32'hCAFE);
    wr(32'h4D0, 32'hBEEF);
    rdchk("ch0 high offset", 32'h2D0, 32'hCAFE);
    rdchk("ch1 high offset", 32'h4D0, 32'h0100_BEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
