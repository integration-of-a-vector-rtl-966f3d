`timescale 1ns/1ps
// tb_core_data_demux_eu_direct: self-checking testbench of the core data demux.
// A pipelined core model issues random accesses without waiting for answers;
// a crossbar model (random grant stalls, answer one cycle after the grant) and
// an Event Unit direct-link model (answer 1-4 cycles after the grant) return
// address-dependent data. Checked: each access reaches the side its address
// names, with wen = !we on the direct link, answers come back in issue order
// with the right data, and a switch of side waits for the outstanding answer.
module tb_core_data_demux_eu_direct;
  import magia_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;
  int checks = 0, failures = 0, holds = 0, n_eu = 0, n_x = 0;
  obi_req_t creq, xreq;
  obi_rsp_t crsp, xrsp;
  logic dl_req, dl_wen, dl_gnt, dl_rv;
  logic [31:0] dl_add, dl_wd, dl_rd;
  logic [3:0] dl_be;

  core_data_demux_eu_direct dut (.clk_i(clk), .rst_ni(rst_n), .core_req_i(creq), .core_rsp_o(crsp),
    .xbar_req_o(xreq), .xbar_rsp_i(xrsp), .dl_req_o(dl_req), .dl_add_o(dl_add), .dl_wen_o(dl_wen),
    .dl_wdata_o(dl_wd), .dl_be_o(dl_be), .dl_gnt_i(dl_gnt), .dl_r_valid_i(dl_rv), .dl_r_rdata_i(dl_rd));

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] hash(logic [31:0] a); return a * 32'h0101_0F0F + 32'h55; endfunction
  function automatic bit is_eu(logic [31:0] a); return a >= 32'h700 && a <= 32'h16FF; endfunction

  // crossbar model
  logic xstall, xrv_q; logic [31:0] xrd_q;
  always @(negedge clk) xstall = ($urandom_range(0, 2) == 0);
  assign xrsp = '{gnt: xreq.req && !xstall, rvalid: xrv_q, rdata: xrd_q, err: 1'b0, rid: '0};
  always @(posedge clk) begin
    xrv_q <= xreq.req && !xstall;
    xrd_q <= hash(xreq.addr) ^ 32'h1;
    if (xreq.req && !xstall) begin
      n_x++;
      checks++; if (is_eu(xreq.addr)) begin failures++; $display("FAIL EU address %h sent to crossbar", xreq.addr); end
    end
  end
  // direct link model: one access in flight, answered after 1-4 cycles
  int dl_cnt; logic dl_busy; logic [31:0] dl_data;
  assign dl_gnt = dl_req && !dl_busy;
  always @(posedge clk) begin
    dl_rv <= 1'b0;
    if (dl_busy) begin
      dl_cnt--;
      if (dl_cnt == 0) begin dl_busy <= 1'b0; dl_rv <= 1'b1; dl_rd <= dl_data; end
    end
    if (dl_gnt) begin
      n_eu++;
      checks++;
      if (!is_eu(dl_add) || dl_wen != !creq.we) begin failures++; $display("FAIL direct link got %h wen %0d", dl_add, dl_wen); end
      dl_busy <= 1'b1; dl_cnt = $urandom_range(1, 4); dl_data <= hash(dl_add) ^ 32'h2;
      if (dl_cnt == 0) dl_cnt = 1;
    end
  end
  always @(posedge clk) if (creq.req && !crsp.gnt && !(is_eu(creq.addr) ? dl_busy : xstall)) holds++;

  // core model with an in-order expectation queue
  logic [31:0] expq [$];
  always @(posedge clk) if (rst_n && crsp.rvalid) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL answer without access"); end
    else begin
      logic [31:0] e; e = expq.pop_front();
      if (crsp.rdata !== e) begin failures++; $display("FAIL answer %h expected %h", crsp.rdata, e); end
    end
  end

  initial begin
    creq = '0; dl_busy = 0; dl_cnt = 0; xrv_q = 0; dl_rv = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 600; k++) begin
      logic [31:0] a;
      a = ($urandom_range(0, 1) == 1) ? 32'h700 + 4*$urandom_range(0, 1023) : 32'h0002_0000 + 4*$urandom_range(0, 4095);
      creq = '{req: 1'b1, addr: a, we: 1'b0, be: 4'hF, wdata: '0, aid: '0};
      #1;
      while (!crsp.gnt) begin @(negedge clk); #1; end
      expq.push_back(hash(a) ^ (is_eu(a) ? 32'h2 : 32'h1));
      @(negedge clk);
    end
    creq.req = 1'b0;
    repeat (10) @(negedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d answers missing", expq.size()); end
    checks++; if (holds == 0) begin failures++; $display("FAIL side switch never held"); end
    $display("INFO eu=%0d xbar=%0d holds=%0d", n_eu, n_x, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
