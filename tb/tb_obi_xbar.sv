`timescale 1ns/1ps
// tb_obi_xbar: self-checking testbench of obi_xbar (tile 2 of a mesh).
// Three masters issue random reads and writes over the whole tile map; seven
// behavioural memory slaves (the L2 one with random grant stalls) answer one
// cycle after the grant. Checked: every access reaches the slave the address
// map names (decoded here independently), read data and error flags return to
// the right master, the guard and reserved ranges answer with err, the L1
// window moves with the tile id, and masters contending for one slave are all
// served.
module tb_obi_xbar;
  import magia_pkg::*;
  localparam int NM = 3;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;
  int checks = 0, failures = 0, contention = 0, errs_seen = 0;
  int hits [8];
  obi_req_t mreq [NM];
  obi_rsp_t mrsp [NM];
  obi_req_t sreq [7];
  obi_rsp_t srsp [7];
  logic [NM-1:0] done_m;

  obi_xbar #(.NM(NM)) dut (.clk_i(clk), .rst_ni(rst_n), .tile_id_i(8'd2),
    .mst_req_i(mreq), .mst_rsp_o(mrsp), .slv_req_o(sreq), .slv_rsp_i(srsp));

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // independent decode: 0 L1, 1 RedMulE, 2 iDMA, 3 FSync, 4 EU, 5 Spatz, 6 L2, 7 error
  function automatic int expect_slave(logic [31:0] a);
    if (a <= 32'h0000_00FF) return 7;
    if (a <= 32'h0000_01FF) return 1;
    if (a <= 32'h0000_05FF) return 2;
    if (a <= 32'h0000_06FF) return 3;
    if (a <= 32'h0000_16FF) return 4;
    if (a <= 32'h0000_17FF) return 5;
    if (a <= 32'h0000_FFFF) return 7;
    if (a >= 32'h0021_0000 && a <= 32'h002F_FFFF) return 0;
    return 6;
  endfunction
  function automatic logic [31:0] hash(logic [31:0] a); return a * 32'h9E37_79B1 + 32'h1234; endfunction

  // behavioural slaves: memories that answer one cycle after the grant
  logic [31:0] smem [logic [31:0]];
  for (genvar s = 0; s < 7; s++) begin : g_s
    logic rv; logic [31:0] rd; logic [3:0] rid; logic stall;
    always @(negedge clk) stall = (s == 6) ? ($urandom_range(0, 2) == 0) : 1'b0;
    assign srsp[s] = '{gnt: sreq[s].req && !stall, rvalid: rv, rdata: rd, err: 1'b0, rid: rid};
    always @(posedge clk) begin
      rv <= 1'b0;
      if (sreq[s].req && !stall) begin
        hits[s]++;
        if (expect_slave(sreq[s].addr) != s) begin
          failures++; $display("FAIL addr %h reached slave %0d", sreq[s].addr, s);
        end
        rv <= 1'b1; rid <= sreq[s].aid;
        if (sreq[s].we) smem[sreq[s].addr] = sreq[s].wdata;
        else rd <= smem.exists(sreq[s].addr) ? smem[sreq[s].addr] : hash(sreq[s].addr);
      end
    end
  end

  always @(posedge clk) begin
    int n = 0;
    for (int m = 0; m < NM; m++) if (mreq[m].req && !mrsp[m].gnt) n++;
    if (n > 0) contention++;
  end

  function automatic logic [31:0] rand_addr(int m);
    logic [31:0] a;
    int sel;
    sel = $urandom_range(0, 9);
    case (sel)
      0: a = 32'h0000_0000 + $urandom_range(0, 32'hFF);
      1: a = 32'h0000_0100 + $urandom_range(0, 32'hFF);
      2: a = 32'h0000_0200 + $urandom_range(0, 32'h3FF);
      3: a = 32'h0000_0600 + $urandom_range(0, 32'hFF);
      4: a = 32'h0000_0700 + $urandom_range(0, 32'hFFF);
      5: a = 32'h0000_1700 + $urandom_range(0, 32'hFF);
      6: a = 32'h0000_1800 + $urandom_range(0, 32'hE7FF);
      7: a = 32'h0021_0000 + $urandom_range(0, 32'hEFFFF);
      8: a = 32'h0011_0000 + $urandom_range(0, 32'hEFFFF);
      default: a = 32'hC000_0000 + $urandom_range(0, 32'hFFFFF);
    endcase
    return {a[31:4], 2'(m), 2'b00};
  endfunction

  for (genvar m = 0; m < NM; m++) begin : g_m
    logic [31:0] ref_m [logic [31:0]];
    initial begin
      mreq[m] = '0; done_m[m] = 1'b0;
      @(posedge rst_n);
      for (int k = 0; k < 400; k++) begin
        logic [31:0] a, exp; logic we; int sl, n;
        a = rand_addr(m); we = $urandom_range(0, 1); sl = expect_slave(a);
        @(negedge clk);
        mreq[m] = '{req: 1'b1, addr: a, we: we, be: 4'hF, wdata: $urandom, aid: 4'hF};
        exp = ref_m.exists(a) ? ref_m[a] : hash(a);
        #1; n = 0;
        while (!mrsp[m].gnt && n < 100) begin @(negedge clk); #1; n++; end
        if (we && sl != 7) ref_m[a] = mreq[m].wdata;
        @(negedge clk);
        mreq[m].req = 1'b0;
        n = 0;
        while (!mrsp[m].rvalid && n < 100) begin @(negedge clk); n++; end
        checks++;
        if (sl == 7) begin
          errs_seen++;
          if (!mrsp[m].err || mrsp[m].rdata != 0) begin failures++; $display("FAIL no error for %h", a); end
        end else if (mrsp[m].err) begin
          failures++; $display("FAIL unexpected error for %h", a);
        end else if (!we && mrsp[m].rdata !== exp) begin
          failures++; $display("FAIL master %0d read %h: %h expected %h", m, a, mrsp[m].rdata, exp);
        end
      end
      done_m[m] = 1'b1;
    end
  end

  initial begin
    for (int s = 0; s < 8; s++) hits[s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&done_m);
    for (int s = 0; s < 7; s++) begin
      checks++;
      if (hits[s] == 0) begin failures++; $display("FAIL slave %0d never reached", s); end
    end
    checks++; if (errs_seen == 0) begin failures++; $display("FAIL no error access"); end
    checks++; if (contention == 0) begin failures++; $display("FAIL no contention"); end
    $display("INFO contention_cycles=%0d error_accesses=%0d", contention, errs_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
