`timescale 1ns/1ps
// tb_hci_interconnect: self-checking testbench of hci_interconnect (inside a
// small tcdm of 8 banks x 64 words, 6 masters).
// Every master issues random reads and writes; a reference memory is updated in
// grant order. Checked: read data and one-cycle latency, that a bank grants at
// most one master per cycle while different banks serve several masters at once,
// that the word interleaving puts consecutive words in consecutive banks, and
// that two masters hammering one bank are served alternately (round robin).
module tb_hci_interconnect;
  import magia_pkg::*;
  localparam int NM = 6, NB = 8, WORDS = 64;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;
  int checks = 0, failures = 0, conflicts = 0, parallel = 0;
  obi_req_t mreq [NM];
  obi_rsp_t mrsp [NM];
  logic [31:0] ref_mem [NB*WORDS];
  logic [31:0] expect_q [NM];
  logic [31:0] expmask_q [NM];
  logic [3:0]  known [NB*WORDS];
  logic [NM-1:0] done_m;
  logic        directed = 1'b0;
  int          rr_gnt [2];
  int          rr_last = -1, rr_alt = 0;
  logic        pend_rd [NM];

  tcdm #(.NM(NM), .NB(NB), .WORDS(WORDS)) dut (.clk_i(clk), .rst_ni(rst_n), .mst_req_i(mreq), .mst_rsp_o(mrsp));

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int bank_of(logic [31:0] a); return int'(a[4:2]); endfunction

  // reference bookkeeping at each rising edge (grant = handshake)
  always @(posedge clk) if (rst_n) begin
    int per_bank [NB];
    int ngr;
    for (int b = 0; b < NB; b++) per_bank[b] = 0;
    ngr = 0;
    // responses of the previous cycle's grants
    for (int m = 0; m < NM; m++) begin
      if (pend_rd[m]) begin
        checks++;
        if (!mrsp[m].rvalid || (mrsp[m].rdata & expmask_q[m]) !== (expect_q[m] & expmask_q[m])) begin
          failures++; $display("FAIL master %0d read %h expected %h (rvalid %0d)", m, mrsp[m].rdata, expect_q[m], mrsp[m].rvalid);
        end
      end
      pend_rd[m] <= 1'b0;
    end
    for (int m = 0; m < NM; m++) if (mreq[m].req && mrsp[m].gnt) begin
      int idx;
      per_bank[bank_of(mreq[m].addr)]++;
      ngr++;
      idx = int'(mreq[m].addr[10:2]);
      if (mreq[m].we) begin
        for (int b = 0; b < 4; b++) if (mreq[m].be[b]) begin
          ref_mem[idx][8*b +: 8] = mreq[m].wdata[8*b +: 8];
          known[idx][b] = 1'b1;
        end
      end else begin
        expect_q[m] <= ref_mem[idx];
        for (int b = 0; b < 4; b++) expmask_q[m][8*b +: 8] <= {8{known[idx][b]}};
        pend_rd[m]  <= 1'b1;
      end
    end
    for (int b = 0; b < NB; b++) begin
      if (per_bank[b] > 1) begin failures++; $display("FAIL bank %0d granted %0d", b, per_bank[b]); end
    end
    for (int m = 0; m < NM; m++) if (mreq[m].req && !mrsp[m].gnt) conflicts++;
    if (ngr > 1) parallel++;
    if (directed) begin
      for (int m = 0; m < 2; m++) if (mreq[m].req && mrsp[m].gnt) begin
        rr_gnt[m]++;
        if (rr_last != m) rr_alt++;
        rr_last = m;
      end
    end
  end

  // random traffic per master: hold the request until granted
  for (genvar m = 0; m < NM; m++) begin : g_m
    int left;
    initial begin
      mreq[m] = '0;
      pend_rd[m] = 1'b0;
      done_m[m] = 1'b0;
      left = 0;
      @(posedge rst_n);
      while (left < 400) begin
        @(negedge clk);
        if (!mreq[m].req || mrsp[m].gnt) begin
          left++;
          mreq[m].req   = ($urandom_range(0, 3) != 0);
          mreq[m].addr  = {21'd0, 9'($urandom_range(0, NB*WORDS-1)), 2'b00};
          mreq[m].we    = $urandom_range(0, 1);
          mreq[m].be    = 4'($urandom);
          mreq[m].wdata = $urandom;
        end
      end
      @(negedge clk);
      while (mreq[m].req && !mrsp[m].gnt) @(negedge clk);
      mreq[m].req = 1'b0;
      done_m[m] = 1'b1;
    end
  end

  initial begin
    for (int i = 0; i < NB*WORDS; i++) known[i] = '0;
    rr_gnt[0] = 0; rr_gnt[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&done_m);
    // directed: masters 0 and 1 both read bank 3 continuously for 20 cycles
    @(negedge clk);
    directed = 1'b1;
    for (int k = 0; k < 20; k++) begin
      for (int m = 0; m < 2; m++)
        mreq[m] = '{req: 1'b1, addr: 32'(3*4 + 32*k), we: 1'b0, be: 4'hF, wdata: '0, aid: '0};
      @(negedge clk);
    end
    mreq[0].req = 1'b0; mreq[1].req = 1'b0;
    directed = 1'b0;
    @(negedge clk);
    checks++;
    if (rr_gnt[0] != 10 || rr_gnt[1] != 10 || rr_alt < 19) begin
      failures++; $display("FAIL round robin: %0d/%0d grants, %0d alternations", rr_gnt[0], rr_gnt[1], rr_alt);
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no bank conflict happened"); end
    checks++;
    if (parallel == 0) begin failures++; $display("FAIL no parallel grants"); end
    $display("INFO conflicts=%0d parallel_cycles=%0d", conflicts, parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
