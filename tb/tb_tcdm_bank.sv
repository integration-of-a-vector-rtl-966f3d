`timescale 1ns/1ps
// tb_tcdm_bank: self-checking testbench of tcdm_bank.
// Random reads and byte-masked writes against a reference array; every read
// must return the reference word exactly one cycle after the request.
module tb_tcdm_bank;
  localparam int WORDS = 8192;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req, we; logic [3:0] be; logic [12:0] addr; logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [WORDS];
  tcdm_bank #(.WORDS(WORDS)) dut (.clk_i(clk), .req_i(req), .we_i(we), .be_i(be),
                                  .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata));
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] exp;
    req = 0; we = 0; be = 0; addr = 0; wdata = 0;
    // fill the first 256 words and the last one
    for (int i = 0; i < 257; i++) begin
      @(negedge clk);
      req = 1; we = 1; be = 4'hF; addr = (i == 256) ? 13'(WORDS-1) : 13'(i); wdata = $urandom;
      ref_mem[addr] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      req = 1; addr = 13'($urandom_range(0, 255)); we = $urandom_range(0, 1);
      if (i % 17 == 0) addr = 13'(WORDS-1);
      if (we) begin
        be = 4'($urandom); wdata = $urandom;
        for (int b = 0; b < 4; b++) if (be[b]) ref_mem[addr][8*b +: 8] = wdata[8*b +: 8];
      end else begin
        exp = ref_mem[addr];
        @(negedge clk);               // one cycle later the data is there
        req = 0;
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL read %0d: %h vs %h", addr, rdata, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
