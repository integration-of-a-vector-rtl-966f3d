// rr_arbiter: round-robin arbiter over N requesters.
//
// Combinational grant: the first requester at or after the priority pointer
// wins. When `advance_i` is high and some request is granted, the pointer moves
// to the position after the winner at the next clock edge, so every requester
// is served within N grants. Used per bank in the HCI and per slave in the OBI
// crossbar.
module rr_arbiter #(
  parameter int unsigned N = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic [N-1:0]  req_i,
  input  logic          advance_i,
  output logic [N-1:0]  gnt_o,
  output logic [IW-1:0] idx_o,
  output logic          valid_o
);
  logic [IW-1:0] ptr_q;

  always_comb begin
    gnt_o   = '0;
    idx_o   = '0;
    valid_o = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned j;
      j = (int'(ptr_q) + k) % N;
      if (!valid_o && req_i[j]) begin
        valid_o  = 1'b1;
        idx_o    = IW'(j);
        gnt_o[j] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                  ptr_q <= '0;
    else if (advance_i && valid_o) ptr_q <= (int'(idx_o) == N-1) ? '0 : idx_o + 1'b1;
  end
endmodule
