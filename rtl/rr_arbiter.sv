// rr_arbiter: round-robin arbiter used by the VC allocator, the switch
// allocator and the network-interface multiplexers.
//
// Grants the first requester at or after the priority pointer (one-hot
// gnt, combinational). When `advance` is high at a clock edge and a grant was
// given, the pointer moves to the position just after the winner, so the
// winner has lowest priority next time: every persistent requester is served
// within N grants.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic [(N>1?$clog2(N):1)-1:0] gnt_idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned idx;
      idx = int'(ptr) + i;
      if (idx >= N) idx = idx - N;
      if (req[idx] && gnt == '0) begin
        gnt[idx] = 1'b1;
        gnt_idx  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && gnt != '0)
      ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end

endmodule
