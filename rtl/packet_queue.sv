// packet_queue: reverse-path entry of the network interface (packet buffer).
//
// Receives flits from the router's Local output port and stores them in one
// buffer per VC (requests, responses), DEPTH flits each. The head flit of
// every VC is offered to the detector, which pops it when its target can take
// it; the two VCs are drained independently, so a stalled request never
// blocks a response. Each pop returns one credit to the router, registered.
// The router's Local output must start with DEPTH credits per VC.
// The packet buffer is the reference design's; per-VC buffering is this
// design's choice (it keeps request and response traffic deadlock free).
module packet_queue
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = NI_Q_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic [NUM_VC-1:0] credit_out,
  output logic [NUM_VC-1:0] head_valid,
  output flit_t             head_flit [NUM_VC],
  input  logic [NUM_VC-1:0] pop
);
  logic [NUM_VC-1:0] empty, full;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic [$clog2(DEPTH+1)-1:0] unused_count;
    sync_fifo #(.T(flit_t), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .push  (in_valid && (in_flit.vc == 1'(v))),
      .din   (in_flit),
      .pop   (pop[v]),
      .dout  (head_flit[v]),
      .full  (full[v]),
      .empty (empty[v]),
      .count (unused_count)
    );
    assign head_valid[v] = !empty[v];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credit_out <= '0;
    else        credit_out <= pop & head_valid;
  end

  a_credit_respected: assert property (@(posedge clk) disable iff (!rst_n)
                                       in_valid |-> !full[in_flit.vc]);
endmodule
