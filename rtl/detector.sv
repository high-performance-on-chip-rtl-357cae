// detector: steers incoming packets of the network interface to their
// target by packet type.
//
// Sources: the two VC heads of the packet queue (network) and the direct
// local channel (local requests and local responses from this node's own
// packetizer). Targets: the memory-side depacketizer (request packets) and
// the reorder unit in front of the processor-side depacketizer (response
// packets). The type is read from the kind field of each header flit. A
// target that is free picks, round robin, one source offering a header flit
// for it and is then locked to that source until the packet's tail flit has
// passed, so packets never interleave. Everything is combinational apart from
// the lock registers; a flit moves when its target is ready.
// Type-based steering is the reference design's; merging the local channel
// here and the lock-per-target scheme are this design's choices.
// Lint: only the kind bit of a header is read here; the other header bits
// are unused by design.
module detector
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // network side (packet queue heads)
  input  logic [NUM_VC-1:0] net_valid,
  input  flit_t             net_flit [NUM_VC],
  output logic [NUM_VC-1:0] net_pop,
  // direct local channel
  input  logic              loc_req_valid,
  input  flit_t             loc_req_flit,
  output logic              loc_req_ready,
  input  logic              loc_resp_valid,
  input  flit_t             loc_resp_flit,
  output logic              loc_resp_ready,
  // to the memory-side depacketizer
  output logic              req_valid,
  output flit_t             req_flit,
  input  logic              req_ready,
  // to the reorder unit
  output logic              resp_valid,
  output flit_t             resp_flit,
  input  logic              resp_ready
);
  localparam int unsigned NS = NUM_VC + 2;   // sources
  localparam int unsigned NT = 2;            // targets: 0 memory side, 1 processor side
  localparam int unsigned SW = $clog2(NS);

  logic [NS-1:0] s_valid;
  flit_t         s_flit [NS];
  logic [NS-1:0] s_tgt;     // target of a header flit
  logic [NS-1:0] s_pop;

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      s_valid[v] = net_valid[v];
      s_flit[v]  = net_flit[v];
    end
    s_valid[NUM_VC]   = loc_req_valid;
    s_flit[NUM_VC]    = loc_req_flit;
    s_valid[NUM_VC+1] = loc_resp_valid;
    s_flit[NUM_VC+1]  = loc_resp_flit;
    for (int s = 0; s < NS; s++) begin
      header_t h;
      h        = header_t'(s_flit[s].data);
      s_tgt[s] = h.kind[1];
    end
  end

  logic [NT-1:0] lock_q;
  logic [SW-1:0] lock_src_q [NT];
  logic [NS-1:0] hreq [NT];
  logic [NS-1:0] hgnt [NT];
  logic [SW-1:0] hidx [NT];
  logic [NT-1:0] t_valid, t_ready, t_fire;
  logic [SW-1:0] t_src [NT];

  assign t_ready[0] = req_ready;
  assign t_ready[1] = resp_ready;

  for (genvar t = 0; t < NT; t++) begin : g_tgt
    always_comb begin
      for (int s = 0; s < NS; s++)
        hreq[t][s] = !lock_q[t] && s_valid[s] && s_flit[s].head && (s_tgt[s] == 1'(t));
    end
    rr_arbiter #(.N(NS)) u_arb (
      .clk, .rst_n, .req(hreq[t]), .advance(t_fire[t]), .gnt(hgnt[t]), .gnt_idx(hidx[t]));

    assign t_src[t]   = lock_q[t] ? lock_src_q[t] : hidx[t];
    assign t_valid[t] = lock_q[t] ? s_valid[lock_src_q[t]] : (hgnt[t] != '0);
    assign t_fire[t]  = t_valid[t] && t_ready[t];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        lock_q[t]     <= 1'b0;
        lock_src_q[t] <= '0;
      end else if (t_fire[t]) begin
        lock_q[t]     <= !s_flit[t_src[t]].tail;
        lock_src_q[t] <= t_src[t];
      end
    end
  end

  always_comb begin
    s_pop = '0;
    for (int t = 0; t < NT; t++)
      if (t_fire[t]) s_pop[t_src[t]] = 1'b1;
  end

  assign net_pop        = s_pop[NUM_VC-1:0];
  assign loc_req_ready  = s_pop[NUM_VC];
  assign loc_resp_ready = s_pop[NUM_VC+1];

  assign req_valid  = t_valid[0];
  assign req_flit   = s_flit[t_src[0]];
  assign resp_valid = t_valid[1];
  assign resp_flit  = s_flit[t_src[1]];

  a_no_double_pop: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(t_fire[0] && t_fire[1] && t_src[0] == t_src[1]));
endmodule
