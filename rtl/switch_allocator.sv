// switch_allocator: grants the crossbar, one flit per input and per output
// port each cycle, and keeps the credit counts of the downstream buffers.
//
// Separable input-first allocation. Stage 1: each input port picks, round
// robin, one of its active VCs that has a flit and at least one credit for
// its output VC downstream. Stage 2: each output port picks, round robin, one
// of the inputs whose stage-1 winner wants it. A grant sets the crossbar
// select of that output, pops the flit from the input VC (sa_gnt), spends a
// credit, and, for a tail flit, releases the output VC in the VC allocator.
// A credit comes back on credit_in one flit at a time. The credit counters
// start at the downstream buffer depth: VC_DEPTH for neighbour routers and
// LOCAL_CREDITS for the network interface on the Local port.
// Round-robin switch arbitration and credit-based flow control follow the
// reference design; the two-stage separable structure is this design's choice.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int unsigned LOCAL_CREDITS = NI_Q_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_VC-1:0] sa_req  [NUM_PORTS],
  input  port_e             sa_port [NUM_PORTS][NUM_VC],
  input  logic [NUM_VC-1:0] sa_tail [NUM_PORTS],
  output logic [NUM_VC-1:0] sa_gnt  [NUM_PORTS],
  input  logic [NUM_VC-1:0] credit_in  [NUM_PORTS],
  output logic [NUM_PORTS-1:0] out_valid,
  output logic [2:0]        out_sel    [NUM_PORTS],  // input port feeding output o
  output logic [NUM_VC-1:0] release_vc [NUM_PORTS]
);
  localparam int unsigned CW  = 4;
  localparam int unsigned VIW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  logic [CW-1:0] credits [NUM_PORTS][NUM_VC];

  // stage 1
  logic [NUM_VC-1:0] s1_req [NUM_PORTS];
  logic [NUM_VC-1:0] s1_gnt [NUM_PORTS];
  logic [VIW-1:0]    s1_idx [NUM_PORTS];
  port_e             s1_port [NUM_PORTS];
  logic [NUM_PORTS-1:0] in_won;

  // stage 2
  logic [NUM_PORTS-1:0] s2_req [NUM_PORTS];  // [out] -> inputs
  logic [NUM_PORTS-1:0] s2_gnt [NUM_PORTS];
  logic [2:0]           s2_idx [NUM_PORTS];

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VC; v++)
        s1_req[i][v] = sa_req[i][v] && (credits[sa_port[i][v]][v] != '0);
  end

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    rr_arbiter #(.N(NUM_VC)) u_arb (
      .clk, .rst_n,
      .req     (s1_req[i]),
      .advance (in_won[i]),
      .gnt     (s1_gnt[i]),
      .gnt_idx (s1_idx[i])
    );
    assign s1_port[i] = sa_port[i][s1_idx[i]];
  end

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++)
      for (int i = 0; i < NUM_PORTS; i++)
        s2_req[o][i] = (s1_gnt[i] != '0) && (s1_port[i] == port_e'(o));
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk, .rst_n,
      .req     (s2_req[o]),
      .advance (1'b1),
      .gnt     (s2_gnt[o]),
      .gnt_idx (s2_idx[o])
    );
    assign out_valid[o] = (s2_gnt[o] != '0);
    assign out_sel[o]   = s2_idx[o];
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      in_won[i] = 1'b0;
      for (int o = 0; o < NUM_PORTS; o++)
        if (s2_gnt[o][i]) in_won[i] = 1'b1;
      sa_gnt[i] = in_won[i] ? s1_gnt[i] : '0;
    end
    for (int o = 0; o < NUM_PORTS; o++) begin
      release_vc[o] = '0;
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NUM_VC; v++)
          if (s2_gnt[o][i] && s1_gnt[i][v] && sa_tail[i][v]) release_vc[o][v] = 1'b1;
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_cred
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      logic spend;
      assign spend = out_valid[o] && s1_gnt[s2_idx[o]][v];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)
          credits[o][v] <= CW'((o == int'(P_LOCAL)) ? LOCAL_CREDITS : VC_DEPTH);
        else
          credits[o][v] <= credits[o][v] - CW'(spend) + CW'(credit_in[o][v]);
      end
    end
  end

endmodule
