// vc_allocator: assigns output virtual channels to packets (VC allocator).
//
// Packet classes keep their VC through the whole network (requests on VC 0,
// responses on VC 1), so input VC v of any port can only ask for VC v of its
// output port. For each output port and VC a round-robin arbiter picks one of
// the NUM_PORTS input VCs asking for it, but only while that output VC is
// free. The winner owns the output VC until its tail flit crosses the switch
// (release), which keeps the flits of different packets from interleaving on
// one VC (wormhole switching). Grants are combinational; ownership is
// registered, so a released VC can be granted again in the next cycle.
// Fixed class-to-VC mapping and round-robin arbitration follow the reference
// design; the single-stage arbiter per output VC is this design's choice.
module vc_allocator
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_VC-1:0] va_req  [NUM_PORTS],
  input  port_e             va_port [NUM_PORTS][NUM_VC],
  output logic [NUM_VC-1:0] va_gnt  [NUM_PORTS],
  // tail flit of the owner of (output port o, VC v) crossed the switch
  input  logic [NUM_VC-1:0] release_vc [NUM_PORTS],
  output logic [NUM_VC-1:0] busy       [NUM_PORTS]
);
  logic [NUM_PORTS-1:0] req  [NUM_PORTS][NUM_VC];  // [out][vc] -> inputs
  logic [NUM_PORTS-1:0] gnt  [NUM_PORTS][NUM_VC];

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++)
      for (int v = 0; v < NUM_VC; v++)
        for (int i = 0; i < NUM_PORTS; i++)
          req[o][v][i] = va_req[i][v] && (va_port[i][v] == port_e'(o)) && !busy[o][v];
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      logic [$clog2(NUM_PORTS)-1:0] unused_idx;
      rr_arbiter #(.N(NUM_PORTS)) u_arb (
        .clk, .rst_n,
        .req     (req[o][v]),
        .advance (1'b1),
        .gnt     (gnt[o][v]),
        .gnt_idx (unused_idx)
      );
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                busy[o][v] <= 1'b0;
        else if (gnt[o][v] != '0) busy[o][v] <= 1'b1;
        else if (release_vc[o][v]) busy[o][v] <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VC; v++) begin
        va_gnt[i][v] = 1'b0;
        for (int o = 0; o < NUM_PORTS; o++)
          if (gnt[o][v][i]) va_gnt[i][v] = 1'b1;
      end
  end

endmodule
