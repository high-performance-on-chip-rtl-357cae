// crossbar: the 5 x 5 crossbar switch of the router.
//
// Each output port is a multiplexer over the five input channels, steered by
// the switch allocator's select and valid for that output. The flit on an
// output is registered, so a flit that wins allocation in cycle t is on the
// link in cycle t+1. Output VC equals input VC (classes keep their VC).
module crossbar
  import noc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  flit_t                in_flit  [NUM_PORTS],
  input  logic [NUM_PORTS-1:0] sel_valid,
  input  logic [2:0]           sel      [NUM_PORTS],
  output logic [NUM_PORTS-1:0] out_valid,
  output flit_t                out_flit [NUM_PORTS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= '0;
    else        out_valid <= sel_valid;
  end

  always_ff @(posedge clk) begin
    for (int o = 0; o < NUM_PORTS; o++)
      if (sel_valid[o]) out_flit[o] <= in_flit[sel[o]];
  end
endmodule
