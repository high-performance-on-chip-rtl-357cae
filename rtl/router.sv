// router: 5-port virtual-channel wormhole router of the logic-layer mesh.
//
// Ports 0..4 are North, East, South, West and Local. Each input channel holds
// two VC buffers (requests, responses) of VC_DEPTH flits, a routing unit (XY)
// and a VC controller; a VC allocator and a round-robin switch allocator
// share the 5 x 5 crossbar; flow control is credit based, one credit per
// flit, returned on credit_out of the input port.
// Timing with no contention: a header flit written into an input buffer at
// clock edge e is granted an output VC at edge e+1, wins the switch and is
// registered on the output link at edge e+2; body flits follow one per cycle.
// The structure is the reference design's; pipeline depth is this design's.
// Lint: the VC allocator's busy flags (vc_busy) are an output of that block
// for observation; the router itself does not need them.
module router
  import noc_pkg::*;
#(
  parameter int unsigned MY_X          = 0,
  parameter int unsigned MY_Y          = 0,
  parameter int unsigned LOCAL_CREDITS = NI_Q_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_PORTS-1:0] in_valid,
  input  flit_t                in_flit    [NUM_PORTS],
  output logic [NUM_VC-1:0]    credit_out [NUM_PORTS],
  output logic [NUM_PORTS-1:0] out_valid,
  output flit_t                out_flit   [NUM_PORTS],
  input  logic [NUM_VC-1:0]    credit_in  [NUM_PORTS]
);
  logic [NUM_VC-1:0]    va_req  [NUM_PORTS];
  port_e                va_port [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0]    va_gnt  [NUM_PORTS];
  logic [NUM_VC-1:0]    sa_req  [NUM_PORTS];
  port_e                sa_port [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0]    sa_tail [NUM_PORTS];
  logic [NUM_VC-1:0]    sa_gnt  [NUM_PORTS];
  logic [NUM_VC-1:0]    release_vc [NUM_PORTS];
  logic [NUM_VC-1:0]    vc_busy    [NUM_PORTS];
  logic [NUM_PORTS-1:0] xb_valid;
  flit_t                xb_flit [NUM_PORTS];
  logic [NUM_PORTS-1:0] sel_valid;
  logic [2:0]           sel [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_ic
    input_channel #(.MY_X(MY_X), .MY_Y(MY_Y)) u_ic (
      .clk, .rst_n,
      .in_valid   (in_valid[p]),
      .in_flit    (in_flit[p]),
      .credit_out (credit_out[p]),
      .va_req     (va_req[p]),
      .va_port    (va_port[p]),
      .va_gnt     (va_gnt[p]),
      .sa_req     (sa_req[p]),
      .sa_port    (sa_port[p]),
      .sa_tail    (sa_tail[p]),
      .sa_gnt     (sa_gnt[p]),
      .xb_valid   (xb_valid[p]),
      .xb_flit    (xb_flit[p])
    );
  end

  vc_allocator u_va (
    .clk, .rst_n,
    .va_req, .va_port, .va_gnt,
    .release_vc,
    .busy (vc_busy)
  );

  switch_allocator #(.LOCAL_CREDITS(LOCAL_CREDITS)) u_sa (
    .clk, .rst_n,
    .sa_req, .sa_port, .sa_tail, .sa_gnt,
    .credit_in,
    .out_valid (sel_valid),
    .out_sel   (sel),
    .release_vc
  );

  crossbar u_xb (
    .clk, .rst_n,
    .in_flit   (xb_flit),
    .sel_valid (sel_valid),
    .sel       (sel),
    .out_valid (out_valid),
    .out_flit  (out_flit)
  );

  // A granted input always presents its flit to the crossbar.
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    a_sel_has_flit: assert property (@(posedge clk) disable iff (!rst_n)
                                     sel_valid[o] |-> xb_valid[sel[o]]);
  end

endmodule
