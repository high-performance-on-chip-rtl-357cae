// input_channel: one router input port (IC) with its VC buffers, routing unit
// and VC controller.
//
// Arriving flits are written into the buffer of the VC named by their VC bit
// (VC 0 = requests buffer, VC 1 = responses buffer, VC_DEPTH flits each). For
// each VC the controller goes through three phases: a header flit at the front
// is routed (xy_route) and asks the VC allocator for the matching VC of the
// chosen output port; once granted, the VC is active and asks the switch
// allocator for the crossbar every cycle it holds a flit; after its tail flit
// leaves the VC is free for the next packet (wormhole switching). One flit per
// cycle leaves the port, from the VC the switch allocator selected. Every
// flit that leaves returns one credit upstream on credit_out, registered (one
// cycle after the pop).
// Buffers per VC, the request/response split and the routing unit are from
// the reference design; the three-phase controller and registered credits
// are this design's choices.
// Lint: the routing unit reads only the destination fields of a header; the
// other header bits are unused by design.
module input_channel
  import noc_pkg::*;
#(
  parameter int unsigned MY_X  = 0,
  parameter int unsigned MY_Y  = 0,
  parameter int unsigned DEPTH = VC_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // link from the upstream router or NI
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic [NUM_VC-1:0] credit_out,
  // VC allocation
  output logic [NUM_VC-1:0] va_req,
  output port_e             va_port [NUM_VC],
  input  logic [NUM_VC-1:0] va_gnt,
  // switch allocation
  output logic [NUM_VC-1:0] sa_req,
  output port_e             sa_port [NUM_VC],
  output logic [NUM_VC-1:0] sa_tail,
  input  logic [NUM_VC-1:0] sa_gnt,      // at most one bit set
  // to the crossbar
  output logic              xb_valid,
  output flit_t             xb_flit
);
  flit_t             head_flit [NUM_VC];
  logic [NUM_VC-1:0] empty;
  logic [NUM_VC-1:0] active;
  port_e             route_q [NUM_VC];
  port_e             route_c [NUM_VC];
  logic [NUM_VC-1:0] pop;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    header_t hdr;
    logic    unused_full;
    logic [$clog2(DEPTH+1)-1:0] unused_count;

    sync_fifo #(.T(flit_t), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .push  (in_valid && (in_flit.vc == 1'(v))),
      .din   (in_flit),
      .pop   (pop[v]),
      .dout  (head_flit[v]),
      .full  (unused_full),
      .empty (empty[v]),
      .count (unused_count)
    );

    assign hdr = header_t'(head_flit[v].data);

    xy_route #(.MY_X(MY_X), .MY_Y(MY_Y)) u_route (
      .dst_x    (hdr.dst_x),
      .dst_y    (hdr.dst_y),
      .out_port (route_c[v])
    );

    assign va_req[v]  = !empty[v] && !active[v] && head_flit[v].head;
    assign va_port[v] = route_c[v];
    assign sa_req[v]  = !empty[v] && active[v];
    assign sa_port[v] = route_q[v];
    assign sa_tail[v] = head_flit[v].tail;
    assign pop[v]     = sa_gnt[v] && sa_req[v];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        active[v]  <= 1'b0;
        route_q[v] <= P_LOCAL;
      end else if (va_req[v] && va_gnt[v]) begin
        active[v]  <= 1'b1;
        route_q[v] <= route_c[v];
      end else if (pop[v] && head_flit[v].tail) begin
        active[v]  <= 1'b0;
      end
    end
  end

  always_comb begin
    xb_valid = 1'b0;
    xb_flit  = head_flit[0];
    for (int v = 0; v < NUM_VC; v++) begin
      if (pop[v]) begin
        xb_valid = 1'b1;
        xb_flit  = head_flit[v];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credit_out <= '0;
    else        credit_out <= pop;
  end

  a_one_sa_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sa_gnt));

endmodule
