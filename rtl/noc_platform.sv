// noc_platform: the logic-layer communication platform, a MESH_X x MESH_Y
// mesh of routers, each with a network interface joining one processor and
// the controller of the DRAM rank stacked above it.
//
// Node n = y * MESH_X + x sits at column x (East grows x) and row y (South
// grows y). Router ports connect to the neighbours; ports at the mesh edge
// are tied off (XY routing never uses them). The processors and the memory
// controllers are outside this block: per node the top brings out the
// processor's AXI port (s_*, the NI is its slave) and the memory
// controller's AXI port (m_*, the NI is its master). Address bits
// [RANK_BITS+3:RANK_BITS] select the node whose rank holds an address.
// ev_rob_store / ev_rob_release pulse when a reorder unit parks or releases
// a response. The 4 x 4 mesh, routers, NIs and ranks are the reference
// configuration.
// Lint: Verilator reports rst_n as used both asynchronously and
// synchronously; the synchronous uses are the disable conditions of the
// handshake assertions, not logic.
module noc_platform
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  localparam int unsigned N     = MESH_X * MESH_Y
) (
  input  logic          clk,
  input  logic          rst_n,
  // processors
  input  logic [N-1:0]  s_ar_valid,
  output logic [N-1:0]  s_ar_ready,
  input  axi_ax_t       s_ar [N],
  input  logic [N-1:0]  s_aw_valid,
  output logic [N-1:0]  s_aw_ready,
  input  axi_ax_t       s_aw [N],
  input  logic [N-1:0]  s_w_valid,
  output logic [N-1:0]  s_w_ready,
  input  axi_w_t        s_w [N],
  output logic [N-1:0]  s_r_valid,
  input  logic [N-1:0]  s_r_ready,
  output axi_r_t        s_r [N],
  output logic [N-1:0]  s_b_valid,
  input  logic [N-1:0]  s_b_ready,
  output axi_b_t        s_b [N],
  // stacked-DRAM controllers
  output logic [N-1:0]  m_ar_valid,
  input  logic [N-1:0]  m_ar_ready,
  output axi_ax_t       m_ar [N],
  output logic [N-1:0]  m_aw_valid,
  input  logic [N-1:0]  m_aw_ready,
  output axi_ax_t       m_aw [N],
  output logic [N-1:0]  m_w_valid,
  input  logic [N-1:0]  m_w_ready,
  output axi_w_t        m_w [N],
  input  logic [N-1:0]  m_r_valid,
  output logic [N-1:0]  m_r_ready,
  input  axi_r_t        m_r [N],
  input  logic [N-1:0]  m_b_valid,
  output logic [N-1:0]  m_b_ready,
  input  axi_b_t        m_b [N],
  // events
  output logic [N-1:0]  ev_rob_store,
  output logic [N-1:0]  ev_rob_release
);
  // router link signals, indexed [node][port]
  logic [NUM_PORTS-1:0] r_in_valid   [N];
  flit_t                r_in_flit    [N][NUM_PORTS];
  logic [NUM_VC-1:0]    r_credit_out [N][NUM_PORTS];
  logic [NUM_PORTS-1:0] r_out_valid  [N];
  flit_t                r_out_flit   [N][NUM_PORTS];
  logic [NUM_VC-1:0]    r_credit_in  [N][NUM_PORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned ID = y * MESH_X + x;

      router #(.MY_X(x), .MY_Y(y)) u_router (
        .clk, .rst_n,
        .in_valid   (r_in_valid[ID]),
        .in_flit    (r_in_flit[ID]),
        .credit_out (r_credit_out[ID]),
        .out_valid  (r_out_valid[ID]),
        .out_flit   (r_out_flit[ID]),
        .credit_in  (r_credit_in[ID])
      );

      network_interface #(.MY_X(x), .MY_Y(y), .MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_ni (
        .clk, .rst_n,
        .s_ar_valid (s_ar_valid[ID]), .s_ar_ready (s_ar_ready[ID]), .s_ar (s_ar[ID]),
        .s_aw_valid (s_aw_valid[ID]), .s_aw_ready (s_aw_ready[ID]), .s_aw (s_aw[ID]),
        .s_w_valid  (s_w_valid[ID]),  .s_w_ready  (s_w_ready[ID]),  .s_w  (s_w[ID]),
        .s_r_valid  (s_r_valid[ID]),  .s_r_ready  (s_r_ready[ID]),  .s_r  (s_r[ID]),
        .s_b_valid  (s_b_valid[ID]),  .s_b_ready  (s_b_ready[ID]),  .s_b  (s_b[ID]),
        .m_ar_valid (m_ar_valid[ID]), .m_ar_ready (m_ar_ready[ID]), .m_ar (m_ar[ID]),
        .m_aw_valid (m_aw_valid[ID]), .m_aw_ready (m_aw_ready[ID]), .m_aw (m_aw[ID]),
        .m_w_valid  (m_w_valid[ID]),  .m_w_ready  (m_w_ready[ID]),  .m_w  (m_w[ID]),
        .m_r_valid  (m_r_valid[ID]),  .m_r_ready  (m_r_ready[ID]),  .m_r  (m_r[ID]),
        .m_b_valid  (m_b_valid[ID]),  .m_b_ready  (m_b_ready[ID]),  .m_b  (m_b[ID]),
        .tx_valid   (r_in_valid[ID][P_LOCAL]),
        .tx_flit    (r_in_flit[ID][P_LOCAL]),
        .tx_credit  (r_credit_out[ID][P_LOCAL]),
        .rx_valid   (r_out_valid[ID][P_LOCAL]),
        .rx_flit    (r_out_flit[ID][P_LOCAL]),
        .rx_credit  (r_credit_in[ID][P_LOCAL]),
        .ev_rob_store   (ev_rob_store[ID]),
        .ev_rob_release (ev_rob_release[ID])
      );

      // East / West neighbours
      if (x + 1 < MESH_X) begin : g_east
        assign r_in_valid[ID][P_EAST]      = r_out_valid[ID+1][P_WEST];
        assign r_in_flit[ID][P_EAST]       = r_out_flit[ID+1][P_WEST];
        assign r_credit_in[ID][P_EAST]     = r_credit_out[ID+1][P_WEST];
      end else begin : g_east_edge
        assign r_in_valid[ID][P_EAST]      = 1'b0;
        assign r_in_flit[ID][P_EAST]       = '0;
        assign r_credit_in[ID][P_EAST]     = '0;
      end
      if (x > 0) begin : g_west
        assign r_in_valid[ID][P_WEST]      = r_out_valid[ID-1][P_EAST];
        assign r_in_flit[ID][P_WEST]       = r_out_flit[ID-1][P_EAST];
        assign r_credit_in[ID][P_WEST]     = r_credit_out[ID-1][P_EAST];
      end else begin : g_west_edge
        assign r_in_valid[ID][P_WEST]      = 1'b0;
        assign r_in_flit[ID][P_WEST]       = '0;
        assign r_credit_in[ID][P_WEST]     = '0;
      end
      // North / South neighbours
      if (y + 1 < MESH_Y) begin : g_south
        assign r_in_valid[ID][P_SOUTH]     = r_out_valid[ID+MESH_X][P_NORTH];
        assign r_in_flit[ID][P_SOUTH]      = r_out_flit[ID+MESH_X][P_NORTH];
        assign r_credit_in[ID][P_SOUTH]    = r_credit_out[ID+MESH_X][P_NORTH];
      end else begin : g_south_edge
        assign r_in_valid[ID][P_SOUTH]     = 1'b0;
        assign r_in_flit[ID][P_SOUTH]      = '0;
        assign r_credit_in[ID][P_SOUTH]    = '0;
      end
      if (y > 0) begin : g_north
        assign r_in_valid[ID][P_NORTH]     = r_out_valid[ID-MESH_X][P_SOUTH];
        assign r_in_flit[ID][P_NORTH]      = r_out_flit[ID-MESH_X][P_SOUTH];
        assign r_credit_in[ID][P_NORTH]    = r_credit_out[ID-MESH_X][P_SOUTH];
      end else begin : g_north_edge
        assign r_in_valid[ID][P_NORTH]     = 1'b0;
        assign r_in_flit[ID][P_NORTH]      = '0;
        assign r_credit_in[ID][P_NORTH]    = '0;
      end
    end
  end

endmodule
