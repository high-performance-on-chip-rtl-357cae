// network_interface: logic-layer network interface (LLNI) of one mesh node.
//
// Connects a processor (AXI master, ports s_*) and the node's stacked-DRAM
// controller (AXI slave, ports m_*) to the Local port of the node's router.
// Forward path: the processor AXI queue and the memory AXI queue feed the
// packetizer, which numbers requests through the reorder unit and injects
// request packets on VC 0 and response packets on VC 1. Reverse path: the
// packet queue buffers what the router delivers; the detector sends request
// packets to the memory-side depacketizer and response packets to the
// reorder unit, which forwards them in order (or parks them in its reorder
// buffer) to the processor-side depacketizer.
// A request for the node's own memory, and its response, use a direct
// channel from the packetizer to the detector and never enter the router.
// Link: flits are registered on out_flit; credit_in returns one credit per
// flit per VC from the router's Local input buffers (VC_DEPTH each);
// credit_out returns credits for the packet queue (NI_Q_DEPTH per VC).
// The block structure and the local channel are the reference design's.
module network_interface
  import noc_pkg::*;
#(
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0,
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor (AXI slave port of the NI)
  input  logic              s_ar_valid,
  output logic              s_ar_ready,
  input  axi_ax_t           s_ar,
  input  logic              s_aw_valid,
  output logic              s_aw_ready,
  input  axi_ax_t           s_aw,
  input  logic              s_w_valid,
  output logic              s_w_ready,
  input  axi_w_t            s_w,
  output logic              s_r_valid,
  input  logic              s_r_ready,
  output axi_r_t            s_r,
  output logic              s_b_valid,
  input  logic              s_b_ready,
  output axi_b_t            s_b,
  // memory controller (AXI master port of the NI)
  output logic              m_ar_valid,
  input  logic              m_ar_ready,
  output axi_ax_t           m_ar,
  output logic              m_aw_valid,
  input  logic              m_aw_ready,
  output axi_ax_t           m_aw,
  output logic              m_w_valid,
  input  logic              m_w_ready,
  output axi_w_t            m_w,
  input  logic              m_r_valid,
  output logic              m_r_ready,
  input  axi_r_t            m_r,
  input  logic              m_b_valid,
  output logic              m_b_ready,
  input  axi_b_t            m_b,
  // router Local port
  output logic              tx_valid,
  output flit_t             tx_flit,
  input  logic [NUM_VC-1:0] tx_credit,
  input  logic              rx_valid,
  input  flit_t             rx_flit,
  output logic [NUM_VC-1:0] rx_credit,
  // event strobes
  output logic              ev_rob_store,
  output logic              ev_rob_release
);
  // processor AXI queue -> packetizer
  logic    q_ar_valid, q_ar_pop, q_aw_valid, q_aw_pop, q_w_valid, q_w_pop;
  axi_ax_t q_ar, q_aw;
  axi_w_t  q_w;
  // memory AXI queue -> packetizer
  logic    q_r_valid, q_r_pop, q_b_valid, q_b_pop;
  axi_r_t  q_r;
  axi_b_t  q_b;
  // request information
  logic      rd_info_valid, rd_info_pop, wr_info_valid, wr_info_pop;
  req_info_t rd_info, wr_info;
  // reorder unit <-> packetizer
  logic             can_issue, seq_take;
  logic [ID_W-1:0]  seq_id;
  logic [SEQ_W-1:0] seq_num;
  // local channel
  logic  loc_req_valid, loc_req_ready, loc_resp_valid, loc_resp_ready;
  flit_t loc_req_flit, loc_resp_flit;
  // packet queue -> detector
  logic [NUM_VC-1:0] pq_valid, pq_pop;
  flit_t             pq_flit [NUM_VC];
  // detector -> memory-side depacketizer / reorder unit
  logic  req_valid, req_ready, resp_valid, resp_ready;
  flit_t req_flit, resp_flit;
  // reorder unit -> processor-side depacketizer
  logic  ord_valid, ord_ready;
  flit_t ord_flit;

  proc_axi_queue u_proc_q (
    .clk, .rst_n,
    .ar_valid (s_ar_valid), .ar_ready (s_ar_ready), .ar (s_ar),
    .aw_valid (s_aw_valid), .aw_ready (s_aw_ready), .aw (s_aw),
    .w_valid  (s_w_valid),  .w_ready  (s_w_ready),  .w  (s_w),
    .q_ar_valid, .q_ar_pop, .q_ar,
    .q_aw_valid, .q_aw_pop, .q_aw,
    .q_w_valid,  .q_w_pop,  .q_w
  );

  mem_axi_queue u_mem_q (
    .clk, .rst_n,
    .r_valid (m_r_valid), .r_ready (m_r_ready), .r (m_r),
    .b_valid (m_b_valid), .b_ready (m_b_ready), .b (m_b),
    .q_r_valid, .q_r_pop, .q_r,
    .q_b_valid, .q_b_pop, .q_b
  );

  packetizer #(.MY_X(MY_X), .MY_Y(MY_Y), .MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_pkt (
    .clk, .rst_n,
    .q_ar_valid, .q_ar, .q_ar_pop,
    .q_aw_valid, .q_aw, .q_aw_pop,
    .q_w_valid,  .q_w,  .q_w_pop,
    .q_r_valid,  .q_r,  .q_r_pop,
    .q_b_valid,  .q_b,  .q_b_pop,
    .rd_info_valid, .rd_info, .rd_info_pop,
    .wr_info_valid, .wr_info, .wr_info_pop,
    .can_issue, .seq_id, .seq_num, .seq_take,
    .out_valid (tx_valid), .out_flit (tx_flit), .credit_in (tx_credit),
    .loc_req_valid, .loc_req_flit, .loc_req_ready,
    .loc_resp_valid, .loc_resp_flit, .loc_resp_ready
  );

  packet_queue u_pq (
    .clk, .rst_n,
    .in_valid   (rx_valid),
    .in_flit    (rx_flit),
    .credit_out (rx_credit),
    .head_valid (pq_valid),
    .head_flit  (pq_flit),
    .pop        (pq_pop)
  );

  detector u_det (
    .clk, .rst_n,
    .net_valid (pq_valid), .net_flit (pq_flit), .net_pop (pq_pop),
    .loc_req_valid, .loc_req_flit, .loc_req_ready,
    .loc_resp_valid, .loc_resp_flit, .loc_resp_ready,
    .req_valid, .req_flit, .req_ready,
    .resp_valid, .resp_flit, .resp_ready
  );

  reorder_unit u_rob (
    .clk, .rst_n,
    .seq_id, .seq_num, .seq_take, .can_issue,
    .in_valid  (resp_valid), .in_flit (resp_flit), .in_ready (resp_ready),
    .out_valid (ord_valid),  .out_flit (ord_flit), .out_ready (ord_ready),
    .ev_stored (ev_rob_store), .ev_released (ev_rob_release)
  );

  mem_depacketizer u_mdp (
    .clk, .rst_n,
    .in_valid (req_valid), .in_flit (req_flit), .in_ready (req_ready),
    .ar_valid (m_ar_valid), .ar_ready (m_ar_ready), .ar (m_ar),
    .aw_valid (m_aw_valid), .aw_ready (m_aw_ready), .aw (m_aw),
    .w_valid  (m_w_valid),  .w_ready  (m_w_ready),  .w  (m_w),
    .rd_info_valid, .rd_info, .rd_info_pop,
    .wr_info_valid, .wr_info, .wr_info_pop
  );

  proc_depacketizer u_pdp (
    .clk, .rst_n,
    .in_valid (ord_valid), .in_flit (ord_flit), .in_ready (ord_ready),
    .r_valid (s_r_valid), .r_ready (s_r_ready), .r (s_r),
    .b_valid (s_b_valid), .b_ready (s_b_ready), .b (s_b)
  );

endmodule
