// mem_depacketizer: memory-side depacketizer; restores request packets into
// AXI requests for the stacked-DRAM controller.
//
// Header flit: its kind, source node, ID, sequence number and length go to
// the control-bits register. Address flit: a read request is issued on AR,
// a write request on AW, and the request information (source, ID, sequence,
// length) is pushed into the read- or write-information FIFO that the
// packetizer uses to address the response. Data flits of a write become W
// beats, the tail flit carrying WLAST. A flit is taken only when the AXI
// channel it feeds accepts it (and, for the address flit, when the
// information FIFO has room), so back-pressure reaches the network.
// The controller is assumed to answer reads in read order and writes in
// write order, which pairs each response with the head of its FIFO.
// Control-bits / address / write-data outputs are the reference design's;
// the information FIFOs are this design's way of routing responses back.
// Lint: the destination fields, the reserved bits and the response code of
// the header, and the VC bit of each flit, are not needed on the memory
// side and stay unused.
module mem_depacketizer
  import noc_pkg::*;
#(
  parameter int unsigned INFO_DEPTH = NI_Q_DEPTH
) (
  input  logic      clk,
  input  logic      rst_n,
  // request packets from the detector
  input  logic      in_valid,
  input  flit_t     in_flit,
  output logic      in_ready,
  // AXI master side towards the memory controller
  output logic      ar_valid,
  input  logic      ar_ready,
  output axi_ax_t   ar,
  output logic      aw_valid,
  input  logic      aw_ready,
  output axi_ax_t   aw,
  output logic      w_valid,
  input  logic      w_ready,
  output axi_w_t    w,
  // request information for the response builder
  output logic      rd_info_valid,
  output req_info_t rd_info,
  input  logic      rd_info_pop,
  output logic      wr_info_valid,
  output req_info_t wr_info,
  input  logic      wr_info_pop
);
  typedef enum logic [1:0] {D_HDR, D_ADDR, D_DATA} d_state_e;

  d_state_e  state;
  header_t   ctrl_q;        // control bits of the current packet
  req_info_t info;
  logic      rd_full, rd_empty, wr_full, wr_empty;
  logic      rd_push, wr_push;
  logic [$clog2(INFO_DEPTH+1)-1:0] unused_c0, unused_c1;

  assign info = '{src_x: ctrl_q.src_x, src_y: ctrl_q.src_y, id: ctrl_q.id,
                  seq: ctrl_q.seq, len: ctrl_q.len};

  assign ar       = '{id: ctrl_q.id, addr: in_flit.data, len: ctrl_q.len};
  assign aw       = ar;
  assign w        = '{data: in_flit.data, last: in_flit.tail};
  assign ar_valid = (state == D_ADDR) && in_valid && (ctrl_q.kind == PK_RD_REQ) && !rd_full;
  assign aw_valid = (state == D_ADDR) && in_valid && (ctrl_q.kind == PK_WR_REQ) && !wr_full;
  assign w_valid  = (state == D_DATA) && in_valid;
  assign rd_push  = ar_valid && ar_ready;
  assign wr_push  = aw_valid && aw_ready;

  always_comb begin
    unique case (state)
      D_HDR:   in_ready = 1'b1;
      D_ADDR:  in_ready = rd_push || wr_push;
      D_DATA:  in_ready = w_ready;
      default: in_ready = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= D_HDR;
      ctrl_q <= '0;
    end else if (in_valid && in_ready) begin
      unique case (state)
        D_HDR:   begin
          ctrl_q <= header_t'(in_flit.data);
          state  <= D_ADDR;
        end
        D_ADDR:  state <= in_flit.tail ? D_HDR : D_DATA;
        D_DATA:  if (in_flit.tail) state <= D_HDR;
        default: state <= D_HDR;
      endcase
    end
  end

  sync_fifo #(.T(req_info_t), .DEPTH(INFO_DEPTH)) u_rd_info (
    .clk, .rst_n, .push(rd_push), .din(info), .pop(rd_info_pop),
    .dout(rd_info), .full(rd_full), .empty(rd_empty), .count(unused_c0));
  sync_fifo #(.T(req_info_t), .DEPTH(INFO_DEPTH)) u_wr_info (
    .clk, .rst_n, .push(wr_push), .din(info), .pop(wr_info_pop),
    .dout(wr_info), .full(wr_full), .empty(wr_empty), .count(unused_c1));

  assign rd_info_valid = !rd_empty;
  assign wr_info_valid = !wr_empty;

  a_header_first: assert property (@(posedge clk) disable iff (!rst_n)
                                   (state == D_HDR && in_valid) |-> in_flit.head);
endmodule
