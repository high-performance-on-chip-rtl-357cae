// packetizer: forward path of the network interface; turns queued AXI
// requests (processor side) and responses (memory side) into packets.
//
// Request builder: takes a read or a write request from the AXI queue
// (alternating when both wait, and only while the reorder unit allows another
// outstanding transaction), asks the reorder unit for the sequence number of
// the transaction ID, converts the address into a mesh node with the address
// decoder and assembles the header in the header register. It then sends the
// header flit, the address flit and, for a write, the data flits (data
// builder). Response builder: pairs the head of the read-data or write-
// response queue with the request information the memory-side depacketizer
// saved (source node, ID, sequence number, length) and sends a response
// packet back to the source.
// A packet whose destination is this node takes the direct local channel
// (loc_req_* to the memory side, loc_resp_* to the processor side) and never
// enters the router. The rest share the injection link: requests on VC 0,
// responses on VC 1, interleaved flit by flit (round robin when both are
// ready), each flit sent only with a credit for its VC. The link output is
// registered.
// Header/data builders, header register, sequence numbers from the reorder
// unit and the local channel are the reference design's; the header layout
// and the builder state machines are this design's.
// Lint: W beats are counted against the header length, so WLAST is not
// read; the B beat's ID is not read either, because the write-information
// FIFO already carries it.
module packetizer
  import noc_pkg::*;
#(
  parameter int unsigned MY_X           = 0,
  parameter int unsigned MY_Y           = 0,
  parameter int unsigned MESH_X         = 4,
  parameter int unsigned MESH_Y         = 4,
  parameter int unsigned ROUTER_CREDITS = VC_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor-side AXI queue
  input  logic              q_ar_valid,
  input  axi_ax_t           q_ar,
  output logic              q_ar_pop,
  input  logic              q_aw_valid,
  input  axi_ax_t           q_aw,
  output logic              q_aw_pop,
  input  logic              q_w_valid,
  input  axi_w_t            q_w,
  output logic              q_w_pop,
  // memory-side AXI queue
  input  logic              q_r_valid,
  input  axi_r_t            q_r,
  output logic              q_r_pop,
  input  logic              q_b_valid,
  input  axi_b_t            q_b,
  output logic              q_b_pop,
  // request information saved by the memory-side depacketizer
  input  logic              rd_info_valid,
  input  req_info_t         rd_info,
  output logic              rd_info_pop,
  input  logic              wr_info_valid,
  input  req_info_t         wr_info,
  output logic              wr_info_pop,
  // reorder unit
  input  logic              can_issue,
  output logic [ID_W-1:0]   seq_id,
  input  logic [SEQ_W-1:0]  seq_num,
  output logic              seq_take,
  // injection link to the router's Local input port
  output logic              out_valid,
  output flit_t             out_flit,
  input  logic [NUM_VC-1:0] credit_in,
  // direct local channel
  output logic              loc_req_valid,
  output flit_t             loc_req_flit,
  input  logic              loc_req_ready,
  output logic              loc_resp_valid,
  output flit_t             loc_resp_flit,
  input  logic              loc_resp_ready
);
  typedef enum logic [1:0] {B_IDLE, B_HDR, B_ADDR, B_DATA} bld_state_e;

  // ---------------------------------------------------------------- requests
  bld_state_e       rq_state;
  header_t          rq_hdr_q;       // header register
  logic [ADDR_W-1:0] rq_addr_q;
  logic             rq_local_q;
  logic [LEN_W-1:0] rq_beat_q;
  logic             rq_prefer_rd;
  logic             rq_valid, rq_ready, rq_fire;
  flit_t            rq_flit;

  logic             pick_rd, pick_wr;
  axi_ax_t          pick_ax;
  logic [XW-1:0]    dec_x;
  logic [YW-1:0]    dec_y;

  assign pick_rd = (rq_state == B_IDLE) && can_issue && q_ar_valid && (rq_prefer_rd || !q_aw_valid);
  assign pick_wr = (rq_state == B_IDLE) && can_issue && q_aw_valid && !pick_rd;
  assign pick_ax = pick_rd ? q_ar : q_aw;
  assign seq_id   = pick_ax.id;
  assign seq_take = pick_rd || pick_wr;
  assign q_ar_pop = pick_rd;
  assign q_aw_pop = pick_wr;

  addr_decoder #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_dec (
    .addr (pick_ax.addr), .dst_x (dec_x), .dst_y (dec_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_state     <= B_IDLE;
      rq_hdr_q     <= '0;
      rq_addr_q    <= '0;
      rq_local_q   <= 1'b0;
      rq_beat_q    <= '0;
      rq_prefer_rd <= 1'b1;
    end else begin
      case (rq_state)
        B_IDLE: if (pick_rd || pick_wr) begin
          rq_hdr_q.kind  <= pick_rd ? PK_RD_REQ : PK_WR_REQ;
          rq_hdr_q.dst_x <= dec_x;
          rq_hdr_q.dst_y <= dec_y;
          rq_hdr_q.src_x <= XW'(MY_X);
          rq_hdr_q.src_y <= YW'(MY_Y);
          rq_hdr_q.id    <= pick_ax.id;
          rq_hdr_q.seq   <= seq_num;
          rq_hdr_q.len   <= pick_ax.len;
          rq_hdr_q.rsvd  <= '0;
          rq_hdr_q.resp  <= '0;
          rq_addr_q      <= pick_ax.addr;
          rq_local_q     <= (dec_x == XW'(MY_X)) && (dec_y == YW'(MY_Y));
          rq_prefer_rd   <= !pick_rd;
          rq_state       <= B_HDR;
        end
        B_HDR:  if (rq_fire) rq_state <= B_ADDR;
        B_ADDR: if (rq_fire) begin
          rq_beat_q <= '0;
          rq_state  <= (rq_hdr_q.kind == PK_RD_REQ) ? B_IDLE : B_DATA;
        end
        B_DATA: if (rq_fire) begin
          rq_beat_q <= rq_beat_q + 1'b1;
          if (rq_flit.tail) rq_state <= B_IDLE;
        end
        default: rq_state <= B_IDLE;
      endcase
    end
  end

  always_comb begin
    rq_valid = 1'b0;
    rq_flit  = '{head: 1'b0, tail: 1'b0, vc: VC_REQ, data: '0};
    case (rq_state)
      B_HDR: begin
        rq_valid      = 1'b1;
        rq_flit.head  = 1'b1;
        rq_flit.data  = FLIT_W'(rq_hdr_q);
      end
      B_ADDR: begin
        rq_valid      = 1'b1;
        rq_flit.tail  = (rq_hdr_q.kind == PK_RD_REQ);
        rq_flit.data  = rq_addr_q;
      end
      B_DATA: begin
        rq_valid      = q_w_valid;
        rq_flit.tail  = (rq_beat_q == rq_hdr_q.len);
        rq_flit.data  = q_w.data;
      end
      default: ;
    endcase
  end
  assign q_w_pop = (rq_state == B_DATA) && rq_fire;

  // --------------------------------------------------------------- responses
  bld_state_e rs_state;
  header_t    rs_hdr_q;
  logic       rs_local_q;
  logic       rs_prefer_rd;
  logic       rs_valid, rs_ready, rs_fire;
  flit_t      rs_flit;
  logic       take_rd, take_wr;
  req_info_t  take_info;

  assign take_rd = (rs_state == B_IDLE) && q_r_valid && rd_info_valid &&
                   (rs_prefer_rd || !(q_b_valid && wr_info_valid));
  assign take_wr = (rs_state == B_IDLE) && q_b_valid && wr_info_valid && !take_rd;
  assign take_info   = take_rd ? rd_info : wr_info;
  assign rd_info_pop = take_rd;
  assign wr_info_pop = take_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs_state     <= B_IDLE;
      rs_hdr_q     <= '0;
      rs_local_q   <= 1'b0;
      rs_prefer_rd <= 1'b1;
    end else begin
      case (rs_state)
        B_IDLE: if (take_rd || take_wr) begin
          rs_hdr_q.kind  <= take_rd ? PK_RD_RESP : PK_WR_RESP;
          rs_hdr_q.dst_x <= take_info.src_x;
          rs_hdr_q.dst_y <= take_info.src_y;
          rs_hdr_q.src_x <= XW'(MY_X);
          rs_hdr_q.src_y <= YW'(MY_Y);
          rs_hdr_q.id    <= take_info.id;
          rs_hdr_q.seq   <= take_info.seq;
          rs_hdr_q.len   <= take_info.len;
          rs_hdr_q.rsvd  <= '0;
          rs_hdr_q.resp  <= take_rd ? 2'b00 : q_b.resp;
          rs_local_q     <= (take_info.src_x == XW'(MY_X)) && (take_info.src_y == YW'(MY_Y));
          rs_prefer_rd   <= !take_rd;
          rs_state       <= B_HDR;
        end
        B_HDR: if (rs_fire) rs_state <= (rs_hdr_q.kind == PK_WR_RESP) ? B_IDLE : B_DATA;
        B_DATA: if (rs_fire && rs_flit.tail) rs_state <= B_IDLE;
        default: rs_state <= B_IDLE;
      endcase
    end
  end

  always_comb begin
    rs_valid = 1'b0;
    rs_flit  = '{head: 1'b0, tail: 1'b0, vc: VC_RESP, data: '0};
    case (rs_state)
      B_HDR: begin
        rs_valid     = 1'b1;
        rs_flit.head = 1'b1;
        rs_flit.tail = (rs_hdr_q.kind == PK_WR_RESP);
        rs_flit.data = FLIT_W'(rs_hdr_q);
      end
      B_DATA: begin
        rs_valid     = q_r_valid;
        rs_flit.tail = q_r.last;
        rs_flit.data = q_r.data;
      end
      default: ;
    endcase
  end
  assign q_b_pop = take_wr;
  assign q_r_pop = (rs_state == B_DATA) && rs_fire;

  // ------------------------------------------------- link and local channel
  localparam int unsigned CW = $clog2(ROUTER_CREDITS + 1);
  logic [CW-1:0] credits [NUM_VC];
  logic          rq_link, rs_link, last_was_resp;

  assign rq_link = rq_valid && !rq_local_q && (credits[VC_REQ] != '0);
  assign rs_link = rs_valid && !rs_local_q && (credits[VC_RESP] != '0);

  logic send_rq, send_rs;
  assign send_rq = rq_link && (!rs_link || last_was_resp);
  assign send_rs = rs_link && !send_rq;

  assign loc_req_valid  = rq_valid && rq_local_q;
  assign loc_req_flit   = rq_flit;
  assign loc_resp_valid = rs_valid && rs_local_q;
  assign loc_resp_flit  = rs_flit;

  assign rq_ready = rq_local_q ? loc_req_ready : send_rq;
  assign rs_ready = rs_local_q ? loc_resp_ready : send_rs;
  assign rq_fire  = rq_valid && rq_ready;
  assign rs_fire  = rs_valid && rs_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_flit      <= '0;
      last_was_resp <= 1'b0;
      for (int v = 0; v < NUM_VC; v++) credits[v] <= CW'(ROUTER_CREDITS);
    end else begin
      out_valid <= send_rq || send_rs;
      if (send_rq)      out_flit <= rq_flit;
      else if (send_rs) out_flit <= rs_flit;
      if (send_rq || send_rs) last_was_resp <= send_rs;
      credits[VC_REQ]  <= credits[VC_REQ]  - CW'(send_rq) + CW'(credit_in[VC_REQ]);
      credits[VC_RESP] <= credits[VC_RESP] - CW'(send_rs) + CW'(credit_in[VC_RESP]);
    end
  end

  a_burst_fits: assert property (@(posedge clk) disable iff (!rst_n)
                                 seq_take |-> (32'(pick_ax.len) < MAX_BURST));
  a_rdata_matches: assert property (@(posedge clk) disable iff (!rst_n)
                                    take_rd |-> (q_r.id == rd_info.id));

endmodule
