// tb_packetizer: the packetizer of node (1,2) in a 4x4 mesh, with the AXI
// queues, request-information FIFOs and the reorder unit's sequence counter
// modelled by the testbench. Reads and writes (30% to the node itself) and
// read/write responses (30% back to the node itself) are fed at random;
// can_issue, the local channel readies and the link credits (returned after a
// random delay) vary at random. Each request must become header (kind,
// decoded destination, own source, ID, the sequence number it took, length),
// address and, for writes, the data with the tail on the last beat; each
// response a header addressed to the saved source with the saved ID,
// sequence number and length, plus the read data. Requests go on VC 0 and
// responses on VC 1, or to the local channels when the destination is this
// node, in order per stream; the link never exceeds its credits.
module tb_packetizer;
  import noc_pkg::*;
  localparam int MX = 1, MY = 2, ME = MY * 4 + MX;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic q_ar_valid, q_ar_pop, q_aw_valid, q_aw_pop, q_w_valid, q_w_pop;
  logic q_r_valid, q_r_pop, q_b_valid, q_b_pop;
  axi_ax_t q_ar, q_aw;
  axi_w_t  q_w;
  axi_r_t  q_r;
  axi_b_t  q_b;
  logic rd_info_valid, rd_info_pop, wr_info_valid, wr_info_pop;
  req_info_t rd_info, wr_info;
  logic can_issue, seq_take;
  logic [ID_W-1:0] seq_id;
  logic [SEQ_W-1:0] seq_num;
  logic out_valid;
  flit_t out_flit;
  logic [NUM_VC-1:0] credit_in;
  logic loc_req_valid, loc_req_ready, loc_resp_valid, loc_resp_ready;
  flit_t loc_req_flit, loc_resp_flit;
  int checks = 0, failures = 0;

  packetizer #(.MY_X(MX), .MY_Y(MY)) dut (.*);

  // sequence counter of the reorder unit
  logic [SEQ_W-1:0] seq_ctr [16];
  assign seq_num = seq_ctr[seq_id];
  always @(posedge clk or negedge rst_n)
    if (!rst_n) for (int i = 0; i < 16; i++) seq_ctr[i] <= '0;
    else if (seq_take) seq_ctr[seq_id] <= seq_ctr[seq_id] + 1'b1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  axi_ax_t ar_q [$], aw_q [$];
  axi_w_t  w_q [$];
  axi_r_t  r_q [$];
  axi_b_t  b_q [$];
  req_info_t ri_q [$], wi_q [$];
  logic [31:0] w_exp [$], r_exp [$];
  flit_t e_rq_link [$], e_rq_loc [$], e_rs_link [$], e_rs_loc [$];
  int pend [NUM_VC][$];
  int cred [NUM_VC];

  function automatic int pick_node();
    return ($urandom % 10 < 3) ? ME : $urandom % 16;
  endfunction

  task automatic push_exp(bit local_, bit resp, flit_t f);
    if (resp) begin if (local_) e_rs_loc.push_back(f); else e_rs_link.push_back(f); end
    else      begin if (local_) e_rq_loc.push_back(f); else e_rq_link.push_back(f); end
  endtask

  task automatic got(string what, flit_t f, ref flit_t q [$]);
    if (q.size() == 0) begin
      check(0, {"unexpected flit on ", what});
    end else begin
      check(f == q[0], $sformatf("%s flit %h expected %h", what, f.data, q[0].data));
      void'(q.pop_front());
    end
  endtask

  initial begin
    int n_req = 0, n_rsp = 0;
    q_ar_valid = 0; q_aw_valid = 0; q_w_valid = 0; q_r_valid = 0; q_b_valid = 0;
    q_ar = '0; q_aw = '0; q_w = '0; q_r = '0; q_b = '0;
    rd_info_valid = 0; wr_info_valid = 0; rd_info = '0; wr_info = '0;
    can_issue = 0; credit_in = '0; loc_req_ready = 0; loc_resp_ready = 0;
    cred[0] = VC_DEPTH; cred[1] = VC_DEPTH;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40000; t++) begin
      bit done;
      @(negedge clk);
      // link output of the last edge, credits coming back
      if (out_valid) begin
        check(cred[out_flit.vc] > 0, "link flit only with a credit");
        cred[out_flit.vc]--;
        if (out_flit.vc == VC_REQ) got("link VC0", out_flit, e_rq_link);
        else                       got("link VC1", out_flit, e_rs_link);
        pend[out_flit.vc].push_back(1 + $urandom % 8);
      end
      for (int v = 0; v < NUM_VC; v++) begin
        credit_in[v] = 0;
        foreach (pend[v][k]) pend[v][k]--;
        if (pend[v].size() > 0 && pend[v][0] <= 0) begin
          credit_in[v] = 1; cred[v]++; void'(pend[v].pop_front());
        end
      end
      // new work
      if (t < 15000) begin
        if ($urandom % 16 == 0) begin
          ar_q.push_back('{id: ID_W'($urandom), addr: {1'b0, 4'(pick_node()), 27'($urandom)},
                          len: LEN_W'($urandom % MAX_BURST)});
          n_req++;
        end
        if ($urandom % 16 == 0) begin
          axi_ax_t a;
          a = '{id: ID_W'($urandom), addr: {1'b0, 4'(pick_node()), 27'($urandom)},
                len: LEN_W'($urandom % MAX_BURST)};
          aw_q.push_back(a);
          for (int i = 0; i <= int'(a.len); i++) begin
            logic [31:0] d;
            d = $urandom;
            w_q.push_back('{data: d, last: i == int'(a.len)});
            w_exp.push_back(d);
          end
          n_req++;
        end
        if ($urandom % 16 == 0) begin
          int n;
          req_info_t ri;
          n = pick_node();
          ri = '{src_x: XW'(n % 4), src_y: YW'(n / 4), id: ID_W'($urandom),
                 seq: SEQ_W'($urandom), len: LEN_W'($urandom % MAX_BURST)};
          ri_q.push_back(ri);
          for (int i = 0; i <= int'(ri.len); i++) begin
            logic [31:0] d;
            d = $urandom;
            r_q.push_back('{id: ri.id, data: d, last: i == int'(ri.len)});
            r_exp.push_back(d);
          end
          n_rsp++;
        end
        if ($urandom % 16 == 0) begin
          int n;
          req_info_t wi;
          n = pick_node();
          wi = '{src_x: XW'(n % 4), src_y: YW'(n / 4), id: ID_W'($urandom),
                 seq: SEQ_W'($urandom), len: LEN_W'($urandom % MAX_BURST)};
          wi_q.push_back(wi);
          b_q.push_back('{id: wi.id, resp: 2'($urandom)});
          n_rsp++;
        end
      end
      q_ar_valid = ar_q.size() > 0; q_ar = q_ar_valid ? ar_q[0] : '0;
      q_aw_valid = aw_q.size() > 0; q_aw = q_aw_valid ? aw_q[0] : '0;
      q_w_valid  = w_q.size() > 0;  q_w  = q_w_valid ? w_q[0] : '0;
      q_r_valid  = r_q.size() > 0;  q_r  = q_r_valid ? r_q[0] : '0;
      q_b_valid  = b_q.size() > 0;  q_b  = q_b_valid ? b_q[0] : '0;
      rd_info_valid = ri_q.size() > 0; rd_info = rd_info_valid ? ri_q[0] : '0;
      wr_info_valid = wi_q.size() > 0; wr_info = wr_info_valid ? wi_q[0] : '0;
      can_issue      = $urandom % 4 != 0;
      loc_req_ready  = $urandom % 3 != 0;
      loc_resp_ready = $urandom % 3 != 0;
      #1;
      // requests picked in this cycle
      if (q_ar_pop || q_aw_pop) begin
        axi_ax_t a;
        header_t h;
        int node;
        bit loc;
        check(can_issue, "request taken only when allowed");
        check(!(q_ar_pop && q_aw_pop), "one request at a time");
        a = q_ar_pop ? q_ar : q_aw;
        node = a.addr[30:27];
        loc = (node == ME);
        h = '0;
        h.kind = q_ar_pop ? PK_RD_REQ : PK_WR_REQ;
        h.dst_x = XW'(node % 4); h.dst_y = YW'(node / 4);
        h.src_x = XW'(MX); h.src_y = YW'(MY);
        h.id = a.id; h.seq = seq_ctr[a.id]; h.len = a.len;
        push_exp(loc, 0, '{head: 1, tail: 0, vc: VC_REQ, data: h});
        push_exp(loc, 0, '{head: 0, tail: q_ar_pop, vc: VC_REQ, data: a.addr});
        if (q_aw_pop)
          for (int i = 0; i <= int'(a.len); i++)
            push_exp(loc, 0, '{head: 0, tail: i == int'(a.len), vc: VC_REQ, data: w_exp.pop_front()});
        if (q_ar_pop) void'(ar_q.pop_front()); else void'(aw_q.pop_front());
      end
      if (rd_info_pop || wr_info_pop) begin
        req_info_t ri;
        header_t h;
        bit loc;
        check(!(rd_info_pop && wr_info_pop), "one response at a time");
        ri = rd_info_pop ? rd_info : wr_info;
        loc = (ri.src_x == XW'(MX)) && (ri.src_y == YW'(MY));
        h = '0;
        h.kind = rd_info_pop ? PK_RD_RESP : PK_WR_RESP;
        h.dst_x = ri.src_x; h.dst_y = ri.src_y; h.src_x = XW'(MX); h.src_y = YW'(MY);
        h.id = ri.id; h.seq = ri.seq; h.len = ri.len;
        h.resp = rd_info_pop ? 2'b00 : q_b.resp;
        push_exp(loc, 1, '{head: 1, tail: wr_info_pop, vc: VC_RESP, data: h});
        if (rd_info_pop)
          for (int i = 0; i <= int'(ri.len); i++)
            push_exp(loc, 1, '{head: 0, tail: i == int'(ri.len), vc: VC_RESP, data: r_exp.pop_front()});
        if (rd_info_pop) void'(ri_q.pop_front()); else void'(wi_q.pop_front());
        check(wr_info_pop == q_b_pop, "B popped with its information");
        if (q_b_pop) void'(b_q.pop_front());
      end
      if (q_w_pop) void'(w_q.pop_front());
      if (q_r_pop) void'(r_q.pop_front());
      if (loc_req_valid && loc_req_ready)   got("local request", loc_req_flit, e_rq_loc);
      if (loc_resp_valid && loc_resp_ready) got("local response", loc_resp_flit, e_rs_loc);
      done = t > 15000 && ar_q.size() == 0 && aw_q.size() == 0 && ri_q.size() == 0 &&
             wi_q.size() == 0 && e_rq_link.size() == 0 && e_rq_loc.size() == 0 &&
             e_rs_link.size() == 0 && e_rs_loc.size() == 0;
      if (done) break;
    end
    check(e_rq_link.size() + e_rq_loc.size() + e_rs_link.size() + e_rs_loc.size() == 0 &&
          ar_q.size() + aw_q.size() + ri_q.size() + wi_q.size() == 0, "all packets sent");
    check(n_req > 1000 && n_rsp > 1000, $sformatf("enough traffic: %0d requests %0d responses", n_req, n_rsp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
