// tb_network_interface: one network interface at node (1,2) of a 4x4 mesh
// with a behavioural processor (tb_traffic_gen) on its AXI slave side and a
// behavioural memory (axi_mem_model) on its AXI master side. The testbench
// stands in for the router: it takes the request packets the interface sends
// (VC 0), executes them against its own copy of the remote memories and
// returns the responses after random delays, so responses of one ID arrive
// out of order and the reorder unit must restore the order the processor
// checks. It also injects read and write requests from other nodes into the
// interface (VC 0) and checks the responses it sends back (VC 1): header
// fields, destination and read data. Both directions use credit flow control
// with random credit-return delays; the interface must never hold more
// flits in the router than the router's VC buffers. The processor also sends 30% of its
// requests to its own rank, which use the local channel.
module tb_network_interface;
  import noc_pkg::*;
  localparam int MX = 1, MY = 2, ME = MY * 4 + MX;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_ar_valid, s_ar_ready, s_aw_valid, s_aw_ready, s_w_valid, s_w_ready;
  logic s_r_valid, s_r_ready, s_b_valid, s_b_ready;
  axi_ax_t s_ar, s_aw;
  axi_w_t  s_w;
  axi_r_t  s_r;
  axi_b_t  s_b;
  logic m_ar_valid, m_ar_ready, m_aw_valid, m_aw_ready, m_w_valid, m_w_ready;
  logic m_r_valid, m_r_ready, m_b_valid, m_b_ready;
  axi_ax_t m_ar, m_aw;
  axi_w_t  m_w;
  axi_r_t  m_r;
  axi_b_t  m_b;
  logic              tx_valid, rx_valid;
  flit_t             tx_flit, rx_flit;
  logic [NUM_VC-1:0] tx_credit, rx_credit;
  logic              ev_rob_store, ev_rob_release;

  logic   start, start_rb, done, rb_done;
  int     tg_checks, tg_failures, lat_cnt;
  longint lat_sum;
  int     checks = 0, failures = 0;
  int     n_stored = 0, n_released = 0;

  network_interface #(.MY_X(MX), .MY_Y(MY), .MESH_X(4), .MESH_Y(4)) dut (
    .clk, .rst_n,
    .s_ar_valid, .s_ar_ready, .s_ar, .s_aw_valid, .s_aw_ready, .s_aw,
    .s_w_valid, .s_w_ready, .s_w, .s_r_valid, .s_r_ready, .s_r,
    .s_b_valid, .s_b_ready, .s_b,
    .m_ar_valid, .m_ar_ready, .m_ar, .m_aw_valid, .m_aw_ready, .m_aw,
    .m_w_valid, .m_w_ready, .m_w, .m_r_valid, .m_r_ready, .m_r,
    .m_b_valid, .m_b_ready, .m_b,
    .tx_valid, .tx_flit, .tx_credit, .rx_valid, .rx_flit, .rx_credit,
    .ev_rob_store, .ev_rob_release
  );

  tb_traffic_gen #(.NODE(ME), .NODES(16)) u_gen (
    .clk, .rst_n, .start, .n_txn(300), .local_pct(30), .gap_max(2),
    .start_readback(start_rb), .done, .readback_done(rb_done),
    .checks(tg_checks), .failures(tg_failures), .lat_sum, .lat_cnt,
    .ar_valid(s_ar_valid), .ar_ready(s_ar_ready), .ar(s_ar),
    .aw_valid(s_aw_valid), .aw_ready(s_aw_ready), .aw(s_aw),
    .w_valid(s_w_valid), .w_ready(s_w_ready), .w(s_w),
    .r_valid(s_r_valid), .r_ready(s_r_ready), .r(s_r),
    .b_valid(s_b_valid), .b_ready(s_b_ready), .b(s_b)
  );

  axi_mem_model #(.NODE(ME)) u_mem (
    .clk, .rst_n, .latency(10),
    .ar_valid(m_ar_valid), .ar_ready(m_ar_ready), .ar(m_ar),
    .aw_valid(m_aw_valid), .aw_ready(m_aw_ready), .aw(m_aw),
    .w_valid(m_w_valid), .w_ready(m_w_ready), .w(m_w),
    .r_valid(m_r_valid), .r_ready(m_r_ready), .r(m_r),
    .b_valid(m_b_valid), .b_ready(m_b_ready), .b(m_b)
  );

  // the strobes depend only on registered state here: count at the falling edge
  always @(negedge clk) begin
    if (ev_rob_store)   n_stored++;
    if (ev_rob_release) n_released++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // remote memories (every rank but this one), indexed by the word address
  // with the bits the memories do not decode cleared
  logic [31:0] netmem [logic [31:0]];
  function automatic logic [31:0] canon(logic [31:0] a, int k);
    logic [10:0] idx;
    idx = 11'((a >> 2) + 32'(k));
    return {1'b0, a[30:27], 14'b0, idx, 2'b00};
  endfunction
  function automatic logic [31:0] net_read(logic [31:0] a);
    if (netmem.exists(a)) return netmem[a];
    return tb_pkg::init_word(a);
  endfunction

  typedef struct { flit_t f [$]; int due; } pkt_t;
  pkt_t  resp_pend [$];           // responses waiting for their release time
  pkt_t  req_pend [$];            // requests from other nodes to inject
  flit_t rx_cur [NUM_VC][$];      // packet being injected per VC
  int    rx_cred [NUM_VC];
  int    tx_used [NUM_VC] = '{0, 0};   // router buffer slots the interface holds
  int    tx_pend [NUM_VC][$];     // credit-return delays for the interface
  flit_t tx_pkt [NUM_VC][$];      // packet being received per VC
  flit_t exp_rd [$][$];           // expected read responses (flits) in order
  flit_t exp_wr [$];              // expected write responses in order
  int    cyc = 0;

  task automatic serve_request(flit_t p [$]);
    header_t h, r;
    logic [31:0] a;
    pkt_t rp;
    h = p[0].data;
    a = p[1].data;
    check(h.src_x == XW'(MX) && h.src_y == YW'(MY), "request carries its source");
    check(!(h.dst_x == XW'(MX) && h.dst_y == YW'(MY)), "own-rank requests stay local");
    check(int'(a[30:27]) == int'(h.dst_y) * 4 + int'(h.dst_x), "destination decoded from the address");
    r = '0;
    r.dst_x = h.src_x; r.dst_y = h.src_y; r.src_x = h.dst_x; r.src_y = h.dst_y;
    r.id = h.id; r.seq = h.seq; r.len = h.len;
    if (h.kind == PK_RD_REQ) begin
      check(p.size() == 2, "read request is header and address");
      r.kind = PK_RD_RESP;
      rp.f.push_back('{head: 1, tail: 0, vc: VC_RESP, data: r});
      for (int k = 0; k <= int'(h.len); k++)
        rp.f.push_back('{head: 0, tail: k == int'(h.len), vc: VC_RESP, data: net_read(canon(a, k))});
    end else begin
      check(p.size() == int'(h.len) + 3, "write request is header, address and data");
      for (int k = 0; k <= int'(h.len) && k + 2 < p.size(); k++) netmem[canon(a, k)] = p[k + 2].data;
      r.kind = PK_WR_RESP;
      rp.f.push_back('{head: 1, tail: 1, vc: VC_RESP, data: r});
    end
    rp.due = cyc + 4 + $urandom % 80;
    resp_pend.push_back(rp);
  endtask

  task automatic make_remote_request(int n);
    header_t h;
    pkt_t p;
    logic [31:0] a;
    int src, len;
    src = $urandom % 15;
    if (src >= ME) src++;
    len = $urandom % MAX_BURST;
    h = '0;
    h.dst_x = XW'(MX); h.dst_y = YW'(MY);
    h.src_x = XW'(src % 4); h.src_y = YW'(src / 4);
    h.id = ID_W'($urandom); h.seq = SEQ_W'(n); h.len = LEN_W'(len);
    if ($urandom % 2) begin
      header_t r;
      h.kind = PK_RD_REQ;
      a = {1'b0, 4'(ME), 14'b0, 1'b0, 7'($urandom), 3'b0, 2'b00};
      p.f.push_back('{head: 1, tail: 0, vc: VC_REQ, data: h});
      p.f.push_back('{head: 0, tail: 1, vc: VC_REQ, data: a});
      r = '0;
      r.kind = PK_RD_RESP; r.dst_x = h.src_x; r.dst_y = h.src_y; r.src_x = XW'(MX); r.src_y = YW'(MY);
      r.id = h.id; r.seq = h.seq; r.len = h.len;
      begin
        flit_t e [$];
        e.push_back('{head: 1, tail: 0, vc: VC_RESP, data: r});
        for (int k = 0; k <= len; k++)
          e.push_back('{head: 0, tail: k == len, vc: VC_RESP, data: tb_pkg::init_word(canon(a, k))});
        exp_rd.push_back(e);
      end
    end else begin
      header_t r;
      h.kind = PK_WR_REQ;
      // rank ME, write region of a node other than ME (never used by the processor)
      a = {1'b0, 4'(ME), 14'b0, 1'b1, 4'(src), 3'($urandom), 3'b0, 2'b00};
      p.f.push_back('{head: 1, tail: 0, vc: VC_REQ, data: h});
      p.f.push_back('{head: 0, tail: 0, vc: VC_REQ, data: a});
      for (int k = 0; k <= len; k++)
        p.f.push_back('{head: 0, tail: k == len, vc: VC_REQ, data: $urandom});
      r = '0;
      r.kind = PK_WR_RESP; r.dst_x = h.src_x; r.dst_y = h.src_y; r.src_x = XW'(MX); r.src_y = YW'(MY);
      r.id = h.id; r.seq = h.seq; r.len = h.len;
      exp_wr.push_back('{head: 1, tail: 1, vc: VC_RESP, data: r});
    end
    p.due = 0;
    req_pend.push_back(p);
  endtask

  task automatic check_response(flit_t p [$]);
    header_t h;
    h = p[0].data;
    if (h.kind == PK_RD_RESP) begin
      if (exp_rd.size() == 0) check(0, "unexpected read response");
      else begin
        check(p == exp_rd[0], "read response to another node");
        void'(exp_rd.pop_front());
      end
    end else begin
      if (exp_wr.size() == 0) check(0, "unexpected write response");
      else begin
        check(p.size() == 1 && p[0] == exp_wr[0], "write response to another node");
        void'(exp_wr.pop_front());
      end
    end
  endtask

  // network side, evaluated at every falling edge
  initial begin
    tx_credit = '0; rx_valid = 0; rx_flit = '0;
    rx_cred[0] = NI_Q_DEPTH; rx_cred[1] = NI_Q_DEPTH;
    for (int n = 0; n < 120; n++) make_remote_request(n);
    forever begin
      int v;
      bit can [NUM_VC];
      @(negedge clk);
      cyc++;
      if (!rst_n) continue;
      // flits the interface sent at the last edge
      if (tx_valid) begin
        tx_used[tx_flit.vc]++;
        check(tx_used[tx_flit.vc] <= VC_DEPTH, "interface never sends without a router credit");
        tx_pkt[tx_flit.vc].push_back(tx_flit);
        tx_pend[tx_flit.vc].push_back(1 + $urandom % 6);
        if (tx_flit.tail) begin
          if (tx_flit.vc == VC_REQ) serve_request(tx_pkt[VC_REQ]);
          else                      check_response(tx_pkt[VC_RESP]);
          tx_pkt[tx_flit.vc] = {};
        end
      end
      for (int k = 0; k < NUM_VC; k++) begin
        tx_credit[k] = 0;
        foreach (tx_pend[k][j]) tx_pend[k][j]--;
        if (tx_pend[k].size() > 0 && tx_pend[k][0] <= 0) begin
          tx_credit[k] = 1; tx_used[k]--; void'(tx_pend[k].pop_front());
        end
        if (rx_credit[k]) rx_cred[k]++;
      end
      // pick the next packets to inject: a random response that is due
      if (rx_cur[VC_RESP].size() == 0 && resp_pend.size() > 0) begin
        int idx, cnt;
        cnt = 0; idx = -1;
        foreach (resp_pend[j]) if (resp_pend[j].due <= cyc) begin
          cnt++;
          if ($urandom % cnt == 0) idx = j;
        end
        if (idx >= 0) begin
          rx_cur[VC_RESP] = resp_pend[idx].f;
          resp_pend.delete(idx);
        end
      end
      if (rx_cur[VC_REQ].size() == 0 && req_pend.size() > 0 && start && ($urandom % 8 == 0)) begin
        rx_cur[VC_REQ] = req_pend[0].f;
        void'(req_pend.pop_front());
      end
      for (int k = 0; k < NUM_VC; k++) can[k] = rx_cur[k].size() > 0 && rx_cred[k] > 0;
      v = (can[0] && can[1]) ? int'($urandom % 2) : (can[1] ? 1 : 0);
      rx_valid = can[v] && ($urandom % 4 != 0);
      rx_flit  = rx_valid ? rx_cur[v][0] : '0;
      if (rx_valid) begin
        void'(rx_cur[v].pop_front());
        rx_cred[v]--;
      end
    end
  end

  initial begin
    start = 0; start_rb = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    start = 1;
    while (!done) @(negedge clk);
    start = 0;
    start_rb = 1;
    while (!rb_done) @(negedge clk);
    start_rb = 0;
    repeat (200) @(negedge clk);
    check(req_pend.size() == 0 && exp_rd.size() == 0 && exp_wr.size() == 0,
          $sformatf("all remote requests answered (%0d/%0d/%0d left)", req_pend.size(), exp_rd.size(), exp_wr.size()));
    check(resp_pend.size() == 0 && rx_cur[0].size() == 0 && rx_cur[1].size() == 0, "network drained");
    check(n_stored > 0 && n_stored == n_released,
          $sformatf("reorder buffer used: %0d stored, %0d released", n_stored, n_released));
    $display("reordered responses: %0d", n_stored);
    $display("TB_RESULT checks=%0d failures=%0d", checks + tg_checks, failures + tg_failures);
    $finish;
  end
  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + tg_checks, failures + tg_failures + 1);
    $finish;
  end
endmodule
