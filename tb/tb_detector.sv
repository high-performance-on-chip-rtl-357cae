// tb_detector: four sources offer packets at random: network VC 0 and the
// local request channel carry requests, network VC 1 and the local response
// channel carry responses. The request output (memory side) and the response
// output (reorder unit) are accepted at random. Every packet must reach the
// output its kind selects, whole and never interleaved with another packet,
// and each source's packets must keep their order. Each flit names its
// source and packet number in its data so the checker can tell them apart.
module tb_detector;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NUM_VC-1:0] net_valid, net_pop;
  flit_t             net_flit [NUM_VC];
  logic  loc_req_valid, loc_req_ready, loc_resp_valid, loc_resp_ready;
  flit_t loc_req_flit, loc_resp_flit;
  logic  req_valid, req_ready, resp_valid, resp_ready;
  flit_t req_flit, resp_flit;
  int checks = 0, failures = 0;

  detector dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  flit_t sq [4][$];       // per source: flits still to offer
  flit_t eq [4][$];       // per source: flits still expected at an output

  // source 0: net VC0 (requests), 1: net VC1 (responses), 2: local requests,
  // 3: local responses
  task automatic gen(int src, int n);
    for (int p = 0; p < n; p++) begin
      header_t h;
      int nb;
      h = '0;
      if (src == 0 || src == 2) h.kind = ($urandom % 2) ? PK_WR_REQ : PK_RD_REQ;
      else                      h.kind = ($urandom % 2) ? PK_WR_RESP : PK_RD_RESP;
      h.rsvd = 8'(src * 64 + p);
      nb = (h.kind == PK_WR_RESP) ? 0 : 1 + $urandom % 4;
      sq[src].push_back('{head: 1, tail: nb == 0, vc: src % 2, data: h});
      for (int i = 0; i < nb; i++)
        sq[src].push_back('{head: 0, tail: i == nb - 1, vc: src % 2, data: {8'(src), 8'(p), 16'(i)}});
    end
    eq[src] = sq[src];
  endtask

  int cur [2] = '{-1, -1};   // source currently owning each output

  task automatic take(int tgt, flit_t f);
    int src;
    if (f.head) begin
      header_t h;
      h = f.data;
      check(cur[tgt] < 0, "head only after a tail");
      check(h.kind[1] == 1'(tgt), "packet reaches the output its kind selects");
      src = int'(h.rsvd) / 64;
      cur[tgt] = src;
    end else begin
      src = cur[tgt];
    end
    if (src < 0 || eq[src].size() == 0) begin
      check(0, "unexpected flit");
    end else begin
      check(f == eq[src][0], $sformatf("source %0d order at output %0d", src, tgt));
      void'(eq[src].pop_front());
    end
    if (f.tail) cur[tgt] = -1;
  endtask

  initial begin
    bit off [4];
    gen(0, 60); gen(1, 60); gen(2, 60); gen(3, 60);
    net_valid = '0; net_flit[0] = '0; net_flit[1] = '0;
    loc_req_valid = 0; loc_req_flit = '0; loc_resp_valid = 0; loc_resp_flit = '0;
    req_ready = 0; resp_ready = 0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20000 && (eq[0].size() + eq[1].size() + eq[2].size() + eq[3].size()) > 0; t++) begin
      @(negedge clk);
      for (int s = 0; s < 4; s++) off[s] = sq[s].size() > 0 && ($urandom % 4 != 0);
      net_valid[0] = off[0]; net_flit[0] = off[0] ? sq[0][0] : '0;
      net_valid[1] = off[1]; net_flit[1] = off[1] ? sq[1][0] : '0;
      loc_req_valid  = off[2]; loc_req_flit  = off[2] ? sq[2][0] : '0;
      loc_resp_valid = off[3]; loc_resp_flit = off[3] ? sq[3][0] : '0;
      req_ready  = $urandom % 3 != 0;
      resp_ready = $urandom % 3 != 0;
      #1;
      if (req_valid && req_ready)   take(0, req_flit);
      if (resp_valid && resp_ready) take(1, resp_flit);
      if (net_pop[0])     void'(sq[0].pop_front());
      if (net_pop[1])     void'(sq[1].pop_front());
      if (off[2] && loc_req_ready)  void'(sq[2].pop_front());
      if (off[3] && loc_resp_ready) void'(sq[3].pop_front());
      check(!(net_pop[0] && !off[0]) && !(net_pop[1] && !off[1]), "pop only offered flits");
    end
    for (int s = 0; s < 4; s++)
      check(eq[s].size() == 0 && sq[s].size() == 0, $sformatf("source %0d fully delivered", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
