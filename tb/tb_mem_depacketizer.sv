// tb_mem_depacketizer: a random stream of read requests (header, address)
// and write requests (header, address, 1..8 data flits) is offered with
// random gaps; AR, AW and W are accepted at random and the information FIFOs
// are popped at random. Each read must give one AR with the packet's ID,
// address and length and one read-information entry with source, ID,
// sequence and length; each write one AW, its W beats with WLAST on the last,
// and one write-information entry, all in arrival order.
module tb_mem_depacketizer;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic      in_valid, in_ready;
  flit_t     in_flit;
  logic      ar_valid, ar_ready, aw_valid, aw_ready, w_valid, w_ready;
  axi_ax_t   ar, aw;
  axi_w_t    w;
  logic      rd_info_valid, rd_info_pop, wr_info_valid, wr_info_pop;
  req_info_t rd_info, wr_info;
  int checks = 0, failures = 0;

  mem_depacketizer dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    flit_t     fq [$];
    axi_ax_t   ear [$], eaw [$];
    axi_w_t    ew [$];
    req_info_t eri [$], ewi [$];
    for (int p = 0; p < 200; p++) begin
      header_t h;
      logic [31:0] a;
      bit wr;
      h = '0;
      wr = $urandom % 2;
      h.kind = wr ? PK_WR_REQ : PK_RD_REQ;
      h.src_x = XW'($urandom); h.src_y = YW'($urandom);
      h.dst_x = XW'($urandom); h.dst_y = YW'($urandom);
      h.id = ID_W'($urandom); h.seq = SEQ_W'($urandom);
      h.len = LEN_W'($urandom % MAX_BURST);
      a = $urandom;
      fq.push_back('{head: 1, tail: 0, vc: 0, data: h});
      fq.push_back('{head: 0, tail: !wr, vc: 0, data: a});
      if (wr) begin
        eaw.push_back('{id: h.id, addr: a, len: h.len});
        ewi.push_back('{src_x: h.src_x, src_y: h.src_y, id: h.id, seq: h.seq, len: h.len});
        for (int i = 0; i <= int'(h.len); i++) begin
          logic [31:0] d;
          d = $urandom;
          fq.push_back('{head: 0, tail: i == int'(h.len), vc: 0, data: d});
          ew.push_back('{data: d, last: i == int'(h.len)});
        end
      end else begin
        ear.push_back('{id: h.id, addr: a, len: h.len});
        eri.push_back('{src_x: h.src_x, src_y: h.src_y, id: h.id, seq: h.seq, len: h.len});
      end
    end
    in_valid = 0; in_flit = '0; ar_ready = 0; aw_ready = 0; w_ready = 0;
    rd_info_pop = 0; wr_info_pop = 0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20000 && (ear.size() + eaw.size() + ew.size() + eri.size() + ewi.size()) > 0; t++) begin
      @(negedge clk);
      in_valid = fq.size() > 0 && ($urandom % 4 != 0);
      in_flit  = in_valid ? fq[0] : '0;
      ar_ready = $urandom % 3 != 0;
      aw_ready = $urandom % 3 != 0;
      w_ready  = $urandom % 3 != 0;
      #1;
      rd_info_pop = rd_info_valid && ($urandom % 3 == 0);
      wr_info_pop = wr_info_valid && ($urandom % 3 == 0);
      #1;
      if (ar_valid && ar_ready) begin
        check(ear.size() > 0 && ar == ear[0], "AR request");
        if (ear.size() > 0) void'(ear.pop_front());
      end
      if (aw_valid && aw_ready) begin
        check(eaw.size() > 0 && aw == eaw[0], "AW request");
        if (eaw.size() > 0) void'(eaw.pop_front());
      end
      if (w_valid && w_ready) begin
        check(ew.size() > 0 && w == ew[0], "W beat");
        if (ew.size() > 0) void'(ew.pop_front());
      end
      if (rd_info_pop) begin
        check(eri.size() > 0 && rd_info == eri[0], "read information");
        if (eri.size() > 0) void'(eri.pop_front());
      end
      if (wr_info_pop) begin
        check(ewi.size() > 0 && wr_info == ewi[0], "write information");
        if (ewi.size() > 0) void'(ewi.pop_front());
      end
      if (in_valid && in_ready) void'(fq.pop_front());
    end
    check((ear.size() + eaw.size() + ew.size() + eri.size() + ewi.size() + fq.size()) == 0,
          "all requests delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
