// tb_proc_depacketizer: a random stream of read-response packets (header
// plus 1..8 data flits) and write-response packets (one header flit) is
// offered with random gaps while R and B are accepted at random. Every R
// beat must carry the packet's ID and data with RLAST on the last beat, and
// every write response must give one B beat with its ID and response code.
module tb_proc_depacketizer;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic   in_valid, in_ready, r_valid, r_ready, b_valid, b_ready;
  flit_t  in_flit;
  axi_r_t r;
  axi_b_t b;
  int checks = 0, failures = 0;

  proc_depacketizer dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    flit_t  fq [$];
    axi_r_t er [$];
    axi_b_t eb [$];
    int n_r = 0, n_b = 0;
    for (int p = 0; p < 200; p++) begin
      header_t h;
      h = '0;
      h.id = ID_W'($urandom);
      h.seq = SEQ_W'($urandom);
      if ($urandom % 2) begin
        h.kind = PK_WR_RESP; h.resp = 2'($urandom);
        fq.push_back('{head: 1, tail: 1, vc: 1, data: h});
        eb.push_back('{id: h.id, resp: h.resp});
      end else begin
        h.kind = PK_RD_RESP; h.len = LEN_W'($urandom % MAX_BURST);
        fq.push_back('{head: 1, tail: 0, vc: 1, data: h});
        for (int i = 0; i <= int'(h.len); i++) begin
          logic [31:0] d;
          d = $urandom;
          fq.push_back('{head: 0, tail: i == int'(h.len), vc: 1, data: d});
          er.push_back('{id: h.id, data: d, last: i == int'(h.len)});
        end
      end
    end
    in_valid = 0; in_flit = '0; r_ready = 0; b_ready = 0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20000 && (er.size() + eb.size()) > 0; t++) begin
      @(negedge clk);
      in_valid = fq.size() > 0 && ($urandom % 4 != 0);
      in_flit  = in_valid ? fq[0] : '0;
      r_ready  = $urandom % 3 != 0;
      b_ready  = $urandom % 3 != 0;
      #1;
      check(!(r_valid && b_valid), "never R and B together");
      if (r_valid && r_ready) begin
        check(er.size() > 0 && r == er[0], $sformatf("R beat %h", r.data));
        if (er.size() > 0) void'(er.pop_front());
        n_r++;
      end
      if (b_valid && b_ready) begin
        check(eb.size() > 0 && b == eb[0], "B beat");
        if (eb.size() > 0) void'(eb.pop_front());
        n_b++;
      end
      if (in_valid && in_ready) void'(fq.pop_front());
    end
    check(er.size() == 0 && eb.size() == 0 && fq.size() == 0, "all responses delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
