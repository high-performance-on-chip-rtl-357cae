// tb_proc_axi_queue: random traffic on the AR, AW and W channels with random
// pops on the queue side. Every entry must come out once, in order, the
// ready signals must drop only when a queue holds its full depth, and a full
// queue must be reached at least once per channel. Inputs are driven at the
// falling edge; handshakes are decided just after it.
module tb_proc_axi_queue;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ar_valid, ar_ready, aw_valid, aw_ready, w_valid, w_ready;
  axi_ax_t ar, aw, q_ar, q_aw;
  axi_w_t w, q_w;
  logic q_ar_valid, q_ar_pop, q_aw_valid, q_aw_pop, q_w_valid, q_w_pop;
  int checks = 0, failures = 0;

  proc_axi_queue dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    axi_ax_t sar [$], saw [$];
    axi_w_t  sw [$];
    int full_ar = 0, full_aw = 0, full_w = 0;
    ar_valid = 0; aw_valid = 0; w_valid = 0; ar = '0; aw = '0; w = '0;
    q_ar_pop = 0; q_aw_pop = 0; q_w_pop = 0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int phase;
      @(negedge clk);
      phase = (t / 300) % 2;   // alternate fill-heavy and drain-heavy phases
      ar_valid = ($urandom % 4) < (phase ? 1 : 3);
      aw_valid = ($urandom % 4) < (phase ? 1 : 3);
      w_valid  = ($urandom % 4) < (phase ? 1 : 3);
      ar = '{id: ID_W'($urandom), addr: $urandom, len: LEN_W'($urandom)};
      aw = '{id: ID_W'($urandom), addr: $urandom, len: LEN_W'($urandom)};
      w  = '{data: $urandom, last: 1'($urandom)};
      #1;
      q_ar_pop = q_ar_valid && (($urandom % 4) < (phase ? 3 : 1));
      q_aw_pop = q_aw_valid && (($urandom % 4) < (phase ? 3 : 1));
      q_w_pop  = q_w_valid  && (($urandom % 4) < (phase ? 3 : 1));
      #1;
      check(ar_ready == (sar.size() < NI_Q_DEPTH), "AR ready iff not full");
      check(aw_ready == (saw.size() < NI_Q_DEPTH), "AW ready iff not full");
      check(w_ready  == (sw.size()  < NI_Q_DEPTH), "W ready iff not full");
      check(q_ar_valid == (sar.size() > 0) && q_aw_valid == (saw.size() > 0) &&
            q_w_valid == (sw.size() > 0), "queue valid iff not empty");
      if (sar.size() == NI_Q_DEPTH) full_ar++;
      if (saw.size() == NI_Q_DEPTH) full_aw++;
      if (sw.size()  == NI_Q_DEPTH) full_w++;
      if (q_ar_pop) begin check(q_ar == sar[0], "AR order"); void'(sar.pop_front()); end
      if (q_aw_pop) begin check(q_aw == saw[0], "AW order"); void'(saw.pop_front()); end
      if (q_w_pop)  begin check(q_w == sw[0], "W order");    void'(sw.pop_front());  end
      if (ar_valid && ar_ready) sar.push_back(ar);
      if (aw_valid && aw_ready) saw.push_back(aw);
      if (w_valid && w_ready)   sw.push_back(w);
    end
    check(full_ar > 0 && full_aw > 0 && full_w > 0, "every queue was filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
