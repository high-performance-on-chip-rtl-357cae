// tb_mem_axi_queue: random traffic on the R and B channels from the memory
// side with random pops. Every entry must come out once, in order; ready
// must drop only when a queue holds its full depth, and each queue must be
// filled at least once. Inputs are driven at the falling edge.
module tb_mem_axi_queue;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic r_valid, r_ready, b_valid, b_ready;
  axi_r_t r, q_r;
  axi_b_t b, q_b;
  logic q_r_valid, q_r_pop, q_b_valid, q_b_pop;
  int checks = 0, failures = 0;

  mem_axi_queue dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    axi_r_t sr [$];
    axi_b_t sb [$];
    int full_r = 0, full_b = 0;
    r_valid = 0; b_valid = 0; r = '0; b = '0; q_r_pop = 0; q_b_pop = 0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int phase;
      @(negedge clk);
      phase = (t / 300) % 2;
      r_valid = ($urandom % 4) < (phase ? 1 : 3);
      b_valid = ($urandom % 4) < (phase ? 1 : 3);
      r = '{id: ID_W'($urandom), data: $urandom, last: 1'($urandom)};
      b = '{id: ID_W'($urandom), resp: 2'($urandom)};
      #1;
      q_r_pop = q_r_valid && (($urandom % 4) < (phase ? 3 : 1));
      q_b_pop = q_b_valid && (($urandom % 4) < (phase ? 3 : 1));
      #1;
      check(r_ready == (sr.size() < NI_Q_DEPTH), "R ready iff not full");
      check(b_ready == (sb.size() < NI_Q_DEPTH), "B ready iff not full");
      check(q_r_valid == (sr.size() > 0) && q_b_valid == (sb.size() > 0), "valid iff not empty");
      if (sr.size() == NI_Q_DEPTH) full_r++;
      if (sb.size() == NI_Q_DEPTH) full_b++;
      if (q_r_pop) begin check(q_r == sr[0], "R order"); void'(sr.pop_front()); end
      if (q_b_pop) begin check(q_b == sb[0], "B order"); void'(sb.pop_front()); end
      if (r_valid && r_ready) sr.push_back(r);
      if (b_valid && b_ready) sb.push_back(b);
    end
    check(full_r > 0 && full_b > 0, "every queue was filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
