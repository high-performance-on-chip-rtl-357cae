// tb_packet_queue: flits for both VCs arrive from the router's local output,
// sent only while the sender holds a credit for that VC (credits start at
// the queue depth and come back through credit_out). The heads are popped at
// random. Each VC must deliver its flits in order, no flit may be lost or
// refused, and exactly one credit per popped flit must return on its VC.
module tb_packet_queue;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic              in_valid;
  flit_t             in_flit;
  logic [NUM_VC-1:0] credit_out, head_valid, pop;
  flit_t             head_flit [NUM_VC];
  int checks = 0, failures = 0;

  packet_queue dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    flit_t sq [NUM_VC][$];
    int cred [NUM_VC];
    int sent = 0, recvd = 0;
    in_valid = 0; in_flit = '0; pop = '0;
    cred[0] = NI_Q_DEPTH; cred[1] = NI_Q_DEPTH;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int v;
      @(negedge clk);
      for (int k = 0; k < NUM_VC; k++) if (credit_out[k]) cred[k]++;
      v = $urandom % NUM_VC;
      in_valid = (cred[v] > 0) && ($urandom % 2);
      in_flit = '{head: 1'($urandom), tail: 1'($urandom), vc: 1'(v), data: $urandom};
      for (int k = 0; k < NUM_VC; k++) pop[k] = head_valid[k] && (($urandom % 3) == 0);
      #1;
      for (int k = 0; k < NUM_VC; k++) begin
        check(head_valid[k] == (sq[k].size() > 0), "head valid iff flits stored");
        if (pop[k]) begin
          check(head_flit[k] == sq[k][0], $sformatf("VC%0d order", k));
          void'(sq[k].pop_front());
          recvd++;
        end
      end
      if (in_valid) begin sq[v].push_back(in_flit); cred[v]--; sent++; end
    end
    for (int t = 0; t < 4; t++) begin
      @(negedge clk);
      for (int k = 0; k < NUM_VC; k++) if (credit_out[k]) cred[k]++;
      pop = '0; in_valid = 0;
    end
    for (int k = 0; k < NUM_VC; k++)
      check(cred[k] + sq[k].size() == NI_Q_DEPTH, $sformatf("VC%0d credits balance %0d+%0d", k, cred[k], sq[k].size()));
    check(sent > 500 && recvd > 500, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
