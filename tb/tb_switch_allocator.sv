// tb_switch_allocator: (1) input 0 VC 0 streams to East: exactly VC_DEPTH
// flits are granted, then nothing until a credit returns, then one more.
// (2) inputs 1 and 3 both want North: grants alternate (round robin), one
// per cycle. (3) input 4 has both VCs active towards different outputs:
// at most one of them is granted per cycle. A tail flit releases its VC.
module tb_switch_allocator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NUM_VC-1:0] sa_req  [NUM_PORTS];
  port_e             sa_port [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0] sa_tail [NUM_PORTS];
  logic [NUM_VC-1:0] sa_gnt  [NUM_PORTS];
  logic [NUM_VC-1:0] credit_in  [NUM_PORTS];
  logic [NUM_PORTS-1:0] out_valid;
  logic [2:0]        out_sel    [NUM_PORTS];
  logic [NUM_VC-1:0] release_vc [NUM_PORTS];
  int checks = 0, failures = 0;

  switch_allocator dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int granted, last;
    for (int i = 0; i < NUM_PORTS; i++) begin
      sa_req[i] = '0; sa_tail[i] = '0; credit_in[i] = '0;
      for (int v = 0; v < NUM_VC; v++) sa_port[i][v] = P_LOCAL;
    end
    @(negedge clk); rst_n = 1;
    // (1) credits
    @(negedge clk);
    sa_req[0][0] = 1; sa_port[0][0] = P_EAST;
    granted = 0;
    for (int t = 0; t < 10; t++) begin
      #1;
      if (sa_gnt[0][0]) begin
        granted++;
        check(out_valid[P_EAST] && out_sel[P_EAST] == 3'd0, "East output selects input 0");
      end
      @(negedge clk);
    end
    check(granted == VC_DEPTH, $sformatf("granted %0d flits on %0d credits", granted, VC_DEPTH));
    credit_in[P_EAST][0] = 1;
    @(negedge clk);
    credit_in[P_EAST][0] = 0;
    #1;
    check(sa_gnt[0][0], "one flit after one credit");
    @(negedge clk);
    #1;
    check(!sa_gnt[0][0], "stalled again without credit");
    sa_req[0][0] = 0;
    // (2) round robin on North
    @(negedge clk);
    sa_req[1][0] = 1; sa_port[1][0] = P_NORTH;
    sa_req[3][0] = 1; sa_port[3][0] = P_NORTH;
    last = -1;
    for (int t = 0; t < 4; t++) begin
      int w;
      #1;
      check(sa_gnt[1][0] ^ sa_gnt[3][0], "one of inputs 1 and 3 per cycle");
      w = sa_gnt[1][0] ? 1 : 3;
      if (last >= 0) check(w != last, "round robin alternates");
      last = w;
      @(negedge clk);
    end
    sa_req[1][0] = 0; sa_req[3][0] = 0;
    // (3) one flit per input per cycle, tail release
    for (int o = 0; o < NUM_PORTS; o++) credit_in[o] = '1;
    @(negedge clk);
    for (int o = 0; o < NUM_PORTS; o++) credit_in[o] = '0;
    sa_req[4] = 2'b11; sa_port[4][0] = P_SOUTH; sa_port[4][1] = P_WEST; sa_tail[4] = 2'b11;
    for (int t = 0; t < 4; t++) begin
      #1;
      check($countones(sa_gnt[4]) == 1, "exactly one VC of input 4 granted");
      check(release_vc[P_SOUTH][0] == sa_gnt[4][0] && release_vc[P_WEST][1] == sa_gnt[4][1],
            "tail grant releases its output VC");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
