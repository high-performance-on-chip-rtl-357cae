// tb_vc_allocator: contention for one output VC. Inputs 0 and 2 ask for
// East VC 0 together: exactly one wins, the VC stays busy (no second grant)
// until the release, then the other input wins. Meanwhile input 1 asks for
// East VC 1, which is independent and is granted at once.
module tb_vc_allocator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NUM_VC-1:0] va_req  [NUM_PORTS];
  port_e             va_port [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0] va_gnt  [NUM_PORTS];
  logic [NUM_VC-1:0] release_vc [NUM_PORTS];
  logic [NUM_VC-1:0] busy       [NUM_PORTS];
  int checks = 0, failures = 0;

  vc_allocator dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int first;
    for (int i = 0; i < NUM_PORTS; i++) begin
      va_req[i] = '0; release_vc[i] = '0;
      for (int v = 0; v < NUM_VC; v++) va_port[i][v] = P_LOCAL;
    end
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    va_req[0][0] = 1; va_port[0][0] = P_EAST;
    va_req[2][0] = 1; va_port[2][0] = P_EAST;
    va_req[1][1] = 1; va_port[1][1] = P_EAST;
    #1;
    check(va_gnt[0][0] ^ va_gnt[2][0], "exactly one of inputs 0 and 2 granted East VC0");
    check(va_gnt[1][1], "input 1 granted East VC1 in the same cycle");
    first = va_gnt[0][0] ? 0 : 2;
    @(negedge clk);
    va_req[first][0] = 0; va_req[1][1] = 0;
    #1;
    check(busy[P_EAST][0] && busy[P_EAST][1], "both East VCs busy");
    for (int k = 0; k < 4; k++) begin
      check(!va_gnt[2 - first][0], "no grant while East VC0 is owned");
      @(negedge clk);
    end
    release_vc[P_EAST][0] = 1;
    #1;
    check(!va_gnt[2 - first][0], "no grant in the release cycle");
    @(negedge clk);
    release_vc[P_EAST][0] = 0;
    #1;
    check(!busy[P_EAST][0], "East VC0 free after release");
    check(va_gnt[2 - first][0], "waiting input granted after release");
    check(busy[P_EAST][1], "East VC1 still busy");
    @(negedge clk);
    va_req[2 - first][0] = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
