// tb_crossbar: random flits and selects; each selected output must carry
// the chosen input's flit one clock later, unselected outputs stay invalid.
module tb_crossbar;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  flit_t                in_flit  [NUM_PORTS];
  logic [NUM_PORTS-1:0] sel_valid;
  logic [2:0]           sel      [NUM_PORTS];
  logic [NUM_PORTS-1:0] out_valid;
  flit_t                out_flit [NUM_PORTS];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    sel_valid = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin in_flit[p] = '0; sel[p] = '0; end
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      flit_t                exp_f [NUM_PORTS];
      logic [NUM_PORTS-1:0] exp_v;
      @(negedge clk);
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_flit[p] = '{head: 1'($urandom), tail: 1'($urandom), vc: 1'($urandom), data: $urandom};
        sel[p]     = 3'($urandom_range(NUM_PORTS - 1));
        sel_valid[p] = 1'($urandom);
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        exp_v[o] = sel_valid[o];
        exp_f[o] = in_flit[sel[o]];
      end
      @(negedge clk);
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (out_valid[o] != exp_v[o] || (exp_v[o] && out_flit[o] != exp_f[o])) begin
          failures++;
          $display("t%0d out %0d: valid %0d flit %h, expected %0d %h", t, o, out_valid[o],
                   out_flit[o], exp_v[o], exp_f[o]);
        end
      end
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
