// tb_input_channel: a router input port at (1,1). A 3-flit packet to (3,1)
// arrives on VC 1 and a 2-flit packet to (1,0) on VC 0. Checks: VC
// allocation requests with the XY route (East, North), no switch request
// before the VC grant, flits leave in order from the granted VC only, one
// credit per flit on the right VC one cycle after the pop, and the VC goes
// back to routing after its tail.
module tb_input_channel;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic              in_valid;
  flit_t             in_flit;
  logic [NUM_VC-1:0] credit_out;
  logic [NUM_VC-1:0] va_req;
  port_e             va_port [NUM_VC];
  logic [NUM_VC-1:0] va_gnt;
  logic [NUM_VC-1:0] sa_req;
  port_e             sa_port [NUM_VC];
  logic [NUM_VC-1:0] sa_tail;
  logic [NUM_VC-1:0] sa_gnt;
  logic              xb_valid;
  flit_t             xb_flit;
  int checks = 0, failures = 0;
  int credits [NUM_VC];

  input_channel #(.MY_X(1), .MY_Y(1)) dut (.*);

  // credits are registered outputs: count them at the falling edge
  always @(negedge clk) for (int v = 0; v < NUM_VC; v++) if (credit_out[v]) credits[v]++;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic flit_t mk(bit h, bit t, bit vc, logic [31:0] d);
    return '{head: h, tail: t, vc: vc, data: d};
  endfunction

  function automatic logic [31:0] hdr(int dx, int dy);
    header_t hh;
    hh = '0;
    hh.kind = PK_RD_RESP; hh.dst_x = XW'(dx); hh.dst_y = YW'(dy);
    return hh;
  endfunction

  initial begin
    flit_t pk1 [3], pk0 [2];
    credits[0] = 0; credits[1] = 0;
    in_valid = 0; in_flit = '0; va_gnt = '0; sa_gnt = '0;
    pk1[0] = mk(1, 0, 1, hdr(3, 1)); pk1[1] = mk(0, 0, 1, 32'h1111); pk1[2] = mk(0, 1, 1, 32'h2222);
    pk0[0] = mk(1, 0, 0, hdr(1, 0)); pk0[1] = mk(0, 1, 0, 32'h3333);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); in_valid = 1; in_flit = pk1[i];
    end
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); in_valid = 1; in_flit = pk0[i];
    end
    @(negedge clk); in_valid = 0;
    #1;
    check(va_req == 2'b11, "both VCs ask for an output VC");
    check(va_port[1] == P_EAST && va_port[0] == P_NORTH, "XY routes East (VC1) and North (VC0)");
    check(sa_req == 2'b00, "no switch request before VC allocation");
    va_gnt = 2'b10;
    @(negedge clk);
    va_gnt = 2'b00;
    #1;
    check(sa_req == 2'b10 && sa_port[1] == P_EAST, "VC1 active towards East");
    // drain VC1
    for (int i = 0; i < 3; i++) begin
      sa_gnt = 2'b10;
      #1;
      check(xb_valid && xb_flit == pk1[i], $sformatf("VC1 flit %0d leaves in order", i));
      check(sa_tail[1] == (i == 2), "tail flag");
      @(negedge clk);
    end
    sa_gnt = 2'b00;
    #1;
    check(!sa_req[1] && !va_req[1], "VC1 idle after tail");
    @(negedge clk);
    @(negedge clk);
    check(credits[1] == 3, $sformatf("3 credits on VC1, got %0d", credits[1]));
    va_gnt = 2'b01;
    @(negedge clk);
    va_gnt = 2'b00;
    for (int i = 0; i < 2; i++) begin
      sa_gnt = 2'b01;
      #1;
      check(xb_valid && xb_flit == pk0[i], $sformatf("VC0 flit %0d leaves in order", i));
      @(negedge clk);
    end
    sa_gnt = 2'b00;
    @(negedge clk);
    @(negedge clk);
    check(credits[0] == 2 && credits[1] == 3, "credits per VC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
