// tb_router: one router at (1,1) of a 4x4 mesh with all five inputs driven
// by random packets (1..4 flits, random VC, random destination that does not
// turn back through its own input). Senders obey the credits the router
// returns; every output is followed by a sink that holds each flit for a
// random time before returning its credit. Checks: every flit leaves on the
// XY output for its destination, on its own VC, in order per input VC;
// packets are never interleaved within an output VC; credits balance and
// nothing is lost. Flits carry their input, VC and number in their data.
// Inputs are driven at the falling edge; registered outputs are sampled at
// the next falling edge.
module tb_router;
  import noc_pkg::*;
  localparam int MX = 1, MY = 1, NPKT = 150;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NUM_PORTS-1:0] in_valid, out_valid;
  flit_t                in_flit  [NUM_PORTS];
  flit_t                out_flit [NUM_PORTS];
  logic [NUM_VC-1:0]    credit_out [NUM_PORTS];
  logic [NUM_VC-1:0]    credit_in  [NUM_PORTS];
  int checks = 0, failures = 0;

  router #(.MY_X(MX), .MY_Y(MY)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int route(int dx, int dy);
    if (dx > MX) return P_EAST;
    if (dx < MX) return P_WEST;
    if (dy > MY) return P_SOUTH;
    if (dy < MY) return P_NORTH;
    return P_LOCAL;
  endfunction

  typedef struct { flit_t f; int port; } exp_t;
  flit_t sq  [NUM_PORTS][NUM_VC][$];   // to send
  exp_t  eq  [NUM_PORTS][NUM_VC][$];   // expected at the outputs
  int    icred [NUM_PORTS][NUM_VC];    // sender credits per input VC
  int    owner [NUM_PORTS][NUM_VC];    // input*2+vc owning an output VC, or -1
  int    pend  [NUM_PORTS][NUM_VC][$]; // sink: cycles left before a credit returns

  initial begin
    int remaining = 0;
    for (int i = 0; i < NUM_PORTS; i++)
      for (int p = 0; p < NPKT; p++) begin
        int v, dx, dy, o, nb;
        header_t h;
        do begin dx = $urandom % 4; dy = $urandom % 4; o = route(dx, dy); end while (o == i);
        v = $urandom % NUM_VC;
        nb = 1 + $urandom % 4;
        h = '0;
        h.dst_x = XW'(dx); h.dst_y = YW'(dy); h.kind = v ? PK_RD_RESP : PK_RD_REQ;
        h.rsvd = 8'(i * 2 + v);
        for (int k = 0; k < nb; k++) begin
          flit_t f;
          f = '{head: k == 0, tail: k == nb - 1, vc: 1'(v),
                data: (k == 0) ? 32'(h) : {8'(i * 2 + v), 16'(p), 8'(k)}};
          sq[i][v].push_back(f);
          eq[i][v].push_back('{f: f, port: o});
          remaining++;
        end
      end
    for (int i = 0; i < NUM_PORTS; i++)
      for (int v = 0; v < NUM_VC; v++) begin icred[i][v] = VC_DEPTH; owner[i][v] = -1; end
    in_valid = '0;
    for (int i = 0; i < NUM_PORTS; i++) begin in_flit[i] = '0; credit_in[i] = '0; end
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30000 && remaining > 0; t++) begin
      @(negedge clk);
      // outputs of the last clock edge
      for (int o = 0; o < NUM_PORTS; o++) begin
        credit_in[o] = '0;
        if (out_valid[o]) begin
          flit_t f;
          int src, iv, v;
          f = out_flit[o];
          v = f.vc;
          if (f.head) begin
            header_t h;
            h = f.data;
            src = h.rsvd;
            check(owner[o][v] < 0, "no interleaving within an output VC");
            owner[o][v] = src;
          end else begin
            src = f.data[31:24];
            check(owner[o][v] == src, "body flit follows its own head");
          end
          iv = src % 2;
          check(iv == v, "flit keeps its VC");
          if (eq[src / 2][iv].size() == 0) begin
            check(0, "unexpected flit");
          end else begin
            check(f == eq[src / 2][iv][0].f, $sformatf("order of input %0d VC %0d", src / 2, iv));
            check(o == eq[src / 2][iv][0].port, $sformatf("XY output %0d", o));
            void'(eq[src / 2][iv].pop_front());
          end
          remaining--;
          if (f.tail) owner[o][v] = -1;
          pend[o][v].push_back(1 + $urandom % 6);
        end
        for (int v = 0; v < NUM_VC; v++) begin
          foreach (pend[o][v][k]) pend[o][v][k]--;
          if (pend[o][v].size() > 0 && pend[o][v][0] <= 0) begin
            credit_in[o][v] = 1;
            void'(pend[o][v].pop_front());
          end
        end
      end
      // credits from the router and new input flits
      for (int i = 0; i < NUM_PORTS; i++) begin
        int v;
        for (int k = 0; k < NUM_VC; k++) if (credit_out[i][k]) icred[i][k]++;
        v = $urandom % NUM_VC;
        in_valid[i] = sq[i][v].size() > 0 && icred[i][v] > 0 && ($urandom % 4 != 0);
        in_flit[i] = in_valid[i] ? sq[i][v][0] : '0;
        if (in_valid[i]) begin void'(sq[i][v].pop_front()); icred[i][v]--; end
      end
    end
    @(negedge clk);
    in_valid = '0;
    repeat (4) begin
      for (int i = 0; i < NUM_PORTS; i++)
        for (int k = 0; k < NUM_VC; k++) if (credit_out[i][k]) icred[i][k]++;
      @(negedge clk);
    end
    check(remaining == 0, $sformatf("all flits delivered, %0d left", remaining));
    for (int i = 0; i < NUM_PORTS; i++)
      for (int k = 0; k < NUM_VC; k++)
        check(icred[i][k] == VC_DEPTH, $sformatf("input %0d VC %0d credits returned", i, k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
