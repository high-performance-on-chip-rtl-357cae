// tb_traffic_gen: behavioural AXI processor for the platform testbench.
//
// Issues random read and write bursts (1..8 beats, AXI IDs 0..3) towards the
// ranks of the mesh and checks every response. Destination: uniform over all
// nodes (local_pct < 0) or its own rank with probability local_pct % and a
// uniform other rank otherwise. Reads of the read region (address bit 12
// clear) must return tb_pkg::init_word; writes go to a region private to this
// processor (bit 12 set, bits [11:8] = this node) and are remembered in a
// shadow copy. Responses of one ID must come back in request order. After
// the run, start_readback makes it read every written burst back and compare
// it with the shadow. Latency = cycles from the request handshake to the last
// response beat.
module tb_traffic_gen
  import noc_pkg::*;
#(
  parameter int unsigned NODE  = 0,
  parameter int unsigned NODES = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  int      n_txn,
  input  int      local_pct,
  input  int      gap_max,
  input  logic    start_readback,
  output logic    done,
  output logic    readback_done,
  output int      checks,
  output int      failures,
  output longint  lat_sum,
  output int      lat_cnt,
  output logic    ar_valid,
  input  logic    ar_ready,
  output axi_ax_t ar,
  output logic    aw_valid,
  input  logic    aw_ready,
  output axi_ax_t aw,
  output logic    w_valid,
  input  logic    w_ready,
  output axi_w_t  w,
  input  logic    r_valid,
  output logic    r_ready,
  input  axi_r_t  r,
  input  logic    b_valid,
  output logic    b_ready,
  input  axi_b_t  b
);
  typedef struct {
    logic [31:0] addr;
    int          len;
    longint      t0;
  } exp_t;

  exp_t        rq [4][$];
  exp_t        wq [4][$];
  logic [31:0] shadow  [NODES][8][8];
  logic        written [NODES][8];
  int          beat [4];
  longint      cyc;
  int          pending;

  always @(posedge clk) cyc <= cyc + 1;

  // DUT outputs are sampled half a cycle before the edge that uses them
  logic   ar_ready_s, aw_ready_s, w_ready_s, r_valid_s, b_valid_s;
  axi_r_t r_s;
  axi_b_t b_s;
  always @(negedge clk) begin
    ar_ready_s <= ar_ready;
    aw_ready_s <= aw_ready;
    w_ready_s  <= w_ready;
    r_valid_s  <= r_valid;
    r_s        <= r;
    b_valid_s  <= b_valid;
    b_s        <= b;
  end

  function automatic logic [31:0] expect_word(logic [31:0] a);
    if (a[12]) return shadow[a[30:27]][a[7:5]][a[4:2]];
    return tb_pkg::init_word(a);
  endfunction

  task automatic do_read(logic [31:0] addr, int len, logic [ID_W-1:0] id);
    exp_t e;
    ar_valid <= 1'b1;
    ar       <= '{id: id, addr: addr, len: LEN_W'(len)};
    @(posedge clk);
    while (!ar_ready_s) @(posedge clk);
    e = '{addr: addr, len: len, t0: cyc};
    rq[id[1:0]].push_back(e);
    pending++;
    ar_valid <= 1'b0;
    @(posedge clk);   // one idle cycle: valid is never cleared and set in one step
  endtask

  task automatic do_write(int node, int slot, int len, logic [ID_W-1:0] id);
    exp_t        e;
    logic [31:0] addr;
    addr = {1'b0, 4'(node), 14'b0, 1'b1, 4'(NODE), 3'(slot), 3'b0, 2'b00};
    aw_valid <= 1'b1;
    aw       <= '{id: id, addr: addr, len: LEN_W'(len)};
    @(posedge clk);
    while (!aw_ready_s) @(posedge clk);
    aw_valid <= 1'b0;
    e = '{addr: addr, len: len, t0: cyc};
    wq[id[1:0]].push_back(e);
    pending++;
    for (int k = 0; k <= len; k++) begin
      logic [31:0] d;
      d = $urandom;
      shadow[node][slot][k] = d;
      w_valid <= 1'b1;
      w       <= '{data: d, last: (k == len)};
      @(posedge clk);
      while (!w_ready_s) @(posedge clk);
    end
    w_valid <= 1'b0;
    written[node][slot] = 1'b1;
  endtask

  function automatic int pick_node();
    int n;
    if (local_pct < 0) return int'($urandom_range(NODES - 1));
    if (int'($urandom_range(99)) < local_pct) return NODE;
    n = int'($urandom_range(NODES - 2));
    return (n >= int'(NODE)) ? n + 1 : n;
  endfunction

  // request issue
  initial begin
    ar_valid = 0; aw_valid = 0; w_valid = 0;
    ar = '0; aw = '0; w = '0;
    done = 0; readback_done = 0;
    pending = 0; cyc = 0;
    for (int n = 0; n < int'(NODES); n++)
      for (int s = 0; s < 8; s++) begin
        written[n][s] = 1'b0;
        for (int k = 0; k < 8; k++)
          shadow[n][s][k] = tb_pkg::init_word({1'b0, 4'(n), 14'b0, 1'b1, 4'(NODE), 3'(s), 3'(k), 2'b00});
      end
    forever begin
      @(posedge clk);
      if (start && !done) begin
        for (int t = 0; t < n_txn; t++) begin
          int               node, len;
          logic [ID_W-1:0]  id;
          node = pick_node();
          len  = int'($urandom_range(MAX_BURST - 1));
          id   = ID_W'($urandom_range(3));
          if ($urandom_range(1) == 0) begin
            logic [31:0] addr;
            addr = {1'b0, 4'(node), 14'b0, 1'b0, 7'($urandom_range(127)), 3'b0, 2'b00};
            do_read(addr, len, id);
          end else begin
            do_write(node, int'($urandom_range(7)), len, id);
          end
          repeat ($urandom_range(gap_max)) @(posedge clk);
        end
        while (pending != 0) @(posedge clk);
        done <= 1'b1;
      end
      if (start_readback && !readback_done) begin
        for (int n = 0; n < int'(NODES); n++)
          for (int s = 0; s < 8; s++)
            if (written[n][s])
              do_read({1'b0, 4'(n), 14'b0, 1'b1, 4'(NODE), 3'(s), 3'b0, 2'b00}, 7, ID_W'(s % 4));
        while (pending != 0) @(posedge clk);
        readback_done <= 1'b1;
      end
      if (!start) done <= 1'b0;
    end
  end

  // response check
  initial begin
    checks = 0; failures = 0; lat_sum = 0; lat_cnt = 0;
    r_ready = 1'b1; b_ready = 1'b1;
    for (int i = 0; i < 4; i++) beat[i] = 0;
    forever begin
      @(posedge clk);
      if (rst_n && r_valid_s && r_ready) begin
        int id;
        id = int'(r_s.id);
        checks++;
        if (rq[id].size() == 0) begin
          failures++;
          $display("node %0d: read data with no request, id %0d", NODE, id);
        end else begin
          exp_t        e;
          logic [31:0] a;
          e = rq[id][0];
          a = e.addr + 32'(4 * beat[id]);
          if (r_s.data !== expect_word(a) || r_s.last !== (beat[id] == e.len)) begin
            failures++;
            $display("node %0d: read id %0d addr %h beat %0d: got %h last %0d, expected %h",
                     NODE, id, e.addr, beat[id], r_s.data, r_s.last, expect_word(a));
          end
          if (r_s.last) begin
            void'(rq[id].pop_front());
            beat[id] = 0;
            lat_sum += cyc - e.t0;
            lat_cnt++;
            pending--;
          end else beat[id]++;
        end
      end
      if (rst_n && b_valid_s && b_ready) begin
        int id;
        id = int'(b_s.id);
        checks++;
        if (wq[id].size() == 0 || b_s.resp != 2'b00) begin
          failures++;
          $display("node %0d: unexpected write response id %0d", NODE, id);
        end else begin
          exp_t e;
          e = wq[id].pop_front();
          lat_sum += cyc - e.t0;
          lat_cnt++;
          pending--;
        end
      end
    end
  end
endmodule
