// tb_reorder_unit: sequence numbering, reordering and the outstanding limit.
// Four reads with ID 3 take sequence numbers 0..3; two reads with ID 7 take
// 0..1, which reaches the limit of 6 outstanding (can_issue must drop). The
// responses for ID 3 arrive in the order 2,0,3,1 and those of ID 7 in the
// order 1,0, each as a header and 2 data flits whose data names the packet.
// The output must present every ID's packets in sequence order, whole and
// unbroken, with random back-pressure. Out-of-order arrivals must be counted
// as stored and later as released (3 of the 6 here: ID 3 seq 2 and 3, ID 7
// seq 1). Inputs are driven at the falling edge and
// the handshakes are decided just after it.
module tb_reorder_unit;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [ID_W-1:0]  seq_id;
  logic [SEQ_W-1:0] seq_num;
  logic             seq_take, can_issue;
  logic             in_valid, in_ready, out_valid, out_ready;
  flit_t            in_flit, out_flit;
  logic             ev_stored, ev_released;
  int checks = 0, failures = 0;
  int n_stored = 0, n_released = 0;

  reorder_unit dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] hdr(int id, int seq);
    header_t h;
    h = '0; h.kind = PK_RD_RESP; h.id = ID_W'(id); h.seq = SEQ_W'(seq); h.len = LEN_W'(1);
    return h;
  endfunction

  flit_t in_q [$];
  flit_t exp_q [16][$];

  task automatic add_pkt(int id, int seq);
    in_q.push_back('{head: 1, tail: 0, vc: 1, data: hdr(id, seq)});
    for (int b = 0; b < 2; b++)
      in_q.push_back('{head: 0, tail: b == 1, vc: 1, data: 32'(id * 256 + seq * 16 + b)});
  endtask

  task automatic expect_pkt(int id, int seq);
    exp_q[id].push_back('{head: 1, tail: 0, vc: 1, data: hdr(id, seq)});
    for (int b = 0; b < 2; b++)
      exp_q[id].push_back('{head: 0, tail: b == 1, vc: 1, data: 32'(id * 256 + seq * 16 + b)});
  endtask

  initial begin
    int cur_id, cycles;
    seq_id = '0; seq_take = 0; in_valid = 0; in_flit = '0; out_ready = 0;
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      seq_id = (k < 4) ? 4'd3 : 4'd7;
      #1;
      check(can_issue, "can issue below the limit");
      check(seq_num == SEQ_W'(k < 4 ? k : k - 4), $sformatf("sequence number %0d", seq_num));
      seq_take = 1;
      @(negedge clk); seq_take = 0;
    end
    #1;
    check(!can_issue, "limit of 6 outstanding reached");
    add_pkt(3, 2); add_pkt(3, 0); add_pkt(7, 1); add_pkt(3, 3); add_pkt(3, 1); add_pkt(7, 0);
    for (int s = 0; s < 4; s++) expect_pkt(3, s);
    for (int s = 0; s < 2; s++) expect_pkt(7, s);
    cur_id = -1;
    cycles = 0;
    while ((exp_q[3].size() + exp_q[7].size()) > 0 && cycles < 2000) begin
      @(negedge clk);
      cycles++;
      in_valid  = in_q.size() > 0;
      in_flit   = in_valid ? in_q[0] : '0;
      out_ready = ($urandom % 4) != 0;
      #1;
      if (ev_stored)   n_stored++;
      if (ev_released) n_released++;
      if (in_valid && in_ready) void'(in_q.pop_front());
      if (out_valid && out_ready) begin
        int id;
        header_t oh;
        oh = out_flit.data;
        id = out_flit.head ? int'(oh.id) : cur_id;
        if (out_flit.head) begin
          check(cur_id < 0, "new packet only after a tail");
          cur_id = id;
        end
        if (exp_q[id].size() == 0) begin
          check(0, "unexpected flit");
        end else begin
          check(out_flit == exp_q[id][0],
                $sformatf("ID %0d flit %h expected %h", id, out_flit.data, exp_q[id][0].data));
          void'(exp_q[id].pop_front());
        end
        if (out_flit.tail) cur_id = -1;
      end
    end
    @(negedge clk); in_valid = 0;
    #1;
    check(cycles < 2000, "all packets delivered");
    check(can_issue, "can issue again after delivery");
    check(n_stored == 3, $sformatf("3 packets buffered, counted %0d", n_stored));
    check(n_released == 3, $sformatf("3 packets released, counted %0d", n_released));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
