// tb_noc_platform: end-to-end test of the full 4 x 4 platform at its default
// parameters.
//
// Every node gets a behavioural AXI processor (tb_traffic_gen) and a
// behavioural rank behind its memory controller (axi_mem_model). Four phases
// run the evaluated workloads: uniform and non-uniform (70 % own rank)
// traffic, each with planar-DRAM timing (LAT_PLANAR cycles) and with
// stacked-DRAM timing (32.5 % shorter). Then every processor reads back all
// it wrote. Each read beat and write response is checked by the generators;
// the average request-to-response latency of each phase is printed.
// Mechanism counters (hierarchical probes) must all be non-zero: direct
// local channel, network injection, reorder-buffer park and release,
// outstanding-limit stall, credit stall, switch conflict, VC-allocation wait
// and memory back-pressure.
module tb_noc_platform;
  import noc_pkg::*;

  localparam int N          = 16;
  localparam int TXN        = 120;
  localparam int LAT_PLANAR = 20;
  localparam int LAT_STACK  = 14;   // 20 * (1 - 0.325), rounded

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [N-1:0] s_ar_valid, s_ar_ready, s_aw_valid, s_aw_ready, s_w_valid, s_w_ready;
  logic [N-1:0] s_r_valid, s_r_ready, s_b_valid, s_b_ready;
  axi_ax_t s_ar [N], s_aw [N];
  axi_w_t  s_w [N];
  axi_r_t  s_r [N];
  axi_b_t  s_b [N];
  logic [N-1:0] m_ar_valid, m_ar_ready, m_aw_valid, m_aw_ready, m_w_valid, m_w_ready;
  logic [N-1:0] m_r_valid, m_r_ready, m_b_valid, m_b_ready;
  axi_ax_t m_ar [N], m_aw [N];
  axi_w_t  m_w [N];
  axi_r_t  m_r [N];
  axi_b_t  m_b [N];
  logic [N-1:0] ev_rob_store, ev_rob_release;

  noc_platform dut (.*);

  logic   start, start_rb;
  int     n_txn, local_pct, gap_max, latency;
  logic [N-1:0] done, rb_done;
  int     g_checks [N], g_fail [N], g_lat_cnt [N];
  longint g_lat_sum [N];

  // mechanism counters
  longint cnt_local, cnt_net, cnt_store, cnt_release, cnt_limit, cnt_credit, cnt_conflict,
          cnt_vawait, cnt_memstall;

  for (genvar n = 0; n < N; n++) begin : g_node
    tb_traffic_gen #(.NODE(n), .NODES(N)) u_gen (
      .clk, .rst_n, .start, .n_txn, .local_pct, .gap_max, .start_readback(start_rb),
      .done(done[n]), .readback_done(rb_done[n]),
      .checks(g_checks[n]), .failures(g_fail[n]), .lat_sum(g_lat_sum[n]), .lat_cnt(g_lat_cnt[n]),
      .ar_valid(s_ar_valid[n]), .ar_ready(s_ar_ready[n]), .ar(s_ar[n]),
      .aw_valid(s_aw_valid[n]), .aw_ready(s_aw_ready[n]), .aw(s_aw[n]),
      .w_valid(s_w_valid[n]), .w_ready(s_w_ready[n]), .w(s_w[n]),
      .r_valid(s_r_valid[n]), .r_ready(s_r_ready[n]), .r(s_r[n]),
      .b_valid(s_b_valid[n]), .b_ready(s_b_ready[n]), .b(s_b[n]));

    axi_mem_model #(.NODE(n)) u_mem (
      .clk, .rst_n, .latency,
      .ar_valid(m_ar_valid[n]), .ar_ready(m_ar_ready[n]), .ar(m_ar[n]),
      .aw_valid(m_aw_valid[n]), .aw_ready(m_aw_ready[n]), .aw(m_aw[n]),
      .w_valid(m_w_valid[n]), .w_ready(m_w_ready[n]), .w(m_w[n]),
      .r_valid(m_r_valid[n]), .r_ready(m_r_ready[n]), .r(m_r[n]),
      .b_valid(m_b_valid[n]), .b_ready(m_b_ready[n]), .b(m_b[n]));
  end

  for (genvar y = 0; y < 4; y++) begin : g_py
    for (genvar x = 0; x < 4; x++) begin : g_px
      always @(posedge clk) if (rst_n) begin
        if (dut.g_y[y].g_x[x].u_ni.u_pkt.loc_req_valid && dut.g_y[y].g_x[x].u_ni.u_pkt.loc_req_ready)
          cnt_local <= cnt_local + 1;
        if (dut.g_y[y].g_x[x].u_ni.tx_valid) cnt_net <= cnt_net + 1;
        if (dut.g_y[y].g_x[x].u_ni.u_pkt.q_ar_valid && !dut.g_y[y].g_x[x].u_ni.u_pkt.can_issue)
          cnt_limit <= cnt_limit + 1;
        if (m_ar_valid[y*4+x] && !m_ar_ready[y*4+x]) cnt_memstall <= cnt_memstall + 1;
        for (int i = 0; i < NUM_PORTS; i++) begin
          if (dut.g_y[y].g_x[x].u_router.u_sa.sa_req[i] != dut.g_y[y].g_x[x].u_router.u_sa.s1_req[i])
            cnt_credit <= cnt_credit + 1;
          if (dut.g_y[y].g_x[x].u_router.u_sa.s1_gnt[i] != '0 && !dut.g_y[y].g_x[x].u_router.u_sa.in_won[i])
            cnt_conflict <= cnt_conflict + 1;
          if ((dut.g_y[y].g_x[x].u_router.va_req[i] & ~dut.g_y[y].g_x[x].u_router.va_gnt[i]) != '0)
            cnt_vawait <= cnt_vawait + 1;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    cnt_store   <= cnt_store + $countones(ev_rob_store);
    cnt_release <= cnt_release + $countones(ev_rob_release);
  end

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // watchdog
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(string name, int pct, int lat);
    longint s0, s1, c0, c1;
    s0 = 0; c0 = 0;
    for (int n = 0; n < N; n++) begin s0 += g_lat_sum[n]; c0 += longint'(g_lat_cnt[n]); end
    local_pct = pct;
    latency   = lat;
    start     = 1'b1;
    @(posedge clk);
    while (done != '1) @(posedge clk);
    start = 1'b0;
    repeat (3) @(posedge clk);
    s1 = 0; c1 = 0;
    for (int n = 0; n < N; n++) begin s1 += g_lat_sum[n]; c1 += longint'(g_lat_cnt[n]); end
    $display("%-28s transactions %0d  average latency %0d.%02d cycles", name, c1 - c0,
             (s1 - s0) / (c1 - c0), ((s1 - s0) * 100 / (c1 - c0)) % 100);
    checks++;
    if (c1 - c0 != longint'(N * n_txn)) begin
      failures++;
      $display("phase %s completed %0d of %0d transactions", name, c1 - c0, N * n_txn);
    end
  endtask

  task automatic need(string what, longint cnt);
    checks++;
    $display("  %-34s %0d", what, cnt);
    if (cnt == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    start = 0; start_rb = 0; n_txn = TXN; local_pct = -1; gap_max = 2; latency = LAT_PLANAR;
    cnt_local = 0; cnt_net = 0; cnt_store = 0; cnt_release = 0; cnt_limit = 0; cnt_credit = 0;
    cnt_conflict = 0; cnt_vawait = 0; cnt_memstall = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    run_phase("uniform, planar DRAM",      -1, LAT_PLANAR);
    run_phase("uniform, stacked DRAM",     -1, LAT_STACK);
    run_phase("non-uniform, planar DRAM",  70, LAT_PLANAR);
    run_phase("non-uniform, stacked DRAM", 70, LAT_STACK);
    start_rb = 1'b1;
    while (rb_done != '1) @(posedge clk);
    repeat (10) @(posedge clk);
    for (int n = 0; n < N; n++) begin
      checks   += g_checks[n];
      failures += g_fail[n];
    end
    $display("mechanisms:");
    need("direct local channel flits", cnt_local);
    need("flits injected into the mesh", cnt_net);
    need("responses parked in reorder buffer", cnt_store);
    need("responses released from buffer", cnt_release);
    need("outstanding-limit stall cycles", cnt_limit);
    need("credit stall cycles", cnt_credit);
    need("switch conflict cycles", cnt_conflict);
    need("VC allocation wait cycles", cnt_vawait);
    need("memory back-pressure cycles", cnt_memstall);
    checks++;
    if (cnt_store != cnt_release) begin
      failures++;
      $display("parked %0d but released %0d", cnt_store, cnt_release);
    end
    $display("cycles %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
