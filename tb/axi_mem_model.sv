// axi_mem_model: behavioural model of a stacked-DRAM rank behind its memory
// controller (not synthesizable; stands in for the commercial controller).
//
// AXI slave with independent read and write engines. A read request waits
// `latency` cycles, then returns len+1 beats; a write request takes its
// len+1 data beats, waits `latency` cycles and returns an OKAY response.
// Each engine serves its requests in arrival order. The model stores the
// low 2048 words of the rank (address bits [12:2]); at start every word
// holds tb_pkg::init_word of its full address.
module axi_mem_model
  import noc_pkg::*;
#(
  parameter int unsigned NODE = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  int      latency,
  input  logic    ar_valid,
  output logic    ar_ready,
  input  axi_ax_t ar,
  input  logic    aw_valid,
  output logic    aw_ready,
  input  axi_ax_t aw,
  input  logic    w_valid,
  output logic    w_ready,
  input  axi_w_t  w,
  output logic    r_valid,
  input  logic    r_ready,
  output axi_r_t  r,
  output logic    b_valid,
  input  logic    b_ready,
  output axi_b_t  b
);
  logic [31:0] mem [2048];
  axi_ax_t     rq [$];
  axi_ax_t     wq [$];

  initial begin
    ar_ready = 1'b0;
    aw_ready = 1'b0;
    for (int i = 0; i < 2048; i++)
      mem[i] = tb_pkg::init_word({1'b0, 4'(NODE), 14'b0, 11'(i), 2'b00});
  end

  // DUT outputs are sampled half a cycle before the edge that uses them;
  // the model's ready signals change only at the falling edge.
  logic    ar_valid_s, aw_valid_s, w_valid_s, r_ready_s, b_ready_s;
  axi_ax_t ar_s, aw_s;
  axi_w_t  w_s;
  always @(negedge clk) begin
    ar_valid_s <= ar_valid;  ar_s <= ar;
    aw_valid_s <= aw_valid;  aw_s <= aw;
    w_valid_s  <= w_valid;   w_s  <= w;
    r_ready_s  <= r_ready;
    b_ready_s  <= b_ready;
    ar_ready   <= rst_n && (rq.size() < 4);
    aw_ready   <= rst_n && (wq.size() < 4);
  end

  always @(posedge clk) begin
    if (ar_valid_s && ar_ready) rq.push_back(ar_s);
    if (aw_valid_s && aw_ready) wq.push_back(aw_s);
  end

  // read engine
  initial begin
    r_valid = 1'b0;
    r       = '0;
    forever begin
      @(posedge clk);
      if (rq.size() != 0) begin
        axi_ax_t req;
        req = rq.pop_front();
        repeat (latency) @(posedge clk);
        for (int k = 0; k <= int'(req.len); k++) begin
          r_valid <= 1'b1;
          r       <= '{id: req.id, data: mem[11'((req.addr >> 2) + 32'(k))], last: (k == int'(req.len))};
          @(posedge clk);
          while (!r_ready_s) @(posedge clk);
        end
        r_valid <= 1'b0;
      end
    end
  end

  // write engine
  initial begin
    w_ready = 1'b0;
    b_valid = 1'b0;
    b       = '0;
    forever begin
      @(posedge clk);
      if (wq.size() != 0) begin
        axi_ax_t req;
        int      k;
        req = wq[0];
        k   = 0;
        w_ready <= 1'b1;
        forever begin
          @(posedge clk);
          if (w_valid_s && w_ready) begin
            mem[11'((req.addr >> 2) + 32'(k))] = w_s.data;
            k++;
            if (w_s.last) break;
          end
        end
        w_ready <= 1'b0;
        void'(wq.pop_front());
        repeat (latency) @(posedge clk);
        b_valid <= 1'b1;
        b       <= '{id: req.id, resp: 2'b00};
        @(posedge clk);
        while (!b_ready_s) @(posedge clk);
        b_valid <= 1'b0;
      end
    end
  end
endmodule
