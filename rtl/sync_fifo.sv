// sync_fifo: single-clock first-in first-out buffer, the storage element of
// the router's VC buffers and of every network-interface queue.
//
// A circular array of DEPTH entries with read and write pointers and an
// occupancy counter. dout shows the oldest entry whenever empty is low; a
// pop removes it at the next clock edge. A push into a full FIFO or a pop from
// an empty one is ignored (and flagged by an assertion). Push and pop may
// happen in the same cycle. Reset: rst_n is active low and
// asynchronous, and clears the pointers only (the array holds no reset).
// Lint: Verilator reports rst_n as used both asynchronously and
// synchronously; the synchronous use is the disable condition of the
// assertions, not logic.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  T                           din,
  input  logic                       pop,
  output T                           dout,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                          mem [DEPTH];
  logic [PW-1:0]             wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  assign full  = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty = (cnt == '0);
  assign count = cnt;
  assign dout  = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
