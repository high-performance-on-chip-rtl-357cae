// mem_axi_queue: memory-side AXI queue of the network interface.
//
// Buffers what the stacked-DRAM controller (AXI slave) returns: the
// write-response buffer (B) and the read-response buffer (R), NI_Q_DEPTH
// entries each. The controller sees ready while a buffer has room; the
// packetizer pops the heads as it builds response packets.
// Queue depth and the split follow the reference design.
module mem_axi_queue
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = NI_Q_DEPTH
) (
  input  logic   clk,
  input  logic   rst_n,
  // from the memory controller
  input  logic   r_valid,
  output logic   r_ready,
  input  axi_r_t r,
  input  logic   b_valid,
  output logic   b_ready,
  input  axi_b_t b,
  // to the packetizer
  output logic   q_r_valid,
  input  logic   q_r_pop,
  output axi_r_t q_r,
  output logic   q_b_valid,
  input  logic   q_b_pop,
  output axi_b_t q_b
);
  logic r_full, r_empty, b_full, b_empty;
  logic [$clog2(DEPTH+1)-1:0] unused_c0, unused_c1;

  sync_fifo #(.T(axi_r_t), .DEPTH(DEPTH)) u_rd_resp (
    .clk, .rst_n, .push(r_valid && !r_full), .din(r), .pop(q_r_pop),
    .dout(q_r), .full(r_full), .empty(r_empty), .count(unused_c0));
  sync_fifo #(.T(axi_b_t), .DEPTH(DEPTH)) u_wr_resp (
    .clk, .rst_n, .push(b_valid && !b_full), .din(b), .pop(q_b_pop),
    .dout(q_b), .full(b_full), .empty(b_empty), .count(unused_c1));

  assign r_ready   = !r_full;
  assign b_ready   = !b_full;
  assign q_r_valid = !r_empty;
  assign q_b_valid = !b_empty;
endmodule
