// proc_axi_queue: processor-side AXI queue of the network interface.
//
// Buffers what the processor (AXI master) sends: the read-request buffer
// (AR), the write-request buffer (AW) and the write data that follows a
// write request (W). Each is an NI_Q_DEPTH x 32-bit class FIFO; an AXI channel
// is accepted (ready high) while its FIFO has room and the packetizer pops
// the heads. Queue depth and the read/write split follow the reference
// design; a separate FIFO for write data is this design's choice.
module proc_axi_queue
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = NI_Q_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  // from the processor
  input  logic    ar_valid,
  output logic    ar_ready,
  input  axi_ax_t ar,
  input  logic    aw_valid,
  output logic    aw_ready,
  input  axi_ax_t aw,
  input  logic    w_valid,
  output logic    w_ready,
  input  axi_w_t  w,
  // to the packetizer
  output logic    q_ar_valid,
  input  logic    q_ar_pop,
  output axi_ax_t q_ar,
  output logic    q_aw_valid,
  input  logic    q_aw_pop,
  output axi_ax_t q_aw,
  output logic    q_w_valid,
  input  logic    q_w_pop,
  output axi_w_t  q_w
);
  logic ar_full, ar_empty, aw_full, aw_empty, w_full, w_empty;
  logic [$clog2(DEPTH+1)-1:0] unused_c0, unused_c1, unused_c2;

  sync_fifo #(.T(axi_ax_t), .DEPTH(DEPTH)) u_rd_req (
    .clk, .rst_n, .push(ar_valid && !ar_full), .din(ar), .pop(q_ar_pop),
    .dout(q_ar), .full(ar_full), .empty(ar_empty), .count(unused_c0));
  sync_fifo #(.T(axi_ax_t), .DEPTH(DEPTH)) u_wr_req (
    .clk, .rst_n, .push(aw_valid && !aw_full), .din(aw), .pop(q_aw_pop),
    .dout(q_aw), .full(aw_full), .empty(aw_empty), .count(unused_c1));
  sync_fifo #(.T(axi_w_t), .DEPTH(DEPTH)) u_wr_data (
    .clk, .rst_n, .push(w_valid && !w_full), .din(w), .pop(q_w_pop),
    .dout(q_w), .full(w_full), .empty(w_empty), .count(unused_c2));

  assign ar_ready   = !ar_full;
  assign aw_ready   = !aw_full;
  assign w_ready    = !w_full;
  assign q_ar_valid = !ar_empty;
  assign q_aw_valid = !aw_empty;
  assign q_w_valid  = !w_empty;
endmodule
