// proc_depacketizer: processor-side depacketizer; restores response packets
// into AXI read data and write responses for the processor.
//
// A write-response packet is a single header flit and becomes one B beat
// carrying the ID and response code. A read-response header is absorbed
// (its ID kept); each following data flit becomes an R beat with that ID,
// the tail flit carrying RLAST. A flit is taken when the AXI channel it
// feeds accepts it. Packets arrive already in order from the reorder unit.
// The read-data / write-response split is the reference design's.
// Lint: only kind, ID and response code of a header are used; the other
// header bits and the VC bit are unused by design.
module proc_depacketizer
  import noc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  flit_t  in_flit,
  output logic   in_ready,
  output logic   r_valid,
  input  logic   r_ready,
  output axi_r_t r,
  output logic   b_valid,
  input  logic   b_ready,
  output axi_b_t b
);
  logic            in_body;   // between a read header and its tail
  logic [ID_W-1:0] id_q;
  header_t         hdr;

  assign hdr     = header_t'(in_flit.data);
  assign b_valid = in_valid && !in_body && in_flit.head && (hdr.kind == PK_WR_RESP);
  assign b       = '{id: hdr.id, resp: hdr.resp};
  assign r_valid = in_valid && in_body;
  assign r       = '{id: id_q, data: in_flit.data, last: in_flit.tail};

  always_comb begin
    if (in_body)                         in_ready = r_ready;
    else if (hdr.kind == PK_WR_RESP)     in_ready = b_ready;
    else                                 in_ready = 1'b1;   // read header
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_body <= 1'b0;
      id_q    <= '0;
    end else if (in_valid && in_ready) begin
      if (!in_body && hdr.kind == PK_RD_RESP) begin
        in_body <= 1'b1;
        id_q    <= hdr.id;
      end else if (in_body && in_flit.tail) begin
        in_body <= 1'b0;
      end
    end
  end

  a_header_first: assert property (@(posedge clk) disable iff (!rst_n)
                                   (in_valid && !in_body) |-> in_flit.head);
endmodule
