// reorder_unit: the network interface's controller; numbers requests per AXI
// transaction ID and puts responses back into request order.
//
// Forward path: when the packetizer takes a request with ID i it receives
// next_seq[i] for the header and next_seq[i] increments. The number of
// outstanding transactions is counted and limited to SLOTS, the number of
// bursts the reorder buffer can hold, so an early response always finds room.
// Reverse path: for each response header the unit compares the sequence
// number with expected[i]. A packet in order passes straight to the
// processor-side depacketizer. A packet out of order is written, header and
// data, into a free slot of the reorder buffer (SLOTS x MAX_BURST words,
// 6 x 8 = 48 by default). Whenever the packet expected next for any ID sits
// in the buffer, it is released to the depacketizer ahead of new arrivals.
// Delivering a tail flit increments expected[i] and frees one outstanding
// transaction. Sequence numbers are SEQ_W bits and wrap, which is safe since
// at most SLOTS transactions are in flight.
// Sequence numbers per transaction ID, the pass/buffer decision and a 48-word
// reorder buffer for 6 bursts of 8 are the reference design's; the slot
// organisation and the outstanding limit are this design's choices.
module reorder_unit
  import noc_pkg::*;
#(
  parameter int unsigned SLOTS = ROB_SLOTS
) (
  input  logic             clk,
  input  logic             rst_n,
  // forward path: sequence numbers
  input  logic [ID_W-1:0]  seq_id,
  output logic [SEQ_W-1:0] seq_num,
  input  logic             seq_take,
  output logic             can_issue,
  // reverse path: responses from the detector
  input  logic             in_valid,
  input  flit_t            in_flit,
  output logic             in_ready,
  // to the processor-side depacketizer
  output logic             out_valid,
  output flit_t            out_flit,
  input  logic             out_ready,
  // event strobes (one cycle each) for performance counting
  output logic             ev_stored,
  output logic             ev_released
);
  localparam int unsigned NID = 1 << ID_W;
  localparam int unsigned SLW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned BW  = $clog2(MAX_BURST);
  localparam int unsigned OW  = $clog2(SLOTS + 1);

  typedef enum logic [1:0] {R_IDLE, R_PASS, R_STORE, R_RELEASE} r_state_e;

  logic [SEQ_W-1:0] next_seq [NID];
  logic [SEQ_W-1:0] expected [NID];
  logic [OW-1:0]    outstanding;

  // reorder buffer
  logic [SLOTS-1:0] slot_valid;
  header_t          slot_hdr  [SLOTS];
  logic [FLIT_W-1:0] rob_mem  [SLOTS * MAX_BURST];

  r_state_e         state;
  logic [SLW-1:0]   cur_slot;
  logic [BW-1:0]    cur_word;
  logic [ID_W-1:0]  cur_id;
  logic             rel_hdr_sent;

  assign seq_num   = next_seq[seq_id];
  assign can_issue = (outstanding < OW'(SLOTS));

  header_t in_hdr;
  assign in_hdr = header_t'(in_flit.data);

  // a buffered packet that is next in order for its ID
  logic           rel_found;
  logic [SLW-1:0] rel_slot;
  always_comb begin
    rel_found = 1'b0;
    rel_slot  = '0;
    for (int s = 0; s < SLOTS; s++)
      if (!rel_found && slot_valid[s] && slot_hdr[s].seq == expected[slot_hdr[s].id]) begin
        rel_found = 1'b1;
        rel_slot  = SLW'(s);
      end
  end

  logic           free_found;
  logic [SLW-1:0] free_slot;
  always_comb begin
    free_found = 1'b0;
    free_slot  = '0;
    for (int s = 0; s < SLOTS; s++)
      if (!free_found && !slot_valid[s]) begin
        free_found = 1'b1;
        free_slot  = SLW'(s);
      end
  end

  logic in_order;
  assign in_order = (in_hdr.seq == expected[in_hdr.id]);

  // datapath to the depacketizer and handshake with the detector
  flit_t rel_flit;
  always_comb begin
    rel_flit.head = !rel_hdr_sent;
    rel_flit.vc   = VC_RESP;
    if (!rel_hdr_sent) begin
      rel_flit.data = FLIT_W'(slot_hdr[cur_slot]);
      rel_flit.tail = (slot_hdr[cur_slot].kind == PK_WR_RESP);
    end else begin
      rel_flit.data = rob_mem[int'(cur_slot) * MAX_BURST + int'(cur_word)];
      rel_flit.tail = (LEN_W'(cur_word) == slot_hdr[cur_slot].len);
    end
  end

  logic start_pass, start_store, start_release;
  assign start_release = (state == R_IDLE) && rel_found;
  assign start_pass    = (state == R_IDLE) && !rel_found && in_valid && in_flit.head && in_order;
  assign start_store   = (state == R_IDLE) && !rel_found && in_valid && in_flit.head && !in_order
                         && free_found;

  always_comb begin
    out_valid = 1'b0;
    out_flit  = in_flit;
    in_ready  = 1'b0;
    unique case (state)
      R_IDLE: begin
        if (start_pass) begin
          out_valid = 1'b1;
          in_ready  = out_ready;
        end else if (start_store) begin
          in_ready  = 1'b1;
        end
      end
      R_PASS: begin
        out_valid = in_valid;
        in_ready  = out_ready;
      end
      R_STORE:   in_ready = 1'b1;
      R_RELEASE: begin
        out_valid = 1'b1;
        out_flit  = rel_flit;
      end
      default: ;
    endcase
  end

  logic out_fire, in_fire, delivered;
  logic [ID_W-1:0] delivered_id;
  assign out_fire = out_valid && out_ready;
  assign in_fire  = in_valid && in_ready;
  assign delivered    = out_fire && out_flit.tail;
  assign delivered_id = (state == R_RELEASE) ? slot_hdr[cur_slot].id :
                        (state == R_PASS)    ? cur_id : in_hdr.id;

  assign ev_stored   = start_store;
  assign ev_released = start_release;

  always_ff @(posedge clk) begin
    if (start_store)
      slot_hdr[free_slot] <= in_hdr;
    if (state == R_STORE && in_fire)
      rob_mem[int'(cur_slot) * MAX_BURST + int'(cur_word)] <= in_flit.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= R_IDLE;
      cur_slot     <= '0;
      cur_word     <= '0;
      cur_id       <= '0;
      rel_hdr_sent <= 1'b0;
      slot_valid   <= '0;
      outstanding  <= '0;
      for (int i = 0; i < NID; i++) begin
        next_seq[i] <= '0;
        expected[i] <= '0;
      end
    end else begin
      if (seq_take) next_seq[seq_id] <= next_seq[seq_id] + 1'b1;
      if (delivered) expected[delivered_id] <= expected[delivered_id] + 1'b1;
      outstanding <= outstanding + OW'(seq_take) - OW'(delivered);

      unique case (state)
        R_IDLE: begin
          if (start_release) begin
            state        <= R_RELEASE;
            cur_slot     <= rel_slot;
            cur_word     <= '0;
            rel_hdr_sent <= 1'b0;
          end else if (start_pass && out_fire && !in_flit.tail) begin
            state  <= R_PASS;
            cur_id <= in_hdr.id;
          end else if (start_store) begin
            cur_slot <= free_slot;
            cur_word <= '0;
            if (in_flit.tail) slot_valid[free_slot] <= 1'b1;
            else              state <= R_STORE;
          end
        end
        R_PASS: if (out_fire && in_flit.tail) state <= R_IDLE;
        R_STORE: if (in_fire) begin
          cur_word <= cur_word + 1'b1;
          if (in_flit.tail) begin
            slot_valid[cur_slot] <= 1'b1;
            state                <= R_IDLE;
          end
        end
        R_RELEASE: if (out_fire) begin
          if (rel_hdr_sent) cur_word <= cur_word + 1'b1;
          rel_hdr_sent <= 1'b1;
          if (out_flit.tail) begin
            slot_valid[cur_slot] <= 1'b0;
            state                <= R_IDLE;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(seq_take && !can_issue));
  a_store_has_room: assert property (@(posedge clk) disable iff (!rst_n)
                                     (state == R_IDLE && !rel_found && in_valid && in_flit.head
                                      && !in_order) |-> free_found);
endmodule
