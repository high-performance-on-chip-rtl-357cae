// noc_pkg: types and constants shared by the logic-layer network-on-chip.
//
// The platform is a 2D mesh of 5-port wormhole routers with two virtual
// channels per input port (VC 0 carries requests, VC 1 carries responses) and
// 32-bit flits. Each node has a network interface that turns AXI transactions
// of a processor (master) and of a stacked-DRAM controller (slave) into
// packets. The mesh size, flit width, VC count, VC buffer depth (5 flits),
// NI queue depth (8 x 32 bit), reorder buffer (48 words = 6 bursts of 8) and
// the 128 MB rank per node follow the reference configuration. The header
// layout, the AXI channel subset and the widths of ID, sequence and length
// fields are choices of this design.
//
// Packet formats (one flit = 32 bits of payload plus head/tail/VC sideband):
//   read  request : header, address                       (2 flits)
//   write request : header, address, len+1 data words
//   read  response: header, len+1 data words
//   write response: header only (head and tail in the same flit)
//
// Lint: a module that uses only some of these constants is reported for the
// ones it leaves unused; they are shared definitions, not dead logic.
package noc_pkg;

  // Mesh and router
  parameter int unsigned XW        = 2;   // bits of an X coordinate (mesh up to 4 wide)
  parameter int unsigned YW        = 2;   // bits of a Y coordinate (mesh up to 4 high)
  parameter int unsigned FLIT_W    = 32;  // flit payload width
  parameter int unsigned NUM_VC    = 2;   // virtual channels per input port
  parameter int unsigned VC_DEPTH  = 5;   // flits per VC buffer
  parameter int unsigned NUM_PORTS = 5;   // N, E, S, W, Local

  // AXI subset
  parameter int unsigned ID_W      = 4;
  parameter int unsigned ADDR_W    = 32;
  parameter int unsigned DATA_W    = 32;
  parameter int unsigned LEN_W     = 4;   // AXI3 burst length field (beats - 1)
  parameter int unsigned MAX_BURST = 8;   // longest burst carried by the network

  // Network interface
  parameter int unsigned SEQ_W       = 4;  // per-ID sequence number
  parameter int unsigned NI_Q_DEPTH  = 8;  // every NI queue is 8 x 32 bit
  parameter int unsigned ROB_SLOTS   = 6;  // reorder buffer: 6 outstanding bursts
  parameter int unsigned RANK_BITS   = 27; // 128 MB of stacked DRAM per node

  typedef enum logic [2:0] {
    P_NORTH = 3'd0,
    P_EAST  = 3'd1,
    P_SOUTH = 3'd2,
    P_WEST  = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    PK_RD_REQ  = 2'b00,
    PK_WR_REQ  = 2'b01,
    PK_RD_RESP = 2'b10,
    PK_WR_RESP = 2'b11
  } pkt_kind_e;

  // VC of a packet kind: the MSB of the kind (request 0, response 1).
  localparam logic VC_REQ  = 1'b0;
  localparam logic VC_RESP = 1'b1;

  typedef struct packed {
    pkt_kind_e        kind;   // [31:30]
    logic [XW-1:0]    dst_x;  // [29:28]
    logic [YW-1:0]    dst_y;  // [27:26]
    logic [XW-1:0]    src_x;  // [25:24]
    logic [YW-1:0]    src_y;  // [23:22]
    logic [ID_W-1:0]  id;     // [21:18]
    logic [SEQ_W-1:0] seq;    // [17:14]
    logic [LEN_W-1:0] len;    // [13:10]
    logic [7:0]       rsvd;   // [9:2]
    logic [1:0]       resp;   // [1:0] AXI response of a write response
  } header_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic              vc;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // AXI channels (valid/ready travel beside them)
  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } axi_ax_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              last;
  } axi_w_t;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
    logic              last;
  } axi_r_t;

  typedef struct packed {
    logic [ID_W-1:0] id;
    logic [1:0]      resp;
  } axi_b_t;

  // What the memory side keeps about a request until its response leaves.
  typedef struct packed {
    logic [XW-1:0]    src_x;
    logic [YW-1:0]    src_y;
    logic [ID_W-1:0]  id;
    logic [SEQ_W-1:0] seq;
    logic [LEN_W-1:0] len;
  } req_info_t;

endpackage
