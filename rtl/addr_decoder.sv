// addr_decoder: maps an AXI address to the mesh node whose stacked rank holds
// it (part of the packetizer's header builder).
//
// Every node carries one rank of RANK_BITS address bits (128 MB); the rank
// number is the address divided by the rank size, and node n sits at
// x = n mod MESH_X, y = n div MESH_X. Sixteen ranks of 128 MB give the 2 GB
// of stacked memory of the reference configuration; interleaving by rank is
// this design's choice.
// Lint: the low 27 address bits (the offset inside a rank) are unused here
// by design.
module addr_decoder
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [XW-1:0]     dst_x,
  output logic [YW-1:0]     dst_y
);
  localparam int unsigned NODE_W = ADDR_W - RANK_BITS;
  logic [NODE_W-1:0] node;
  assign node  = addr[ADDR_W-1:RANK_BITS];
  assign dst_x = XW'(node % NODE_W'(MESH_X));
  assign dst_y = YW'((node / NODE_W'(MESH_X)) % NODE_W'(MESH_Y));
endmodule
