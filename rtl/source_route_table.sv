// source_route_table: the routing table of one node for source routing.
//
// Holds, for every destination node, the complete route computed offline
// for traffic from this node to it, and the VC the packet uses. The
// resource reads the entry for a packet's destination and places the route
// in the packet's head flit (the routing flit); each router on the way takes
// the lowest three bits as its output port and shifts the route right, and
// the all-zero code that remains after the last hop means "eject".
// Packets with the same source and destination therefore share one route.
//
// One combinational read port, one synchronous write port; a write and a
// read of the same entry in one cycle return the old entry. Reset makes
// every route "eject at once" on VC 0. The route encoding, three bits per
// hop in a 64-bit word (at most 21 router-to-router hops), is this design's
// choice.
module source_route_table
  import bsor_pkg::*;
#(
  parameter int N_DEST = 64,
  parameter int DEST_W = (N_DEST > 1) ? $clog2(N_DEST) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [DEST_W-1:0] cfg_dst,
  input  src_route_t        cfg_route,
  input  logic [DEST_W-1:0] rd_dst,
  output src_route_t        rd_route
);
  src_route_t table_q [N_DEST];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_DEST; i++) table_q[i] <= '0;
    end else if (cfg_we && (int'(cfg_dst) < N_DEST)) begin
      table_q[cfg_dst] <= cfg_route;
    end
  end

  assign rd_route = (int'(rd_dst) < N_DEST) ? table_q[rd_dst] : '0;
endmodule
