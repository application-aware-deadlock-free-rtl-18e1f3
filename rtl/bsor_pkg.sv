// bsor_pkg: types and constants shared by the table-routed virtual-channel
// network-on-chip.
//
// A packet is a wormhole sequence of flits. Its head flit carries the routing
// information: in node-table mode the 8-bit table index of the current hop,
// in source mode the list of output ports of the remaining hops, packed three
// bits per hop in the payload (least significant hop first). Every flit names
// the virtual channel (VC) it occupies on the link it is crossing.
//
// The 8-bit table index follows the 256-entry routing table sized in the
// design description. The 3-bit port code, the 3-bit VC field (up to 8 VCs)
// and the 64-bit payload are this design's choices.
package bsor_pkg;

  localparam int NUM_PORTS = 5;   // local resource port + four mesh directions
  localparam int PORT_W    = 3;
  localparam int VC_W      = 3;   // room for up to 8 virtual channels
  localparam int IDX_W     = 8;   // 256-entry node routing table
  localparam int DATA_W    = 64;
  localparam int HOP_W     = PORT_W;               // one hop of a source route

  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,   // towards y+1
    PORT_EAST  = 3'd2,   // towards x+1
    PORT_SOUTH = 3'd3,   // towards y-1
    PORT_WEST  = 3'd4    // towards x-1
  } port_e;

  typedef enum logic [1:0] {
    FLIT_BODY     = 2'd0,
    FLIT_HEAD     = 2'd1,
    FLIT_TAIL     = 2'd2,
    FLIT_HEADTAIL = 2'd3   // single-flit packet
  } flit_type_e;

  typedef enum logic {
    ROUTE_NODE_TABLE = 1'b0,
    ROUTE_SOURCE     = 1'b1
  } route_mode_e;

  typedef struct packed {
    flit_type_e        ftype;
    logic [VC_W-1:0]   vc;     // VC on the link this flit is crossing
    logic [IDX_W-1:0]  idx;    // node-table index at the receiving router (head only)
    logic [DATA_W-1:0] data;   // payload; the source route in source mode (head only)
  } flit_t;

  // One node routing table entry: where a flow goes from this node and how
  // it is named at the next node.
  typedef struct packed {
    port_e             out_port;
    logic [IDX_W-1:0]  next_idx;
    logic [VC_W-1:0]   next_vc;   // statically allocated VC on the output link
  } route_entry_t;

  // One source routing table entry: the whole route to a destination, as
  // carried in the head flit, and the VC the packet uses on every hop.
  typedef struct packed {
    logic [DATA_W-1:0] route;   // hop k's output port in bits [3k+2:3k]; 0 = eject
    logic [VC_W-1:0]   vc;
  } src_route_t;

  function automatic logic is_head(flit_type_e t);
    return (t == FLIT_HEAD) || (t == FLIT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FLIT_TAIL) || (t == FLIT_HEADTAIL);
  endfunction

endpackage
