// bsor_mesh: MESH_X x MESH_Y two-dimensional mesh network-on-chip built from
// table-routed virtual-channel routers (bsor_router), one per node.
//
// Node n = y * MESH_X + x sits at column x, row y. Its router's NORTH port
// links to node (x, y+1), EAST to (x+1, y), SOUTH to (x, y-1), WEST to
// (x-1, y); port LOCAL is the resource (processing element) of the node,
// which injects and receives flits through the pe_* ports. Ports on the mesh
// boundary are tied off: nothing arrives there and they never return a
// credit, so a route that leaves the mesh stalls instead of losing flits.
//
// Routes are not computed in hardware. With node-table routing
// (ROUTE_MODE = ROUTE_NODE_TABLE, the main mode), before an application
// runs, the routes found offline for its flows (minimal or not, with one VC per hop,
// from an acyclic channel dependence graph so that they cannot deadlock) are
// written into the node routing tables: cfg_we writes cfg_entry at index
// cfg_addr of node cfg_node's table, one entry per cycle. A resource then
// sends a packet by injecting its head flit with the flow's index at the
// source node; every router rewrites the index for the next node.
// With source routing (ROUTE_MODE = ROUTE_SOURCE) each node instead has a
// source_route_table, written through src_cfg_* for node cfg_node: the
// resource looks up the route to a packet's destination on pe_route_dst /
// pe_route and sends it, with that entry's VC, as the payload of the head
// (routing) flit; body flits follow with data.
//
// Local port protocol (per node, credit based, as between routers):
//  * injection: pe_in_valid with pe_in_flit, its vc field naming the input
//    VC buffer of the local port; the resource may send on VC v only while it
//    holds a credit for it (BUF_DEPTH at reset, one back on pe_in_credit[v]
//    per flit the router forwards);
//  * ejection: pe_out_valid with pe_out_flit; the resource has BUF_DEPTH
//    slots per VC and returns one credit on pe_out_credit[v] per flit it
//    consumes.
// A flit advances one hop per clock cycle when uncontended.
//
// The 8x8 size, 16-flit VC buffers and 256-entry tables follow the design's
// evaluation; the two-VC default is the configuration used in most of it.
// The configuration bus and the port numbering are this design's choices.
module bsor_mesh
  import bsor_pkg::*;
#(
  parameter int          MESH_X      = 8,
  parameter int          MESH_Y      = 8,
  parameter int          NUM_VCS     = 2,
  parameter int          BUF_DEPTH   = 16,
  parameter int          TABLE_DEPTH = 256,
  parameter bit          STATIC_VC   = 1'b1,
  parameter route_mode_e ROUTE_MODE  = ROUTE_NODE_TABLE,
  parameter int          N_NODES     = MESH_X * MESH_Y,
  parameter int          NODE_W      = (N_NODES > 1) ? $clog2(N_NODES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // routing table programming
  input  logic               cfg_we,
  input  logic [NODE_W-1:0]  cfg_node,
  input  logic [IDX_W-1:0]   cfg_addr,
  input  route_entry_t       cfg_entry,
  // source routing tables (ROUTE_MODE = ROUTE_SOURCE): cfg_node's entry
  // for destination src_cfg_dst
  input  logic               src_cfg_we,
  input  logic [NODE_W-1:0]  src_cfg_dst,
  input  src_route_t         src_cfg_route,
  // source route lookup by each node's resource (combinational)
  input  logic [NODE_W-1:0]  pe_route_dst  [N_NODES],
  output src_route_t         pe_route      [N_NODES],
  // resource injection
  input  flit_t              pe_in_flit    [N_NODES],
  input  logic [N_NODES-1:0] pe_in_valid,
  output logic [NUM_VCS-1:0] pe_in_credit  [N_NODES],
  // resource ejection
  output flit_t              pe_out_flit   [N_NODES],
  output logic [N_NODES-1:0] pe_out_valid,
  input  logic [NUM_VCS-1:0] pe_out_credit [N_NODES]
);
  flit_t              r_in_flit   [N_NODES][NUM_PORTS];
  logic [NUM_PORTS-1:0] r_in_valid [N_NODES];
  logic [NUM_VCS-1:0] r_in_credit [N_NODES][NUM_PORTS];
  flit_t              r_out_flit  [N_NODES][NUM_PORTS];
  logic [NUM_PORTS-1:0] r_out_valid [N_NODES];
  logic [NUM_VCS-1:0] r_out_credit[N_NODES][NUM_PORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      bsor_router #(
        .NUM_VCS    (NUM_VCS),
        .BUF_DEPTH  (BUF_DEPTH),
        .TABLE_DEPTH(TABLE_DEPTH),
        .STATIC_VC  (STATIC_VC),
        .ROUTE_MODE (ROUTE_MODE)
      ) u_router (
        .clk, .rst_n,
        .cfg_we    (cfg_we && (int'(cfg_node) == N)),
        .cfg_addr  (cfg_addr),
        .cfg_entry (cfg_entry),
        .in_flit   (r_in_flit[N]),
        .in_valid  (r_in_valid[N]),
        .in_credit (r_in_credit[N]),
        .out_flit  (r_out_flit[N]),
        .out_valid (r_out_valid[N]),
        .out_credit(r_out_credit[N])
      );

      // source routing table of this node
      if (ROUTE_MODE == ROUTE_SOURCE) begin : g_src
        source_route_table #(.N_DEST(N_NODES)) u_src_table (
          .clk, .rst_n,
          .cfg_we   (src_cfg_we && (int'(cfg_node) == N)),
          .cfg_dst  (src_cfg_dst),
          .cfg_route(src_cfg_route),
          .rd_dst   (pe_route_dst[N]),
          .rd_route (pe_route[N])
        );
      end else begin : g_no_src
        assign pe_route[N] = '0;
      end

      // local port
      assign r_in_flit[N][PORT_LOCAL]    = pe_in_flit[N];
      assign r_in_valid[N][PORT_LOCAL]   = pe_in_valid[N];
      assign pe_in_credit[N]             = r_in_credit[N][PORT_LOCAL];
      assign pe_out_flit[N]              = r_out_flit[N][PORT_LOCAL];
      assign pe_out_valid[N]             = r_out_valid[N][PORT_LOCAL];
      assign r_out_credit[N][PORT_LOCAL] = pe_out_credit[N];

      // north neighbour (x, y+1) receives on its SOUTH port
      if (y < MESH_Y - 1) begin : g_n
        assign r_in_flit[N][PORT_NORTH]    = r_out_flit[N+MESH_X][PORT_SOUTH];
        assign r_in_valid[N][PORT_NORTH]   = r_out_valid[N+MESH_X][PORT_SOUTH];
        assign r_out_credit[N][PORT_NORTH] = r_in_credit[N+MESH_X][PORT_SOUTH];
      end else begin : g_n_edge
        assign r_in_flit[N][PORT_NORTH]    = '0;
        assign r_in_valid[N][PORT_NORTH]   = 1'b0;
        assign r_out_credit[N][PORT_NORTH] = '0;
      end
      if (y > 0) begin : g_s
        assign r_in_flit[N][PORT_SOUTH]    = r_out_flit[N-MESH_X][PORT_NORTH];
        assign r_in_valid[N][PORT_SOUTH]   = r_out_valid[N-MESH_X][PORT_NORTH];
        assign r_out_credit[N][PORT_SOUTH] = r_in_credit[N-MESH_X][PORT_NORTH];
      end else begin : g_s_edge
        assign r_in_flit[N][PORT_SOUTH]    = '0;
        assign r_in_valid[N][PORT_SOUTH]   = 1'b0;
        assign r_out_credit[N][PORT_SOUTH] = '0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign r_in_flit[N][PORT_EAST]    = r_out_flit[N+1][PORT_WEST];
        assign r_in_valid[N][PORT_EAST]   = r_out_valid[N+1][PORT_WEST];
        assign r_out_credit[N][PORT_EAST] = r_in_credit[N+1][PORT_WEST];
      end else begin : g_e_edge
        assign r_in_flit[N][PORT_EAST]    = '0;
        assign r_in_valid[N][PORT_EAST]   = 1'b0;
        assign r_out_credit[N][PORT_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in_flit[N][PORT_WEST]    = r_out_flit[N-1][PORT_EAST];
        assign r_in_valid[N][PORT_WEST]   = r_out_valid[N-1][PORT_EAST];
        assign r_out_credit[N][PORT_WEST] = r_in_credit[N-1][PORT_EAST];
      end else begin : g_w_edge
        assign r_in_flit[N][PORT_WEST]    = '0;
        assign r_in_valid[N][PORT_WEST]   = 1'b0;
        assign r_out_credit[N][PORT_WEST] = '0;
      end
    end
  end
endmodule
