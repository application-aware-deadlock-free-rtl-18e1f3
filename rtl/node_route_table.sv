// node_route_table: the programmable routing table of one router (node-table
// routing).
//
// Each entry belongs to one flow passing through the node and holds the
// output port, the table index the flow has at the next node and the virtual
// channel statically allocated to it on the output link. The routing stage
// replaces the fixed dimension-order logic of a conventional router: a head
// flit arriving with index i leaves through entry i's port, carrying entry
// i's next index. The table is written through a configuration port before an
// application runs, so routes may be minimal or non-minimal.
//
// NUM_RD combinational read ports (one per router input port, so every
// arriving head flit is looked up in the cycle it arrives) and one synchronous
// write port. A write and a read of the same entry in one cycle return the
// old entry. Depth 256 and the 8-bit index follow the design description; the
// per-entry VC field, the reset to "eject locally" and the port count are
// this design's choices.
module node_route_table
  import bsor_pkg::*;
#(
  parameter int DEPTH  = 256,
  parameter int NUM_RD = NUM_PORTS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration write port
  input  logic                     cfg_we,
  input  logic [IDX_W-1:0]         cfg_addr,
  input  route_entry_t             cfg_entry,
  // lookup ports
  input  logic [IDX_W-1:0]         rd_idx   [NUM_RD],
  output route_entry_t             rd_entry [NUM_RD]
);
  route_entry_t table_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) table_q[i] <= '{PORT_LOCAL, '0, '0};
    end else if (cfg_we && (int'(cfg_addr) < DEPTH)) begin
      table_q[cfg_addr] <= cfg_entry;
    end
  end

  always_comb begin
    for (int r = 0; r < NUM_RD; r++) begin
      if (int'(rd_idx[r]) < DEPTH) rd_entry[r] = table_q[rd_idx[r]];
      else                         rd_entry[r] = '{PORT_LOCAL, '0, '0};
    end
  end
endmodule
