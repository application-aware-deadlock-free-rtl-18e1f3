// tb_bsor_mesh_full: the mesh at its default size (8x8 nodes, two VCs,
// 16-flit VC buffers, 256-entry routing tables), run end to end through the
// transpose, bit-complement, shuffle and 802.11a/g transmitter workloads with
// routing-table reprogramming between them. mesh_traffic generates, routes
// and checks the traffic.
module tb_bsor_mesh_full;
  import bsor_pkg::*;
  localparam int MX = 8, MY = 8, N = MX * MY, NV = 2;
  localparam int WATCHDOG = 400000;
  logic clk = 0;
  logic rst_n, cfg_we;
  logic [$clog2(N)-1:0] cfg_node;
  logic [IDX_W-1:0] cfg_addr;
  route_entry_t cfg_entry;
  logic src_cfg_we;
  logic [$clog2(N)-1:0] src_cfg_dst;
  src_route_t src_cfg_route;
  logic [$clog2(N)-1:0] pe_route_dst [N];
  src_route_t pe_route [N];
  flit_t pe_in_flit [N];
  logic [N-1:0] pe_in_valid;
  logic [NV-1:0] pe_in_credit [N];
  flit_t pe_out_flit [N];
  logic [N-1:0] pe_out_valid;
  logic [NV-1:0] pe_out_credit [N];

  logic done;
  int n_checks, n_failures, n_delivered;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    $display("watchdog expired after %0d delivered packets", n_delivered);
    $display("TB_RESULT checks=%0d failures=%0d", n_checks, n_failures + 1);
    $finish;
  end

  initial begin : report
    @(posedge clk);   // the traffic module clears done at time 0
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", n_checks, n_failures);
    $finish;
  end

  bsor_mesh dut (.*);

  mesh_traffic #(.MX(MX), .MY(MY), .NV(NV), .BD(16), .PKTS(20), .NWL(4)) u_traffic (.*);
endmodule
