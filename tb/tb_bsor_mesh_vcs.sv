// tb_bsor_mesh_vcs: the other virtual-channel counts the design was evaluated
// with (1, 4 and 8 VCs per port) on three 4x4 node-table meshes running side
// by side, each through the transpose, bit-complement, shuffle and
// 802.11a/g transmitter workloads. With one VC every route is
// dimension-order XY on VC0; with more VCs the routes use VC0 and VC1 and the
// resources inject on all VCs. mesh_traffic generates, routes and checks the
// traffic of each mesh.
module tb_bsor_mesh_vcs;
  import bsor_pkg::*;
  localparam int MX = 4, MY = 4, N = MX * MY;
  localparam int WATCHDOG = 400000;
  localparam int NCFG = 3;
  localparam int NVS [NCFG] = '{1, 4, 8};

  logic clk = 0;
  logic [NCFG-1:0] done;
  int n_checks [NCFG], n_failures [NCFG], n_delivered [NCFG];

  always #5 clk = ~clk;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int NV = NVS[c];
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

    bsor_mesh #(.MESH_X(MX), .MESH_Y(MY), .NUM_VCS(NV)) dut (.*);

    mesh_traffic #(.MX(MX), .MY(MY), .NV(NV), .BD(16), .PKTS(20), .NWL(4)) u_traffic (
      .*, .done(done[c]), .n_checks(n_checks[c]), .n_failures(n_failures[c]),
      .n_delivered(n_delivered[c]));
  end

  function automatic int sum(int a [NCFG]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    $display("watchdog expired after %0d delivered packets", sum(n_delivered));
    $display("TB_RESULT checks=%0d failures=%0d", sum(n_checks), sum(n_failures) + 1);
    $finish;
  end

  initial begin : report
    @(posedge clk);   // the traffic modules clear done at time 0
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", sum(n_checks), sum(n_failures));
    $finish;
  end
endmodule
