// vc_allocator: assigns output virtual channels to packets whose head flit
// waits at the front of an input VC buffer.
//
// Static mode (STATIC_VC = 1, the design's main mode): the routing table has
// already chosen the output VC of every flow hop by hop, offline, together
// with its route. The allocator only checks that this VC is not held by
// another packet (wormhole: a VC carries one packet at a time, from head to
// tail) and, when several head flits want the same free VC in one cycle,
// picks one round-robin. There is no search over VCs, which is what makes
// static allocation cheap.
// Dynamic mode (STATIC_VC = 0, the conventional alternative): each output
// port gives its lowest-numbered free VC to one requester per cycle,
// round-robin; the requested VC is ignored.
//
// Requesters are the NIN = NUM_PORTS * NUM_VCS input VCs, numbered
// port * NUM_VCS + vc. All outputs are combinational; the round-robin
// pointers advance on every grant. The caller marks a granted output VC busy
// from the next cycle and frees it when the packet's tail leaves.
module vc_allocator
  import bsor_pkg::*;
#(
  parameter int NUM_VCS   = 2,
  parameter bit STATIC_VC = 1'b1,
  parameter int NIN       = NUM_PORTS * NUM_VCS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NIN-1:0]   req,
  input  port_e            req_port [NIN],
  input  logic [VC_W-1:0]  req_vc   [NIN],
  input  logic [NUM_VCS-1:0] vc_busy [NUM_PORTS],
  output logic [NIN-1:0]   gnt,
  output logic [VC_W-1:0]  gnt_vc   [NIN]
);
  if (STATIC_VC) begin : g_static
    // one arbiter per output VC
    logic [NIN-1:0] arb_req [NUM_PORTS*NUM_VCS];
    logic [NIN-1:0] arb_gnt [NUM_PORTS*NUM_VCS];

    for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
      for (genvar v = 0; v < NUM_VCS; v++) begin : g_vc
        always_comb begin
          for (int r = 0; r < NIN; r++)
            arb_req[o*NUM_VCS+v][r] = req[r] && (int'(req_port[r]) == o) &&
                                      (int'(req_vc[r]) == v) && !vc_busy[o][v];
        end
        rr_arbiter #(.N(NIN)) u_arb (
          .clk, .rst_n,
          .req    (arb_req[o*NUM_VCS+v]),
          .advance(1'b1),
          .gnt    (arb_gnt[o*NUM_VCS+v])
        );
      end
    end

    always_comb begin
      gnt = '0;
      for (int k = 0; k < NUM_PORTS * NUM_VCS; k++) gnt |= arb_gnt[k];
      for (int r = 0; r < NIN; r++) gnt_vc[r] = req_vc[r];
    end
  end else begin : g_dynamic
    // one arbiter per output port; the winner takes the lowest free VC
    logic [NIN-1:0]    arb_req [NUM_PORTS];
    logic [NIN-1:0]    arb_gnt [NUM_PORTS];
    logic [VC_W-1:0]   free_vc [NUM_PORTS];
    logic [NUM_PORTS-1:0] any_free;

    for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
      always_comb begin
        any_free[o] = 1'b0;
        free_vc[o]  = '0;
        for (int v = NUM_VCS - 1; v >= 0; v--) begin
          if (!vc_busy[o][v]) begin
            any_free[o] = 1'b1;
            free_vc[o]  = VC_W'(v);
          end
        end
        for (int r = 0; r < NIN; r++)
          arb_req[o][r] = req[r] && (int'(req_port[r]) == o) && any_free[o];
      end
      rr_arbiter #(.N(NIN)) u_arb (
        .clk, .rst_n,
        .req    (arb_req[o]),
        .advance(1'b1),
        .gnt    (arb_gnt[o])
      );
    end

    always_comb begin
      gnt = '0;
      for (int r = 0; r < NIN; r++) gnt_vc[r] = '0;
      for (int o = 0; o < NUM_PORTS; o++) begin
        gnt |= arb_gnt[o];
        for (int r = 0; r < NIN; r++)
          if (arb_gnt[o][r]) gnt_vc[r] = free_vc[o];
      end
    end
  end
endmodule
