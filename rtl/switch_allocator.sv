// switch_allocator: decides each cycle which input VCs send a flit through
// the crossbar.
//
// Separable input-first allocation in one cycle. Stage 1: every input port
// picks one of its requesting VCs round-robin. Stage 2: every output port
// picks one of the input ports whose stage-1 choice wants it, round-robin.
// A VC requests only when its front flit has an output VC and the
// downstream buffer has a credit for it, so a grant always moves a flit.
// A stage-1 pointer moves only when its choice also wins stage 2.
//
// Inputs: req/req_port per input VC. Outputs: in_gnt (one-hot over the VCs
// of each input port), out_valid and out_sel (the input port connected to
// each output port). All combinational. The allocator's organisation is this
// design's choice; the description names only its role.
module switch_allocator
  import bsor_pkg::*;
#(
  parameter int NUM_VCS = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NUM_VCS-1:0] req      [NUM_PORTS],
  input  port_e              req_port [NUM_PORTS][NUM_VCS],
  output logic [NUM_VCS-1:0] in_gnt   [NUM_PORTS],
  output logic [NUM_PORTS-1:0] out_valid,
  output logic [PORT_W-1:0]  out_sel  [NUM_PORTS]
);
  logic [NUM_VCS-1:0]   s1_gnt   [NUM_PORTS];
  port_e                s1_port  [NUM_PORTS];
  logic [NUM_PORTS-1:0] s1_valid;
  logic [NUM_PORTS-1:0] s2_req   [NUM_PORTS];
  logic [NUM_PORTS-1:0] s2_gnt   [NUM_PORTS];
  logic [NUM_PORTS-1:0] in_won;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    rr_arbiter #(.N(NUM_VCS)) u_in_arb (
      .clk, .rst_n,
      .req    (req[i]),
      .advance(in_won[i]),
      .gnt    (s1_gnt[i])
    );
    always_comb begin
      s1_valid[i] = |s1_gnt[i];
      s1_port[i]  = PORT_LOCAL;
      for (int v = 0; v < NUM_VCS; v++)
        if (s1_gnt[i][v]) s1_port[i] = req_port[i][v];
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < NUM_PORTS; i++)
        s2_req[o][i] = s1_valid[i] && (int'(s1_port[i]) == o);
    end
    rr_arbiter #(.N(NUM_PORTS)) u_out_arb (
      .clk, .rst_n,
      .req    (s2_req[o]),
      .advance(1'b1),
      .gnt    (s2_gnt[o])
    );
  end

  always_comb begin
    in_won = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_valid[o] = |s2_gnt[o];
      out_sel[o]   = '0;
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (s2_gnt[o][i]) begin
          out_sel[o] = PORT_W'(i);
          in_won[i]  = 1'b1;
        end
      end
    end
    for (int i = 0; i < NUM_PORTS; i++)
      in_gnt[i] = in_won[i] ? s1_gnt[i] : '0;
  end
endmodule
