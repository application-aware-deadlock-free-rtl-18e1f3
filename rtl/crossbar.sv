// crossbar: the router's switch, connecting input ports to output ports.
//
// A combinational NUM_IN x NUM_OUT multiplexer crossbar: output o carries the
// flit of input sel[o] when en[o] is high, and is invalid otherwise. The
// switch allocator guarantees that no input drives two outputs. The flit
// rewritten for the next hop (new table index, output VC) is supplied by the
// router on each input. Plain multiplexers are this design's choice.
module crossbar
  import bsor_pkg::*;
#(
  parameter int NUM_IN  = NUM_PORTS,
  parameter int NUM_OUT = NUM_PORTS
) (
  input  flit_t              in_flit  [NUM_IN],
  input  logic [NUM_OUT-1:0] en,
  input  logic [PORT_W-1:0]  sel      [NUM_OUT],
  output flit_t              out_flit [NUM_OUT],
  output logic [NUM_OUT-1:0] out_valid
);
  always_comb begin
    for (int o = 0; o < NUM_OUT; o++) begin
      out_valid[o] = en[o] && (int'(sel[o]) < NUM_IN);
      out_flit[o]  = '0;
      if (out_valid[o]) out_flit[o] = in_flit[sel[o]];
    end
  end
endmodule
