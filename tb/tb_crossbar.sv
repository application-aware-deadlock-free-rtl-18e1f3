// tb_crossbar: self-checking test of the router crossbar. Random flits on
// every input, random enables and selects (including out-of-range selects),
// each output compared with the input it selects.
module tb_crossbar;
  import bsor_pkg::*;
  flit_t in_flit [NUM_PORTS];
  logic [NUM_PORTS-1:0] en;
  logic [PORT_W-1:0] sel [NUM_PORTS];
  flit_t out_flit [NUM_PORTS];
  logic [NUM_PORTS-1:0] out_valid;
  int checks = 0, failures = 0;

  crossbar #(.NUM_IN(NUM_PORTS), .NUM_OUT(NUM_PORTS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s @%0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        in_flit[i] = flit_t'({$urandom, $urandom, $urandom});
        sel[i]     = PORT_W'($urandom_range(0, 6));
      end
      en = NUM_PORTS'($urandom);
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        bit exp_v;
        exp_v = en[o] && (int'(sel[o]) < NUM_PORTS);
        check(out_valid[o] == exp_v, "valid");
        if (exp_v) check(out_flit[o] == in_flit[sel[o]], "routed flit");
        else       check(out_flit[o] == '0, "idle output is zero");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
