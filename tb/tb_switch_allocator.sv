// tb_switch_allocator: self-checking test of the separable input-first
// switch allocator. Random requests per input VC, each towards a random
// output port, are compared every cycle with a reference model: round-robin
// choice among an input port's requesting VCs, then round-robin choice among
// the inputs competing for each output; an input's pointer moves only when
// its choice wins. Also checks the structural rules: at most one VC per
// input, at most one input per output, only requesting VCs granted.
module tb_switch_allocator;
  import bsor_pkg::*;
  localparam int NV = 2;
  logic clk = 0, rst_n = 0;
  logic [NV-1:0] req [NUM_PORTS];
  port_e req_port [NUM_PORTS][NV];
  logic [NV-1:0] in_gnt [NUM_PORTS];
  logic [NUM_PORTS-1:0] out_valid;
  logic [PORT_W-1:0] out_sel [NUM_PORTS];
  int checks = 0, failures = 0;
  int ptr_in [NUM_PORTS];
  int ptr_out [NUM_PORTS];
  int n_conflicts = 0;

  switch_allocator #(.NUM_VCS(NV)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s @%0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      req[i] = '0; ptr_in[i] = 0; ptr_out[i] = 0;
      for (int v = 0; v < NV; v++) req_port[i][v] = PORT_LOCAL;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      int s1 [NUM_PORTS];
      int exp_sel [NUM_PORTS];
      @(negedge clk);
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NV; v++) begin
          req[i][v]      = ($urandom_range(0, 2) != 0);
          req_port[i][v] = port_e'($urandom_range(0, NUM_PORTS - 1));
        end
      #1;
      // stage 1 reference
      for (int i = 0; i < NUM_PORTS; i++) begin
        s1[i] = -1;
        for (int k2 = NV - 1; k2 >= 0; k2--) begin
          int v;
          v = (ptr_in[i] + k2) % NV;
          if (req[i][v]) s1[i] = v;
        end
      end
      // stage 2 reference
      for (int o = 0; o < NUM_PORTS; o++) begin
        int cnt;
        exp_sel[o] = -1; cnt = 0;
        for (int k2 = NUM_PORTS - 1; k2 >= 0; k2--) begin
          int i;
          i = (ptr_out[o] + k2) % NUM_PORTS;
          if (s1[i] >= 0 && int'(req_port[i][s1[i]]) == o) begin exp_sel[o] = i; cnt++; end
        end
        if (cnt > 1) n_conflicts++;
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        check(out_valid[o] == (exp_sel[o] >= 0), "output valid");
        if (exp_sel[o] >= 0) begin
          check(int'(out_sel[o]) == exp_sel[o], "output select");
          check(in_gnt[exp_sel[o]] == NV'(1 << s1[exp_sel[o]]), "input VC grant");
          ptr_out[o] = (exp_sel[o] + 1) % NUM_PORTS;
          ptr_in[exp_sel[o]] = (s1[exp_sel[o]] + 1) % NV;
        end
      end
      for (int i = 0; i < NUM_PORTS; i++) begin
        bit won;
        won = 0;
        for (int o = 0; o < NUM_PORTS; o++) if (exp_sel[o] == i) won = 1;
        if (!won) check(in_gnt[i] == '0, "loser has no grant");
        check((in_gnt[i] & ~req[i]) == '0, "grant only to requesters");
      end
    end
    check(n_conflicts > 100, "output conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
