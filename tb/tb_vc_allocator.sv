// tb_vc_allocator: self-checking test of the VC allocator in both modes.
// Random requests, requested VCs and busy output VCs are applied to a static
// and a dynamic instance. Each cycle the grants are compared with a
// reference model of the intended policy: static mode grants a requested VC
// only if it is free, one requester per output VC, round-robin from the
// requester after the last winner; dynamic mode gives the lowest free VC of
// each output port to one requester, round-robin.
module tb_vc_allocator;
  import bsor_pkg::*;
  localparam int NV  = 4;
  localparam int NIN = NUM_PORTS * NV;
  logic clk = 0, rst_n = 0;
  logic [NIN-1:0] req;
  port_e req_port [NIN];
  logic [VC_W-1:0] req_vc [NIN];
  logic [NV-1:0] vc_busy [NUM_PORTS];
  logic [NIN-1:0] gnt_s, gnt_d;
  logic [VC_W-1:0] gvc_s [NIN], gvc_d [NIN];
  int checks = 0, failures = 0;
  int ptr_s [NUM_PORTS][NV];
  int ptr_d [NUM_PORTS];
  int n_grants = 0, n_blocked = 0;

  vc_allocator #(.NUM_VCS(NV), .STATIC_VC(1'b1)) u_s (
    .clk, .rst_n, .req, .req_port, .req_vc, .vc_busy, .gnt(gnt_s), .gnt_vc(gvc_s));
  vc_allocator #(.NUM_VCS(NV), .STATIC_VC(1'b0)) u_d (
    .clk, .rst_n, .req, .req_port, .req_vc, .vc_busy, .gnt(gnt_d), .gnt_vc(gvc_d));

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
    req = '0;
    for (int r = 0; r < NIN; r++) begin req_port[r] = PORT_LOCAL; req_vc[r] = '0; end
    for (int o = 0; o < NUM_PORTS; o++) begin
      vc_busy[o] = '0; ptr_d[o] = 0;
      for (int v = 0; v < NV; v++) ptr_s[o][v] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      logic [NIN-1:0] exp_s, exp_d;
      logic [VC_W-1:0] exp_vc [NIN];
      @(negedge clk);
      for (int r = 0; r < NIN; r++) begin
        req[r]      = ($urandom_range(0, 3) == 0);
        req_port[r] = port_e'($urandom_range(0, NUM_PORTS - 1));
        req_vc[r]   = VC_W'($urandom_range(0, NV - 1));
      end
      for (int o = 0; o < NUM_PORTS; o++) vc_busy[o] = NV'($urandom) & NV'($urandom);
      #1;
      // static reference
      exp_s = '0;
      for (int o = 0; o < NUM_PORTS; o++)
        for (int v = 0; v < NV; v++) begin
          bit any;
          any = 0;
          for (int k2 = 0; k2 < NIN && !vc_busy[o][v]; k2++) begin
            int r;
            r = (ptr_s[o][v] + k2) % NIN;
            if (!any && req[r] && int'(req_port[r]) == o && int'(req_vc[r]) == v) begin
              exp_s[r] = 1; any = 1; ptr_s[o][v] = (r + 1) % NIN;
            end
          end
          if (vc_busy[o][v])
            for (int r = 0; r < NIN; r++)
              if (req[r] && int'(req_port[r]) == o && int'(req_vc[r]) == v) n_blocked++;
        end
      check(gnt_s == exp_s, "static grants");
      for (int r = 0; r < NIN; r++) if (gnt_s[r]) begin
        check(gvc_s[r] == req_vc[r], "static grant is the requested VC");
        n_grants++;
      end
      // dynamic reference
      exp_d = '0;
      for (int r = 0; r < NIN; r++) exp_vc[r] = '0;
      for (int o = 0; o < NUM_PORTS; o++) begin
        int fv;
        fv = -1;
        for (int v = NV - 1; v >= 0; v--) if (!vc_busy[o][v]) fv = v;
        if (fv >= 0) begin
          bit any;
          any = 0;
          for (int k2 = 0; k2 < NIN; k2++) begin
            int r;
            r = (ptr_d[o] + k2) % NIN;
            if (!any && req[r] && int'(req_port[r]) == o) begin
              exp_d[r] = 1; exp_vc[r] = VC_W'(fv); any = 1; ptr_d[o] = (r + 1) % NIN;
            end
          end
        end
      end
      check(gnt_d == exp_d, "dynamic grants");
      for (int r = 0; r < NIN; r++) if (gnt_d[r]) check(gvc_d[r] == exp_vc[r], "dynamic VC choice");
    end
    check(n_grants > 100 && n_blocked > 100, "grants and busy-VC blocking both exercised");
    $display("static grants %0d, requests blocked by a busy VC %0d", n_grants, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
