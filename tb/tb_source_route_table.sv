// tb_source_route_table: self-checking test of the per-node source routing
// table. Checks the reset contents (every route "eject", VC 0), random
// writes read back against a model, a same-cycle write and read of one
// entry returning the old route, and out-of-range destinations on a table
// whose depth is not a power of two.
module tb_source_route_table;
  import bsor_pkg::*;
  localparam int ND = 48;
  localparam int DW = $clog2(ND);
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [DW-1:0] cfg_dst = '0, rd_dst = '0;
  src_route_t cfg_route = '0, rd_route;
  src_route_t model [ND];
  int checks = 0, failures = 0;

  source_route_table #(.N_DEST(ND)) dut (.*);

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < ND; i++) model[i] = '0;
    for (int i = 0; i < ND; i++) begin
      @(negedge clk);
      rd_dst = DW'(i);
      #1 check(rd_route == '0, "reset route ejects");
    end
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      cfg_we = ($urandom_range(0, 2) == 0);
      cfg_dst = DW'($urandom_range(0, 63));
      cfg_route.route = {$urandom, $urandom};
      cfg_route.vc = VC_W'($urandom);
      rd_dst = (k % 5 == 0) ? cfg_dst : DW'($urandom_range(0, 63));
      #1;
      if (int'(rd_dst) < ND) check(rd_route == model[rd_dst], "route read (old value on same-cycle write)");
      else                   check(rd_route == '0, "out-of-range destination");
      @(posedge clk);
      if (cfg_we && int'(cfg_dst) < ND) model[cfg_dst] = cfg_route;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
