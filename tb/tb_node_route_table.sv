// tb_node_route_table: self-checking test of the programmable routing table.
// Checks the reset contents (eject locally, index 0, VC 0), random writes
// read back through every read port at once, out-of-range indices on a
// reduced depth, and that a read in the cycle of a write to the same entry
// returns the old entry.
module tb_node_route_table;
  import bsor_pkg::*;
  localparam int DEPTH = 200;   // not a power of two: exercises range check
  localparam int NRD = NUM_PORTS;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [IDX_W-1:0] cfg_addr = '0;
  route_entry_t cfg_entry;
  logic [IDX_W-1:0] rd_idx [NRD];
  route_entry_t rd_entry [NRD];
  route_entry_t model [DEPTH];
  localparam route_entry_t RESET_ENTRY = '{PORT_LOCAL, '0, '0};
  int checks = 0, failures = 0;

  node_route_table #(.DEPTH(DEPTH), .NUM_RD(NRD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s @%0t", what, $time);
    end
  endtask

  function automatic route_entry_t rand_entry();
    route_entry_t e;
    e.out_port = port_e'($urandom_range(0, 4));
    e.next_idx = IDX_W'($urandom);
    e.next_vc  = VC_W'($urandom);
    return e;
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_entry = '0;
    for (int r = 0; r < NRD; r++) rd_idx[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) model[i] = '{PORT_LOCAL, '0, '0};
    // reset contents
    for (int i = 0; i < DEPTH; i += NRD) begin
      @(negedge clk);
      for (int r = 0; r < NRD; r++) rd_idx[r] = IDX_W'((i + r) % DEPTH);
      #1;
      for (int r = 0; r < NRD; r++) check(rd_entry[r] == model[(i + r) % DEPTH], "reset entry");
    end
    // random writes and reads
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      cfg_we    = ($urandom_range(0, 1) == 1);
      cfg_addr  = IDX_W'($urandom_range(0, 255));
      cfg_entry = rand_entry();
      for (int r = 0; r < NRD; r++) rd_idx[r] = IDX_W'($urandom_range(0, 255));
      if (k % 7 == 0) rd_idx[0] = cfg_addr;
      #1;
      for (int r = 0; r < NRD; r++) begin
        if (int'(rd_idx[r]) < DEPTH) check(rd_entry[r] == model[rd_idx[r]], "read (old value on same-cycle write)");
        else                         check(rd_entry[r] == RESET_ENTRY, "out of range read");
      end
      @(posedge clk);
      if (cfg_we && int'(cfg_addr) < DEPTH) model[cfg_addr] = cfg_entry;
    end
    @(negedge clk);
    cfg_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      rd_idx[i % NRD] = IDX_W'(i);
      #1;
      check(rd_entry[i % NRD] == model[i], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
