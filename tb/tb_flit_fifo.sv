// tb_flit_fifo: self-checking test of the VC flit buffer.
// Random pushes and pops (never pushing into a full buffer without a pop, as
// the credit protocol guarantees) are compared with a queue model: data
// order, empty/full/count, simultaneous push and pop when full, and the
// first-word-fall-through timing (a pushed word is visible the next cycle).
module tb_flit_fifo;
  localparam int W = 16;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en;
  logic [W-1:0] wr_data, rd_data;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "reset state");
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int mode;
      mode = (cyc / 500) % 3;  // phases: fill-biased, drain-biased, balanced
      @(negedge clk);
      // compare the visible state with the model
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(int'(count) == model.size(), "count");
      if (model.size() != 0) check(rd_data == model[0], "front data");
      rd_en   = ($urandom_range(0, 9) < (mode == 0 ? 2 : (mode == 1 ? 8 : 5)));
      wr_en   = ($urandom_range(0, 9) < (mode == 0 ? 8 : (mode == 1 ? 2 : 5)));
      if (model.size() == D && !rd_en) wr_en = 0;
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (rd_en && model.size() != 0) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    // push and pop on a full buffer in the same cycle
    @(negedge clk);
    rd_en = 0;
    while (model.size() < D) begin
      wr_en = 1; wr_data = W'($urandom);
      @(posedge clk); #1; model.push_back(wr_data);
      @(negedge clk);
    end
    check(full, "filled");
    wr_en = 1; rd_en = 1; wr_data = 16'hBEEF;
    @(posedge clk); #1;
    void'(model.pop_front()); model.push_back(16'hBEEF);
    @(negedge clk);
    wr_en = 0; rd_en = 0;
    check(full && int'(count) == D, "full after push+pop");
    check(rd_data == model[0], "front after push+pop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
