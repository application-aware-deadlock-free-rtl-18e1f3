// flit_fifo: the flit buffer of one virtual channel at a router input.
//
// A first-word-fall-through FIFO of DEPTH entries held in a register array:
// the oldest entry is always visible on rd_data while not empty, and a pop
// removes it at the clock edge. A push and a pop may happen in the same cycle,
// also when the FIFO is full (the pop frees the slot the push fills).
// Upstream routers never push into a full buffer because they only send with
// a credit; an assertion checks that rule.
//
// The 16-flit depth per virtual channel is the buffer size used in the
// design's evaluation. Register storage and first-word fall through are this
// design's choices.
module flit_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (!full || rd_en))
    else $error("flit_fifo: write into a full buffer");
endmodule
