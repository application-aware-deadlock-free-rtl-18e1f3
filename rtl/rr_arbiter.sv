// rr_arbiter: round-robin arbiter used by the virtual-channel and switch
// allocators.
//
// Grants exactly one of the asserted requests (one-hot gnt, combinational).
// The request just after the last one that was granted and accepted has the
// highest priority, so every persistent requester is served within N grants.
// The priority pointer moves only when `advance` is high in a cycle with a
// grant, which lets a two-stage allocator keep its priority when the second
// stage refuses the first stage's choice.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;      // index with the highest priority
  logic [IW-1:0] gnt_idx;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int k = N - 1; k >= 0; k--) begin
      logic [IW-1:0] i;
      i = IW'((int'(ptr) + k) % N);
      if (req[i]) begin
        gnt     = '0;
        gnt[i]  = 1'b1;
        gnt_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  ptr <= '0;
    else if (advance && |gnt)    ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end
endmodule
