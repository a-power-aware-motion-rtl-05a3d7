// adder_tree (PAT): parallel adder tree over the column sums.
//
// Adds N column sums in a balanced binary tree of log2(N) adder levels
// and registers the result, giving the content-based SAD (CSSAD) of one
// candidate per cycle. The published architecture names the tree and its
// job; the single output register is this design's choice.
//
// Interface: in_valid/in_data[N] -> out_valid/sum. N must be a power of
// two. Timing: one cycle of latency, one sum per cycle.
module adder_tree #(
  parameter int N     = 16,
  parameter int IN_W  = 12,
  localparam int LEVELS = $clog2(N),
  localparam int OUT_W  = IN_W + LEVELS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_data [N],
  output logic             out_valid,
  output logic [OUT_W-1:0] sum
);
  logic [OUT_W-1:0] node [LEVELS+1][N];

  always_comb begin
    for (int l = 0; l <= LEVELS; l++)
      for (int k = 0; k < N; k++) node[l][k] = '0;
    for (int k = 0; k < N; k++) node[0][k] = OUT_W'(in_data[k]);
    for (int l = 1; l <= LEVELS; l++)
      for (int k = 0; k < (N >> l); k++)
        node[l][k] = node[l-1][2*k] + node[l-1][2*k+1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sum <= node[LEVELS][0];
    end
  end

  initial assert ((1 << LEVELS) == N) else $error("adder_tree: N must be a power of two");
endmodule
