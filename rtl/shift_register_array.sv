// shift_register_array (SRA): reference-data delay lines below the PE array.
//
// N columns of 2p-1 pixel registers. On every shift each column moves up
// by one: the bottom register takes bot_in[c], the top register feeds
// top_out[c], which drives the bottom PE of the same column. A column of
// the SRA plus the N PEs above it is a chain of N + 2p - 1 registers,
// exactly one column of the search area, so the PE array sees every
// vertical offset of that column in turn. In the top level the chains
// are linked into one snake: the pixel leaving the top of PE column c+1
// enters the SRA at the bottom of column c, and new search-area pixels
// enter at column N-1.
//
// Interface: shift, bot_in[N], top_out[N]. Timing: one register per
// stage, a pixel needs 2p-1 shifts to cross the SRA.
module shift_register_array
  import me_pkg::*;
#(
  parameter int N = 16,
  parameter int P = 32,
  localparam int DEPTH = 2 * P - 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  pix_t bot_in  [N],
  output pix_t top_out [N]
);
  pix_t sr [N][DEPTH];   // [column][stage], stage 0 at the top

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N; c++)
        for (int d = 0; d < DEPTH; d++) sr[c][d] <= '0;
    end else if (shift) begin
      for (int c = 0; c < N; c++) begin
        for (int d = 0; d < DEPTH - 1; d++) sr[c][d] <= sr[c][d+1];
        sr[c][DEPTH-1] <= bot_in[c];
      end
    end
  end

  always_comb
    for (int c = 0; c < N; c++) top_out[c] = sr[c][0];
endmodule
