// mv_selector (MVS): compare-and-select of the best motion vector.
//
// Keeps the smallest CSSAD seen since clear and the candidate (u,v) that
// produced it. A candidate replaces the current best only when it is
// strictly smaller, so among equal sums the first one in scan order wins
// (u outer, v inner, both from -p upwards), as in the published search
// loop. The first candidate after clear is always taken.
//
// Interface: clear, in_valid/sad/u/v (u, v signed), best_sad/best_u/
// best_v, best_valid. Timing: the best values include a candidate from
// the cycle after its in_valid.
module mv_selector #(
  parameter int SAD_W = 16,
  parameter int MV_W  = 7
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  logic [SAD_W-1:0]       sad,
  input  logic signed [MV_W-1:0] u,
  input  logic signed [MV_W-1:0] v,
  output logic [SAD_W-1:0]       best_sad,
  output logic signed [MV_W-1:0] best_u,
  output logic signed [MV_W-1:0] best_v,
  output logic                   best_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_sad   <= '1;
      best_u     <= '0;
      best_v     <= '0;
      best_valid <= 1'b0;
    end else if (clear) begin
      best_sad   <= '1;
      best_valid <= 1'b0;
    end else if (in_valid && (!best_valid || sad < best_sad)) begin
      best_sad   <= sad;
      best_u     <= u;
      best_v     <= v;
      best_valid <= 1'b1;
    end
  end
endmodule
