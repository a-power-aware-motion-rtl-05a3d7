// hpf_filter: high-pass gradient filter.
//
// G = |8*c - (sum of the eight neighbours)|, the magnitude of the 3x3
// high-pass mask [-1 -1 -1; -1 8 -1; -1 -1 -1] applied to the window.
// The window arrives with border pixels already replaced by their
// nearest in-block neighbour (done by the multiplexers of the edge
// extraction unit), so the filter itself has no border logic.
//
// Interface: win[r][c], r = row offset -1..1 as 0..2, c = column offset.
// Output grad, 0..2040. Timing: combinational; the caller registers it.
module hpf_filter
  import me_pkg::*;
(
  input  pix_t  win [3][3],
  output grad_t grad
);
  logic signed [GRAD_W+1:0] acc;
  always_comb begin
    acc = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (r == 1 && c == 1) acc += $signed({5'b0, win[r][c]}) <<< 3;
        else                  acc -= $signed({5'b0, win[r][c]});
    grad = (acc < 0) ? grad_t'(-acc) : grad_t'(acc);
  end
endmodule
