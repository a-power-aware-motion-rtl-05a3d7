// sobel_filter: Sobel gradient filter.
//
// G = |SX*R| + |SY*R| with SX = [-1 -2 -1; 0 0 0; 1 2 1] (row difference)
// and SY = [-1 0 1; -2 0 2; -1 0 1] (column difference). Each term is at
// most 1020, the sum at most 2040. This is one of the three equivalent
// choices for the edge extraction unit; border replication is done
// before the window reaches the filter.
//
// Interface: win[r][c] as in hpf_filter; output grad. Combinational.
module sobel_filter
  import me_pkg::*;
(
  input  pix_t  win [3][3],
  output grad_t grad
);
  logic signed [GRAD_W:0] gx, gy;
  logic [GRAD_W-1:0] ax, ay;
  always_comb begin
    gx = ($signed({4'b0, win[2][0]}) + ($signed({4'b0, win[2][1]}) <<< 1) + $signed({4'b0, win[2][2]}))
       - ($signed({4'b0, win[0][0]}) + ($signed({4'b0, win[0][1]}) <<< 1) + $signed({4'b0, win[0][2]}));
    gy = ($signed({4'b0, win[0][2]}) + ($signed({4'b0, win[1][2]}) <<< 1) + $signed({4'b0, win[2][2]}))
       - ($signed({4'b0, win[0][0]}) + ($signed({4'b0, win[1][0]}) <<< 1) + $signed({4'b0, win[2][0]}));
    ax = (gx < 0) ? GRAD_W'(-gx) : GRAD_W'(gx);
    ay = (gy < 0) ? GRAD_W'(-gy) : GRAD_W'(gy);
    grad = ax + ay;
  end
endmodule
