// morph_filter: morphological gradient filter.
//
// G = (R dilated by B) - (R eroded by B). With the flat 3x3 structuring
// element B (all zeros) dilation is the window maximum and erosion the
// window minimum, so G = max - min over the 3x3 window (0..255). One of
// the three equivalent choices for the edge extraction unit; border
// replication is done before the window reaches the filter.
//
// Interface: win[r][c] as in hpf_filter; output grad. Combinational.
module morph_filter
  import me_pkg::*;
(
  input  pix_t  win [3][3],
  output grad_t grad
);
  pix_t mx, mn;
  always_comb begin
    mx = win[0][0];
    mn = win[0][0];
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        if (win[r][c] > mx) mx = win[r][c];
        if (win[r][c] < mn) mn = win[r][c];
      end
    grad = GRAD_W'(mx - mn);
  end
endmodule
