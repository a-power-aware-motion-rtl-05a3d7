// subsample_mask: one bit of the regular subsample mask SM_8:m.
//
// The regular pattern tiles a 4x4 basic mask over the macro-block:
// SM(i,j) = BM(i mod 4, j mod 4), where each basic-mask entry is a step
// function u(m - t) of the rate m (8-to-m, m = 2..8). m = 2 keeps one
// pixel in four (4-to-1), m = 8 keeps all of them (1-to-1); each step of
// m adds two pixels per 4x4 tile. The thresholds t are the ones of the
// published basic mask (see me_pkg::bm_threshold). Values of m below 2
// give an empty mask and above 8 a full one.
//
// Interface: m, the two low bits of the coordinates i and j; output sm.
// Timing: purely combinational.
module subsample_mask
  import me_pkg::*;
(
  input  logic [3:0] m,
  input  logic [1:0] i,
  input  logic [1:0] j,
  output logic       sm
);
  always_comb sm = (m >= bm_threshold(i, j));
endmodule
