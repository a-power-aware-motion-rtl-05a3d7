// pe: processing element of the semi-systolic array.
//
// Holds one pixel of the current macro-block (loaded once per block) and
// one pixel of the reference chain (shifted on every shift). The block
// elements are AND gates: when the mask bit csm is 0 both operands of
// the datapath are forced to 0, so the absolute-difference unit and the
// adder see constant inputs and stop switching; the PE then adds 0.
// Otherwise it adds |cmb - ref| to the partial sum from the PE above.
//
// Interface: cmb_we/cmb_pix, csm, shift/ref_in, ref_out (the held
// reference pixel), psum_in/psum_out. Timing: the datapath is
// combinational; the column of PEs forms one adder chain.
module pe
  import me_pkg::*;
#(
  parameter int COL_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmb_we,
  input  pix_t             cmb_pix,
  input  logic             csm,
  input  logic             shift,
  input  pix_t             ref_in,
  output pix_t             ref_out,
  input  logic [COL_W-1:0] psum_in,
  output logic [COL_W-1:0] psum_out
);
  pix_t r_q, s_q;
  pix_t a, b, ad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q <= '0;
      s_q <= '0;
    end else begin
      if (cmb_we) r_q <= cmb_pix;
      if (shift)  s_q <= ref_in;
    end
  end

  always_comb begin
    a        = r_q & {PIX_W{csm}};   // block elements
    b        = s_q & {PIX_W{csm}};
    ad       = (a > b) ? a - b : b - a;
    psum_out = psum_in + COL_W'(ad);
  end

  assign ref_out = s_q;
endmodule
