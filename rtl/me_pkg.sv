// me_pkg: types and constants shared by the power-aware motion estimator.
//
// Pixels are 8-bit luminance samples. Gradients of the 3x3 filters need
// 11 bits (the high-pass and Sobel filters reach 8*255 = 2040). The
// filter selector picks which of the three gradient filters the edge
// extraction unit embeds; the high-pass filter is the default, the other
// two are the alternative implementations of the same function.
// The basic-mask thresholds come from the step-function matrix that
// defines the regular 8-to-m subsample pattern: a mask bit at (a,b)
// (a = i mod 4, b = j mod 4) is 1 when m >= BM_T[a][b].
package me_pkg;

  localparam int PIX_W  = 8;
  localparam int GRAD_W = 11;

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [GRAD_W-1:0] grad_t;

  typedef enum logic [1:0] {
    FILT_HPF   = 2'd0,
    FILT_SOBEL = 2'd1,
    FILT_MORPH = 2'd2
  } filter_e;

  // Phases of one macro-block operation.
  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,
    PH_INIT  = 2'd1,   // initial CMB and initial RMB phases (edge extraction runs alongside)
    PH_SAD   = 2'd2,   // SAD calculation phase
    PH_FLUSH = 2'd3    // last candidates travel through the adder tree and the selector
  } phase_e;

  // Threshold of the step function u(m - t) for each basic-mask position.
  function automatic logic [3:0] bm_threshold(input logic [1:0] a, input logic [1:0] b);
    logic [3:0] t;
    unique case ({a[0], b})
      3'b0_00: t = 4'd2;
      3'b0_01: t = 4'd5;
      3'b0_10: t = 4'd2;
      3'b0_11: t = 4'd6;
      3'b1_00: t = 4'd3;
      3'b1_01: t = 4'd7;
      3'b1_10: t = 4'd4;
      default: t = 4'd8;
    endcase
    return t;
  endfunction

endpackage
