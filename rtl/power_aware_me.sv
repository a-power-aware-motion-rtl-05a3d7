// power_aware_me: power-aware full-search motion estimator with
// content-based subsampling.
//
// For every current macro-block (CMB, N x N pixels) the design finds the
// motion vector (u,v), -p <= u,v <= p-1, that minimises the content-based
// SAD, the sum of |S - R| over only those pixels whose mask bit is 1.
// The mask (CSM) is the OR of a regular 8-to-m subsample pattern and the
// block's edge pixels, so detail is kept where aliasing would hurt and
// flat areas are subsampled. Masked-off processing elements see constant
// zero inputs and stop switching, which is where the power goes down.
//
//   edge_extraction_unit  gradient filter + CSM generator (threshold from m1)
//   threshold_controller  one m1 per macro-block position, adapted after
//                         each block so the mask's ones track trg_cnt
//   pe_array + shift_register_array
//                         N columns of N PEs over 2p-1 delay registers,
//                         chained into a snake; one candidate per shift
//   adder_tree            sums the N column sums into the CSSAD
//   mv_selector           keeps the minimum and its (u,v)
//   me_controller         phases, fill hold-off, candidate bookkeeping
//
// The host sets the power mode through sm_m (regular pattern 8-to-m) and
// trg_cnt (target ones in the mask); both are sampled at start together
// with mb_idx, the position of the block in the frame.
//
// Streams: cmb_* carries the N*N CMB pixels in raster order; ref_*
// carries the (N+2p-1)^2 search-area pixels column-major, starting at
// offset (-p,-p) from the block: the pixel at ref column X, row Y is the
// reference frame pixel at (x0 - p + X, y0 - p + Y). Both use valid/ready.
// Results (mv_u, mv_v, min_cssad, csm_cnt, m1_used) are valid from the
// done pulse until the next start. m1 of this block position is updated
// when the mask is complete, for use in the next frame.
//
// Timing with gap-free streams: done L*L + 2p + 2 cycles after start
// (L = N + 2p - 1), 6304 cycles at N = 16, p = 32, of which 4p^2 = 4096
// evaluate candidates. The edge extraction takes N*N + N*N/2 + N + 4
// cycles and is hidden behind the N*L-cycle reference fill when
// N*L >= that (p >= 6 at N = 16); otherwise edge_stall marks the cycles
// the fill waits.
module power_aware_me
  import me_pkg::*;
#(
  parameter int      N       = 16,
  parameter int      P       = 32,
  parameter int      NUM_MB  = 396,
  parameter filter_e FILTER  = FILT_HPF,
  parameter int      M1_FRAC = 12,
  parameter int      KP_Q    = 77,
  localparam int NN    = N * N,
  localparam int CNT_W = $clog2(NN) + 1,
  localparam int MB_W  = (NUM_MB > 1) ? $clog2(NUM_MB) : 1,
  localparam int MV_W  = $clog2(P) + 1,
  localparam int COL_W = PIX_W + $clog2(N),
  localparam int SAD_W = COL_W + $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [MB_W-1:0]        mb_idx,
  input  logic [3:0]             sm_m,
  input  logic [CNT_W-1:0]       trg_cnt,
  input  logic                   cmb_valid,
  output logic                   cmb_ready,
  input  pix_t                   cmb_pix,
  input  logic                   ref_valid,
  output logic                   ref_ready,
  input  pix_t                   ref_pix,
  output logic                   done,
  output logic signed [MV_W-1:0] mv_u,
  output logic signed [MV_W-1:0] mv_v,
  output logic [SAD_W-1:0]       min_cssad,
  output logic [CNT_W-1:0]       csm_cnt,
  output logic [M1_FRAC:0]       m1_used,
  output logic                   busy,
  output phase_e                 phase,
  output logic                   edge_stall,
  output logic                   m1_sat_lo,
  output logic                   m1_sat_hi
);
  logic             go;
  logic [MB_W-1:0]  mb_q;
  logic [3:0]       sm_q;
  logic [CNT_W-1:0] trg_q;
  logic [M1_FRAC:0] m1;
  logic [NN-1:0]    csm;
  logic             exu_done, exu_done_q;
  logic             cmb_we, ref_take, shift, acc_en, pat_valid;
  logic             mvs_clear, mvs_valid, best_valid;
  logic [$clog2(NN)-1:0] cmb_idx;
  logic signed [MV_W-1:0] mvs_u, mvs_v;
  pix_t             pe_bot [N], pe_top [N], sra_bot [N];
  logic [COL_W-1:0] col_sum [N];
  logic             sad_valid;
  logic [SAD_W-1:0] cssad;

  assign go = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mb_q       <= '0;
      sm_q       <= 4'd8;
      trg_q      <= CNT_W'(NN);
      m1_used    <= '0;
      exu_done_q <= 1'b0;
    end else begin
      exu_done_q <= exu_done;
      if (go) begin
        mb_q    <= mb_idx;
        sm_q    <= sm_m;
        trg_q   <= trg_cnt;
        m1_used <= m1;
      end
    end
  end

  logic [M1_FRAC:0] m1_hold;

  threshold_controller #(.N(N), .NUM_MB(NUM_MB), .M1_FRAC(M1_FRAC), .KP_Q(KP_Q)) u_ctl (
    .clk, .rst_n,
    .mb_idx  (go ? mb_idx : mb_q),
    .m1      (m1),
    .upd     (exu_done && !exu_done_q),
    .csm_cnt (csm_cnt),
    .trg_cnt (trg_q),
    .sat_lo (m1_sat_lo),
    .sat_hi (m1_sat_hi)
  );

  // The EXU uses the value latched at start, so the update written at the
  // end of edge determination cannot disturb the current block.
  assign m1_hold = m1_used;

  edge_extraction_unit #(.N(N), .FILTER(FILTER), .M1_FRAC(M1_FRAC)) u_exu (
    .clk, .rst_n,
    .start     (go),
    .pix_valid (cmb_we),
    .pix       (cmb_pix),
    .sm_m      (sm_q),
    .m1        (m1_hold),
    .csm, .csm_cnt,
    .done      (exu_done),
    .busy      ()
  );

  me_controller #(.N(N), .P(P)) u_seq (
    .clk, .rst_n,
    .start     (go),
    .busy, .phase,
    .cmb_valid, .cmb_ready, .cmb_we, .cmb_idx,
    .ref_valid, .ref_ready, .ref_take,
    .exu_done, .edge_stall,
    .shift, .acc_en, .pat_valid,
    .mvs_clear, .mvs_valid, .mvs_u, .mvs_v,
    .done
  );

  // Snake: new pixels enter column N-1; the top of PE column c+1 feeds
  // the SRA bottom of column c. Tail shifts after the last input push 0.
  always_comb
    for (int c = 0; c < N; c++)
      sra_bot[c] = (c == N - 1) ? (ref_take ? ref_pix : '0) : pe_top[c+1];

  shift_register_array #(.N(N), .P(P)) u_sra (
    .clk, .rst_n, .shift,
    .bot_in  (sra_bot),
    .top_out (pe_bot)
  );

  pe_array #(.N(N)) u_pea (
    .clk, .rst_n,
    .cmb_we, .cmb_idx, .cmb_pix,
    .csm, .shift,
    .bot_in  (pe_bot),
    .top_out (pe_top),
    .acc_en, .col_sum
  );

  adder_tree #(.N(N), .IN_W(COL_W)) u_pat (
    .clk, .rst_n,
    .in_valid  (pat_valid),
    .in_data   (col_sum),
    .out_valid (sad_valid),
    .sum       (cssad)
  );

  mv_selector #(.SAD_W(SAD_W), .MV_W(MV_W)) u_mvs (
    .clk, .rst_n,
    .clear    (mvs_clear),
    .in_valid (mvs_valid),
    .sad      (cssad),
    .u        (mvs_u),
    .v        (mvs_v),
    .best_sad (min_cssad),
    .best_u   (mv_u),
    .best_v   (mv_v),
    .best_valid
  );

  assert property (@(posedge clk) disable iff (!rst_n) mvs_valid |-> sad_valid);
endmodule
