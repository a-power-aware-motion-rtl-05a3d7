// edge_extraction_unit (EXU): gradient filter plus CSM generator.
//
// The current macro-block streams in one pixel per cycle in raster order
// (k = y*N + x) and is kept in a local N x N buffer. The gradient filter
// works one pixel per cycle and starts as soon as a pixel's 3x3
// neighbourhood has arrived (N + 2 pixels behind the load), so filtering
// overlaps the load. Border pixels of the block are handled by
// multiplexers that replace an out-of-block neighbour by the nearest
// in-block pixel (clamped coordinates); the published design uses
// multiplexers for this but does not say which pixel they select, so
// replication is this design's choice. The gradients go to the CSM
// generator, which builds the mask once the last gradient is in.
//
// FILTER selects which of the three gradient filters is embedded (only
// one is needed); the high-pass filter is the default.
//
// Interface: start (new block; also clears the mask), pix_valid/pix
// (always accepted until N*N pixels are in), sm_m and m1 (stable until
// done), csm, csm_cnt, done (level until the next start), busy.
// Timing with a gap-free pixel stream: done rises N*N + N*N/2 + N + 4
// cycles after start.
module edge_extraction_unit
  import me_pkg::*;
#(
  parameter int      N       = 16,
  parameter filter_e FILTER  = FILT_HPF,
  parameter int      M1_FRAC = 12,
  localparam int NN    = N * N,
  localparam int IDX_W = $clog2(NN),
  localparam int CNT_W = $clog2(NN) + 1,
  localparam int LOG2N = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             pix_valid,
  input  pix_t             pix,
  input  logic [3:0]       sm_m,
  input  logic [M1_FRAC:0] m1,
  output logic [NN-1:0]    csm,
  output logic [CNT_W-1:0] csm_cnt,
  output logic             done,
  output logic             busy
);
  pix_t             cbuf [NN];
  logic [CNT_W-1:0] load_cnt;   // pixels received
  logic [CNT_W-1:0] filt_cnt;   // gradients produced
  logic             active;
  logic             fire;
  pix_t             win [3][3];
  grad_t            grad;
  logic [LOG2N-1:0] fx, fy;

  always_comb begin
    fx   = filt_cnt[LOG2N-1:0];
    fy   = filt_cnt[IDX_W-1:LOG2N];
    fire = active && (filt_cnt < CNT_W'(NN)) &&
           ((load_cnt == CNT_W'(NN)) || (load_cnt > filt_cnt + CNT_W'(N + 1)));
  end

  // Border multiplexers: clamp each neighbour coordinate into the block.
  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        int yy, xx;
        yy = int'(fy) + r - 1;
        xx = int'(fx) + c - 1;
        if (yy < 0) yy = 0;
        if (yy > N - 1) yy = N - 1;
        if (xx < 0) xx = 0;
        if (xx > N - 1) xx = N - 1;
        win[r][c] = cbuf[yy * N + xx];
      end
  end

  generate
    if (FILTER == FILT_SOBEL) begin : g_sobel
      sobel_filter u_filt (.win(win), .grad(grad));
    end else if (FILTER == FILT_MORPH) begin : g_morph
      morph_filter u_filt (.win(win), .grad(grad));
    end else begin : g_hpf
      hpf_filter u_filt (.win(win), .grad(grad));
    end
  endgenerate

  always_ff @(posedge clk) begin
    if (active && pix_valid && load_cnt < CNT_W'(NN)) cbuf[load_cnt[IDX_W-1:0]] <= pix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      load_cnt <= '0;
      filt_cnt <= '0;
    end else if (start) begin
      active   <= 1'b1;
      load_cnt <= '0;
      filt_cnt <= '0;
    end else if (active) begin
      if (pix_valid && load_cnt < CNT_W'(NN)) load_cnt <= load_cnt + 1'b1;
      if (fire) filt_cnt <= filt_cnt + 1'b1;
      if (done) active <= 1'b0;
    end
  end

  csm_generator #(.N(N), .M1_FRAC(M1_FRAC)) u_csm (
    .clk, .rst_n,
    .clear  (start),
    .g_valid(fire),
    .g_data (grad),
    .m1, .sm_m, .csm, .csm_cnt, .done
  );

  assign busy = active && !done;
endmodule
