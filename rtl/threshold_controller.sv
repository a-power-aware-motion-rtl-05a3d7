// threshold_controller: adaptive control of the edge threshold parameter.
//
// One threshold parameter m1 is kept per macro-block position. After a
// macro-block's mask is built, its entry is moved towards the value that
// makes the mask hold the target number of ones:
//     m1 <- clamp01( m1 + Kp * (csm_cnt - trg_cnt) / N^2 )
// Too many ones raise the threshold, too few lower it. The counts are
// normalised by the block size N^2 so that Kp is a dimensionless gain
// (this design's reading; the update rule and clamping follow the
// published controller). The update is rounded to the nearest m1 step.
//
// Number formats (this design's choice): m1 is unsigned with M1_FRAC
// fraction bits, 1.0 = 2**M1_FRAC; Kp = KP_Q / 2**KP_FRAC (77/256 ~ 0.3).
// Every entry resets to 0, i.e. threshold = min gradient, so every pixel
// is an edge and the first frame runs at the full 1-to-1 rate.
//
// Interface: mb_idx selects the entry read on m1 (combinational) and the
// one written when upd is high; csm_cnt and trg_cnt are sampled with upd.
// sat_lo/sat_hi are registered and tell whether the last update was
// clamped. Timing: the new value is readable the cycle after upd.
module threshold_controller #(
  parameter int N        = 16,
  parameter int NUM_MB   = 396,
  parameter int M1_FRAC  = 12,
  parameter int KP_Q     = 77,
  parameter int KP_FRAC  = 8,
  localparam int CNT_W   = $clog2(N * N) + 1,
  localparam int MB_W    = (NUM_MB > 1) ? $clog2(NUM_MB) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [MB_W-1:0]  mb_idx,
  output logic [M1_FRAC:0] m1,
  input  logic             upd,
  input  logic [CNT_W-1:0] csm_cnt,
  input  logic [CNT_W-1:0] trg_cnt,
  output logic             sat_lo,
  output logic             sat_hi
);
  localparam int SH    = KP_FRAC + 2 * $clog2(N) - M1_FRAC;
  localparam int PROD_W = CNT_W + KP_FRAC + M1_FRAC + 4;
  localparam logic signed [PROD_W-1:0] ONE = PROD_W'(1) <<< M1_FRAC;

  logic [M1_FRAC:0] mem [NUM_MB];

  logic signed [PROD_W-1:0] diff, prod, delta, next;

  always_comb begin
    m1    = mem[mb_idx];
    diff  = $signed(PROD_W'(csm_cnt)) - $signed(PROD_W'(trg_cnt));
    prod  = diff * $signed(PROD_W'(KP_Q));
    if (SH > 0) delta = (prod + (PROD_W'(1) <<< (SH > 0 ? SH - 1 : 0))) >>> (SH > 0 ? SH : 0);
    else        delta = prod <<< (SH > 0 ? 0 : -SH);
    next  = $signed(PROD_W'(m1)) + delta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_MB; k++) mem[k] <= '0;
      sat_lo <= 1'b0;
      sat_hi <= 1'b0;
    end else if (upd) begin
      sat_lo <= (next < 0);
      sat_hi <= (next > ONE);
      if (next < 0)        mem[mb_idx] <= '0;
      else if (next > ONE) mem[mb_idx] <= ONE[M1_FRAC:0];
      else                 mem[mb_idx] <= next[M1_FRAC:0];
    end
  end
endmodule
