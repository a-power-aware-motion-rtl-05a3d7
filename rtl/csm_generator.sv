// csm_generator: edge determination and content-based subsample mask.
//
// Gradients of one macro-block arrive one per cycle in raster order
// (index k = y*N + x). The generator stores them and tracks their
// maximum and minimum. When the last one is in, it forms the floating
// threshold
//     thr = m1*max + (1 - m1)*min,      0 <= m1 <= 1,
// and then scans the stored gradients, LANES per cycle: a pixel is an
// edge pixel when G >= thr, and its mask bit is the OR of that edge bit
// and the regular subsample mask bit SM_8:m(x mod 4, y mod 4). The
// number of ones (csm_cnt) is counted during the scan.
//
// m1 is an unsigned fixed-point number with M1_FRAC fraction bits
// (1.0 = 2**M1_FRAC); the comparison is done on G * 2**M1_FRAC against
// the unrounded threshold, so no precision is lost. The threshold rule,
// the OR-merge and the count follow the published edge determination.
// Keeping the gradients in a buffer rather than recomputing them, and
// scanning two of them per cycle (LANES = 2, one extra comparator), are
// this design's choices: the published timing hides all of edge
// extraction behind the initial loads for search ranges p > 8 at
// N = 16, and a one-lane scan would be 4 cycles too slow at p = 9.
//
// Interface: clear (start of a macro-block), g_valid/g_data (gradient
// stream), m1 and sm_m (must be stable from the last gradient until
// done), csm (bit y*N+x), csm_cnt, done (level, set until the next clear).
// Timing: done rises N*N/LANES + 1 clock edges after the edge that takes
// the last gradient.
module csm_generator
  import me_pkg::*;
#(
  parameter int N       = 16,
  parameter int M1_FRAC = 12,
  parameter int LANES   = 2,
  localparam int NN     = N * N,
  localparam int IDX_W  = $clog2(NN),
  localparam int CNT_W  = $clog2(NN) + 1,
  localparam int LOG2N  = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             g_valid,
  input  grad_t            g_data,
  input  logic [M1_FRAC:0] m1,
  input  logic [3:0]       sm_m,
  output logic [NN-1:0]    csm,
  output logic [CNT_W-1:0] csm_cnt,
  output logic             done
);
  localparam int THR_W = GRAD_W + M1_FRAC + 2;
  localparam logic [M1_FRAC:0] ONE = (M1_FRAC+1)'(1) << M1_FRAC;

  typedef enum logic [1:0] {S_COLLECT, S_THRESH, S_SCAN, S_DONE} state_e;
  state_e state;

  grad_t              gbuf [NN];
  grad_t              gmax, gmin;
  logic [IDX_W-1:0]   idx;
  logic [THR_W-1:0]   thr_num;
  logic [LANES-1:0]   csm_bit;
  logic [CNT_W-1:0]   lane_ones;

  // One comparator and one regular-pattern lookup per lane; lane l
  // handles pixel idx + l (idx is a multiple of LANES during the scan).
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [IDX_W-1:0] k;
    logic [THR_W-1:0] g_scaled;
    logic             edge_bit, sm_bit;
    always_comb begin
      k        = idx + IDX_W'(l);
      g_scaled = THR_W'(gbuf[k]) << M1_FRAC;
      edge_bit = (g_scaled >= thr_num);
      csm_bit[l] = edge_bit | sm_bit;
    end
    subsample_mask u_sm (.m(sm_m), .i(k[1:0]), .j(k[LOG2N+1:LOG2N]), .sm(sm_bit));
  end

  always_comb begin
    lane_ones = '0;
    for (int l = 0; l < LANES; l++) lane_ones += CNT_W'(csm_bit[l]);
  end

  always_ff @(posedge clk) begin
    if (state == S_COLLECT && g_valid) gbuf[idx] <= g_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_COLLECT;
      idx     <= '0;
      gmax    <= '0;
      gmin    <= '1;
      thr_num <= '0;
      csm     <= '0;
      csm_cnt <= '0;
      done    <= 1'b0;
    end else if (clear) begin
      state   <= S_COLLECT;
      idx     <= '0;
      gmax    <= '0;
      gmin    <= '1;
      csm_cnt <= '0;
      done    <= 1'b0;
    end else begin
      unique case (state)
        S_COLLECT: if (g_valid) begin
          if (g_data > gmax) gmax <= g_data;
          if (g_data < gmin) gmin <= g_data;
          idx <= idx + 1'b1;
          if (idx == IDX_W'(NN - 1)) state <= S_THRESH;
        end
        S_THRESH: begin
          thr_num <= THR_W'(m1) * THR_W'(gmax) + THR_W'(ONE - m1) * THR_W'(gmin);
          idx     <= '0;
          state   <= S_SCAN;
        end
        S_SCAN: begin
          for (int l = 0; l < LANES; l++) csm[idx + IDX_W'(l)] <= csm_bit[l];
          csm_cnt <= csm_cnt + lane_ones;
          idx     <= idx + IDX_W'(LANES);
          if (idx == IDX_W'(NN - LANES)) begin
            state <= S_DONE;
            done  <= 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  initial begin
    assert (LANES >= 1 && LANES <= N && (LANES & (LANES - 1)) == 0)
      else $error("LANES must be a power of 2 no larger than N");
  end
endmodule
