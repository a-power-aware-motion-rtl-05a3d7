// me_controller: phase sequencing for one macro-block.
//
// After start the current macro-block (N*N pixels, raster order) and the
// search area (L*L pixels, L = N + 2p - 1, column-major: the L pixels of
// search column 0 top to bottom, then column 1, ...) are accepted in
// parallel, one pixel of each per cycle. The first N*L reference pixels
// fill the PE array and the SRA (initial RMB phase) while the edge
// extraction unit works on the current block (initial CMB phase,
// filtering and edge determination). The last fill pixel is held back
// until the EXU reports its mask (edge_stall is high while it waits), so
// every candidate is evaluated with the final mask. For p large enough
// (p >= 6 at N = 16 with the EXU timing of this design) the fill hides the
// whole edge extraction and no stall occurs.
//
// Each shift moves every chain up by one. After the fill, the chains hold
// search columns c..c+N-1 and the PE array sees rows s..s+N-1 of them,
// i.e. candidate u = c - p (horizontal), v = s - p (vertical). s counts
// 0..L-1 per column; only s < 2p are candidates, the other N-1 states of
// each column are passed over. After the last input pixel 2p-1 more
// shifts (with no input) bring the last column's candidates into view.
//
// The candidate flag and (u,v) then follow the data: acc_en captures the
// column sums, pat_valid marks the adder-tree input, mvs_valid/mvs_u/
// mvs_v the selector input. done pulses once the selector holds the
// result. Timing without stalls or input gaps: done is high
// L*L + 2p + 2 cycles after the start edge; 4p^2 candidates per block.
module me_controller
  import me_pkg::*;
#(
  parameter int N = 16,
  parameter int P = 32,
  localparam int NN    = N * N,
  localparam int IDX_W = $clog2(NN),
  localparam int L     = N + 2 * P - 1,
  localparam int FILL  = N * L,
  localparam int TOTAL = L * L,
  localparam int TAIL  = 2 * P - 1,
  localparam int SH_W  = $clog2(TOTAL + TAIL + 1),
  localparam int MV_W  = $clog2(P) + 1,
  localparam int S_W   = $clog2(L + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   busy,
  output phase_e                 phase,
  // current macro-block stream
  input  logic                   cmb_valid,
  output logic                   cmb_ready,
  output logic                   cmb_we,
  output logic [IDX_W-1:0]       cmb_idx,
  // search-area stream
  input  logic                   ref_valid,
  output logic                   ref_ready,
  output logic                   ref_take,
  input  logic                   exu_done,
  output logic                   edge_stall,
  // datapath control
  output logic                   shift,
  output logic                   acc_en,
  output logic                   pat_valid,
  output logic                   mvs_clear,
  output logic                   mvs_valid,
  output logic signed [MV_W-1:0] mvs_u,
  output logic signed [MV_W-1:0] mvs_v,
  output logic                   done
);
  logic [IDX_W:0]   cmb_cnt;
  logic [SH_W-1:0]  sh_cnt;     // shifts done (input pixels + tail shifts)
  logic [S_W-1:0]   s_cnt;      // vertical position within a column
  logic [MV_W:0]    c_cnt;      // search column of PE column 0
  logic             tail_shift;
  logic             cand;
  logic [S_W-1:0]   s_next;
  logic [MV_W:0]    c_next;
  logic [1:0]       flush_cnt;
  logic             ev0, ev1, ev2;
  logic signed [MV_W-1:0] u0, v0, u1, v1;

  always_comb begin
    busy       = (phase != PH_IDLE);
    cmb_ready  = busy && (cmb_cnt < (IDX_W+1)'(NN));
    cmb_we     = cmb_valid && cmb_ready;
    cmb_idx    = cmb_cnt[IDX_W-1:0];
    ref_ready  = busy && (phase != PH_FLUSH) && (sh_cnt < SH_W'(TOTAL)) &&
                 ((sh_cnt < SH_W'(FILL - 1)) || exu_done);
    edge_stall = busy && (sh_cnt == SH_W'(FILL - 1)) && !exu_done;
    ref_take   = ref_valid && ref_ready;
    tail_shift = (phase == PH_SAD) && (sh_cnt >= SH_W'(TOTAL)) && (sh_cnt < SH_W'(TOTAL + TAIL));
    shift      = ref_take || tail_shift;
    // candidate state reached by this shift
    if (sh_cnt == SH_W'(FILL - 1)) begin
      s_next = '0;
      c_next = '0;
    end else if (s_cnt == S_W'(L - 1)) begin
      s_next = '0;
      c_next = c_cnt + 1'b1;
    end else begin
      s_next = s_cnt + 1'b1;
      c_next = c_cnt;
    end
    cand      = shift && (sh_cnt >= SH_W'(FILL - 1)) && (s_next < S_W'(2 * P));
    acc_en    = ev0;
    pat_valid = ev1;
    mvs_valid = ev2;
    mvs_clear = start && !busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_IDLE;
      cmb_cnt   <= '0;
      sh_cnt    <= '0;
      s_cnt     <= '0;
      c_cnt     <= '0;
      flush_cnt <= '0;
      done      <= 1'b0;
      ev0 <= 1'b0; ev1 <= 1'b0; ev2 <= 1'b0;
      u0 <= '0; v0 <= '0; u1 <= '0; v1 <= '0; mvs_u <= '0; mvs_v <= '0;
    end else begin
      done <= 1'b0;
      // candidate pipeline: chain state -> column sums -> adder tree -> selector
      ev0 <= cand;
      u0  <= MV_W'($signed({1'b0, c_next}) - P);
      v0  <= MV_W'($signed({1'b0, s_next}) - P);
      ev1 <= ev0; u1 <= u0; v1 <= v0;
      ev2 <= ev1; mvs_u <= u1; mvs_v <= v1;

      if (cmb_we) cmb_cnt <= cmb_cnt + 1'b1;
      if (shift) begin
        sh_cnt <= sh_cnt + 1'b1;
        if (sh_cnt >= SH_W'(FILL - 1)) begin
          s_cnt <= s_next;
          c_cnt <= c_next;
        end
      end

      unique case (phase)
        PH_IDLE: if (start) begin
          phase   <= PH_INIT;
          cmb_cnt <= '0;
          sh_cnt  <= '0;
          s_cnt   <= '0;
          c_cnt   <= '0;
        end
        PH_INIT: if (shift && sh_cnt == SH_W'(FILL - 1)) phase <= PH_SAD;
        PH_SAD: if (shift && sh_cnt == SH_W'(TOTAL + TAIL - 1)) begin
          phase     <= PH_FLUSH;
          flush_cnt <= '0;
        end
        PH_FLUSH: begin
          flush_cnt <= flush_cnt + 1'b1;
          if (flush_cnt == 2'd2) begin
            phase <= PH_IDLE;
            done  <= 1'b1;
          end
        end
      endcase
    end
  end

  // Handshake rules.
  assert property (@(posedge clk) disable iff (!rst_n) ref_take |-> ref_valid && ref_ready);
  assert property (@(posedge clk) disable iff (!rst_n) (shift && sh_cnt >= SH_W'(FILL - 1)) |-> exu_done);
  assert property (@(posedge clk) disable iff (!rst_n) done |-> phase == PH_IDLE);
endmodule
