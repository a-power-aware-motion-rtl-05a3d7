// tb_power_aware_me_full: the motion estimator at its default size
// (N = 16, p = 32, 396 macro-block positions, high-pass filter,
// Kp = 77/256) through two complete macro-block operations on the same
// block position: a 2-to-1 one (8-to-4 pattern, target 128) and, after a
// power mode switch, an 8-to-3 one (8-to-2 pattern, target 96) using the
// adapted threshold parameter. Each result (threshold parameter, mask count, motion vector,
// minimum CSSAD, next threshold parameter) is compared with the reference
// model, the first run's cycle count must be L*L + 2p + 2 = 6304, and at
// this p the reference fill must hide edge extraction completely (no
// stall). The second run has gaps in both input streams.
module tb_power_aware_me_full;
  import me_pkg::*;
  import me_ref_pkg::*;
  localparam int N = 16, P = 32, NMB = 396, F = 12, ONE = 1 << F, KP = 77;
  localparam int NN = N * N, L = N + 2 * P - 1;
  localparam int FRAMES = 2;

  logic clk = 0, rst_n = 0, start = 0;
  logic [8:0] mb_idx = '0;
  logic [3:0] sm_m = 4'd8;
  logic [8:0] trg_cnt = '0;
  logic cmb_valid = 0, cmb_ready, ref_valid = 0, ref_ready;
  pix_t cmb_pix = '0, ref_pix = '0;
  logic done, busy, edge_stall, m1_sat_lo, m1_sat_hi;
  phase_e phase;
  logic signed [5:0] mv_u, mv_v;
  logic [15:0] min_cssad;
  logic [8:0] csm_cnt;
  logic [F:0] m1_used;

  int checks = 0, failures = 0;
  int m1_model [NMB];
  int stall_cycles, n_stall_blocks = 0, n_masked_blocks = 0, n_sat_lo = 0, n_sat_hi = 0;
  int n_mode_switch = 0, n_gap_blocks = 0, n_nonzero_mv = 0, n_sad_phase = 0;
  bit gaps;

  always #5 clk = ~clk;

  power_aware_me dut (
    .clk, .rst_n, .start, .mb_idx, .sm_m, .trg_cnt,
    .cmb_valid, .cmb_ready, .cmb_pix, .ref_valid, .ref_ready, .ref_pix,
    .done, .mv_u, .mv_v, .min_cssad, .csm_cnt, .m1_used, .busy, .phase, .edge_stall,
    .m1_sat_lo, .m1_sat_hi);

  always @(posedge clk) begin
    if (edge_stall) stall_cycles++;
    if (phase == PH_SAD) n_sad_phase++;
  end

  task automatic feed_cmb(const ref int cmb[]);
    for (int k = 0; k < NN; k++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin cmb_valid = 0; @(negedge clk); end
      cmb_valid = 1; cmb_pix = pix_t'(cmb[k]);
      do @(posedge clk); while (!cmb_ready);
      @(negedge clk);
    end
    cmb_valid = 0;
  endtask

  task automatic feed_ref(const ref int sa[]);
    for (int k = 0; k < L * L; k++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin ref_valid = 0; @(negedge clk); end
      ref_valid = 1; ref_pix = pix_t'(sa[k]);
      do @(posedge clk); while (!ref_ready);
      @(negedge clk);
    end
    ref_valid = 0;
  endtask

  task automatic run_block(int mb, int frame, int m, int trg, bit flat);
    int sa[], cmb[], csm[], cnt, bu, bv, bs, u0, v0, cyc, nm1;
    sa = new[L * L];
    cmb = new[NN];
    for (int x = 0; x < L; x++)
      for (int y = 0; y < L; y++)
        sa[x * L + y] = (x * 9 + y * 5 + int'($urandom_range(0, 120)) + 17 * mb + 3 * frame) % 256;
    u0 = int'($urandom_range(0, 2 * P - 1)) - P;
    v0 = int'($urandom_range(0, 2 * P - 1)) - P;
    if (flat) begin
      // nearly flat block with one bright spot: few edge pixels
      foreach (sa[k]) sa[k] = 100 + int'($urandom_range(0, 2));
      sa[(u0 + P + 3) * L + (v0 + P + 4)] = 250;
    end
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        int pv;
        pv = sa[(x + u0 + P) * L + (y + v0 + P)] + int'($urandom_range(0, 6)) - 3;
        cmb[y * N + x] = (pv < 0) ? 0 : (pv > 255) ? 255 : pv;
      end
    cnt = csm_ref(0, cmb, N, m1_model[mb], ONE, m, csm);
    search_ref(cmb, sa, csm, N, P, bu, bv, bs);

    @(negedge clk);
    mb_idx = 9'(mb); sm_m = 4'(m); trg_cnt = 9'(trg);
    start = 1;
    @(negedge clk);
    start = 0;
    stall_cycles = 0;
    cyc = 0;
    fork
      feed_cmb(cmb);
      feed_ref(sa);
      begin
        while (!done) begin @(negedge clk); cyc++; end
      end
    join
    checks += 5;
    if (int'(m1_used) != m1_model[mb]) begin failures++; $display("FAIL f%0d mb%0d m1_used %0d exp %0d", frame, mb, m1_used, m1_model[mb]); end
    if (int'(csm_cnt) != cnt) begin failures++; $display("FAIL f%0d mb%0d csm_cnt %0d exp %0d", frame, mb, csm_cnt, cnt); end
    if (int'(mv_u) != bu || int'(mv_v) != bv) begin failures++; $display("FAIL f%0d mb%0d mv (%0d,%0d) exp (%0d,%0d)", frame, mb, mv_u, mv_v, bu, bv); end
    if (int'(min_cssad) != bs) begin failures++; $display("FAIL f%0d mb%0d cssad %0d exp %0d", frame, mb, min_cssad, bs); end
    if (busy) begin failures++; $display("FAIL busy after done"); end
    if (!gaps) begin
      checks++;
      if (cyc != L * L + 2 * P + 2 + stall_cycles) begin
        failures++; $display("FAIL f%0d mb%0d cycles %0d exp %0d stall %0d m1 %0d", frame, mb, cyc, L * L + 2 * P + 2 + stall_cycles, stall_cycles, m1_used);
      end
    end
    nm1 = m1_update(m1_model[mb], ONE, KP, cnt, trg, NN);
    @(negedge clk);
    mb_idx = 9'(mb); #1;
    checks++;
    if (int'(dut.m1) != nm1) begin failures++; $display("FAIL f%0d mb%0d next m1 %0d exp %0d", frame, mb, dut.m1, nm1); end
    if (m1_model[mb] + int'($floor((real'(KP) / 256.0) * real'(cnt - trg) / real'(NN) * real'(ONE) + 0.5)) < 0) begin
      n_sat_lo++;
      checks++; if (!m1_sat_lo) begin failures++; $display("FAIL sat_lo flag"); end
    end
    if (m1_model[mb] + int'($floor((real'(KP) / 256.0) * real'(cnt - trg) / real'(NN) * real'(ONE) + 0.5)) > ONE) begin
      n_sat_hi++;
      checks++; if (!m1_sat_hi) begin failures++; $display("FAIL sat_hi flag"); end
    end
    m1_model[mb] = nm1;
    if (stall_cycles > 0) n_stall_blocks++;
    if (cnt < NN) n_masked_blocks++;
    if (gaps) n_gap_blocks++;
    if (bu != 0 || bv != 0) n_nonzero_mv++;
  endtask

  initial begin
    int m, trg, pm, ptrg;
    foreach (m1_model[k]) m1_model[k] = 0;
    pm = 0; ptrg = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Two frames of macro-block (5,7) = index 7*22 + 5 = 159: the first in
    // the 2-to-1 mode (8-to-4 pattern, target 128) with m1 still at its
    // reset value 0, the second after a switch to the 8-to-3 mode (8-to-2
    // pattern, target 96) with the adapted m1.
    gaps = 0;
    run_block(159, 0, 4, 128, 0);
    n_mode_switch++;
    gaps = 1;
    run_block(159, 1, 2, 96, 0);
    $display("mechanisms: stall_blocks=%0d masked_blocks=%0d sat_lo=%0d sat_hi=%0d mode_switches=%0d gap_blocks=%0d nonzero_mv=%0d sad_cycles=%0d",
             n_stall_blocks, n_masked_blocks, n_sat_lo, n_sat_hi, n_mode_switch, n_gap_blocks, n_nonzero_mv, n_sad_phase);
    checks += 5;
    if (n_stall_blocks != 0) begin failures++; $display("FAIL fill stalled although p > 8"); end
    if (n_masked_blocks == 0) begin failures++; $display("FAIL no masked PEs"); end
    if (n_gap_blocks == 0) begin failures++; $display("FAIL no stream gaps"); end
    if (n_nonzero_mv == 0) begin failures++; $display("FAIL no motion found"); end
    if (n_sad_phase == 0) begin failures++; $display("FAIL no SAD phase"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
