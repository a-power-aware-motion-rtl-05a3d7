// tb_kp_step: step response of the adaptive threshold control for
// different loop gains. Five copies of the motion estimator (N = 16,
// p = 2, high-pass filter) run in lockstep on the same moving synthetic
// video, with Kp = 0.1, 0.2, 0.3, 0.4 and 0.5 (KP_Q = 26, 51, 77, 102,
// 128 in Q0.8). Each starts from reset (m1 = 0, every pixel kept, a 1:1
// rate) and is asked for 8-to-5 (target count 160 of 256, regular
// pattern 8-to-4) for 30 frames at three block positions.
//
// Every block of every copy is checked against the reference model. The
// testbench prints the frame-average mask count per frame and gain. The
// moving content itself moves the count by about +-10 from frame to
// frame, so the response is judged by three numbers per gain: the first
// frame whose average is within 5% of the target (rise time), the mean
// distance from the target over frames 1..5 (transient), and the mean
// count over frames 10..29. It checks that a higher gain never rises
// later and never has a larger transient than a lower one, that every
// gain rises within the 30 frames, and that every late mean is within 8%
// of the target.
module tb_kp_step;
  import me_pkg::*;
  import me_ref_pkg::*;
  localparam int N = 16, P = 2, NMB = 3, F = 12, ONE = 1 << F;
  localparam int NN = N * N, L = N + 2 * P - 1;
  localparam int FR = 30, NK = 5, TRG = 160, MPAT = 4;
  localparam int KPQ [NK] = '{26, 51, 77, 102, 128};

  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] mb_idx = '0;
  logic [3:0] sm_m = 4'd8;
  logic [8:0] trg_cnt = '0;
  logic cmb_valid = 0, ref_valid = 0;
  pix_t cmb_pix = '0, ref_pix = '0;
  logic              cmb_ready [NK];
  logic              ref_ready [NK];
  logic              done      [NK];
  logic              busy      [NK];
  logic              edge_stall[NK];
  logic              m1_sat_lo [NK];
  logic              m1_sat_hi [NK];
  phase_e            phase     [NK];
  logic signed [2:0] mv_u      [NK];
  logic signed [2:0] mv_v      [NK];
  logic [15:0]       min_cssad [NK];
  logic [8:0]        csm_cnt   [NK];
  logic [F:0]        m1_used   [NK];

  int checks = 0, failures = 0, mismatch = 0;
  int m1_model [NK][NMB];
  real avg [NK][FR];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NK; g++) begin : g_dut
    power_aware_me #(.N(N), .P(P), .NUM_MB(NMB), .FILTER(FILT_HPF), .M1_FRAC(F), .KP_Q(KPQ[g])) dut (
      .clk, .rst_n, .start, .mb_idx, .sm_m, .trg_cnt,
      .cmb_valid, .cmb_ready(cmb_ready[g]), .cmb_pix, .ref_valid, .ref_ready(ref_ready[g]), .ref_pix,
      .done(done[g]), .mv_u(mv_u[g]), .mv_v(mv_v[g]), .min_cssad(min_cssad[g]), .csm_cnt(csm_cnt[g]),
      .m1_used(m1_used[g]), .busy(busy[g]), .phase(phase[g]), .edge_stall(edge_stall[g]),
      .m1_sat_lo(m1_sat_lo[g]), .m1_sat_hi(m1_sat_hi[g]));
  end

  // The copies differ only in the gain, so their handshakes must agree.
  always @(posedge clk)
    if (rst_n)
      for (int g = 1; g < NK; g++)
        if (cmb_ready[g] != cmb_ready[0] || ref_ready[g] != ref_ready[0] || done[g] != done[0]
            || busy[g] != busy[0] || edge_stall[g] != edge_stall[0]) mismatch++;

  function automatic int hsh(int a, int b);
    int h;
    h = (a * 73856093) ^ (b * 19349663) ^ 32'h5bd1e995;
    h = h ^ (h >>> 13);
    h = h * 1274126177;
    return (h >>> 8) & 255;
  endfunction

  // Patchy texture: flat patches of random level, sharp borders, mild noise.
  function automatic int tex(int x, int y);
    int v;
    v = 30 + (hsh((x + (y / 3)) / 7, y / 6) * 190) / 255 + (hsh(x, y) & 7);
    return (v > 255) ? 255 : v;
  endfunction

  // Frame t at absolute (x, y): texture moving by (1, 1/2) per frame.
  function automatic int frame_pix(int t, int x, int y);
    return tex(x + 64 + t, y + 64 + t / 2);
  endfunction

  task automatic feed(const ref int cmb[], const ref int sa[]);
    fork
      for (int k = 0; k < NN; k++) begin
        cmb_valid = 1; cmb_pix = pix_t'(cmb[k]);
        do @(posedge clk); while (!cmb_ready[0]);
        @(negedge clk);
      end
      for (int k = 0; k < L * L; k++) begin
        ref_valid = 1; ref_pix = pix_t'(sa[k]);
        do @(posedge clk); while (!ref_ready[0]);
        @(negedge clk);
      end
    join
    cmb_valid = 0; ref_valid = 0;
  endtask

  task automatic run_block(int mb, int t, output int cnt_out [NK]);
    int sa[], cmb[], csm[], cnt [NK], bu [NK], bv [NK], bs [NK], x0, y0;
    sa = new[L * L];
    cmb = new[NN];
    x0 = mb * N + P; y0 = P;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) cmb[y * N + x] = frame_pix(t, x0 + x, y0 + y);
    for (int xx = 0; xx < L; xx++)
      for (int yy = 0; yy < L; yy++) sa[xx * L + yy] = frame_pix(t - 1, x0 - P + xx, y0 - P + yy);
    for (int g = 0; g < NK; g++) begin
      cnt[g] = csm_ref(0, cmb, N, m1_model[g][mb], ONE, MPAT, csm);
      search_ref(cmb, sa, csm, N, P, bu[g], bv[g], bs[g]);
    end
    @(negedge clk);
    mb_idx = 2'(mb); sm_m = 4'(MPAT); trg_cnt = 9'(TRG);
    start = 1;
    @(negedge clk);
    start = 0;
    feed(cmb, sa);
    while (!done[0]) @(negedge clk);
    for (int g = 0; g < NK; g++) begin
      checks += 4;
      if (int'(m1_used[g]) != m1_model[g][mb]) begin failures++; $display("FAIL Kp%0d t%0d mb%0d m1 %0d exp %0d", KPQ[g], t, mb, m1_used[g], m1_model[g][mb]); end
      if (int'(csm_cnt[g]) != cnt[g]) begin failures++; $display("FAIL Kp%0d t%0d mb%0d cnt %0d exp %0d", KPQ[g], t, mb, csm_cnt[g], cnt[g]); end
      if (int'(mv_u[g]) != bu[g] || int'(mv_v[g]) != bv[g]) begin failures++; $display("FAIL Kp%0d t%0d mb%0d mv", KPQ[g], t, mb); end
      if (int'(min_cssad[g]) != bs[g]) begin failures++; $display("FAIL Kp%0d t%0d mb%0d cssad", KPQ[g], t, mb); end
      m1_model[g][mb] = m1_update(m1_model[g][mb], ONE, KPQ[g], cnt[g], TRG, NN);
    end
    cnt_out = cnt;
  endtask

  initial begin
    int cnt [NK], rise [NK];
    real trans [NK], late;
    string line;
    foreach (m1_model[g, k]) m1_model[g][k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FR; f++) begin
      foreach (avg[g]) avg[g][f] = 0;
      for (int mb = 0; mb < NMB; mb++) begin
        run_block(mb, f + 1, cnt);
        for (int g = 0; g < NK; g++) avg[g][f] += real'(cnt[g]) / NMB;
      end
    end
    $display("frame  Kp=0.1   Kp=0.2   Kp=0.3   Kp=0.4   Kp=0.5   (average mask count, target %0d)", TRG);
    for (int f = 0; f < FR; f++) begin
      line = $sformatf("%5d", f);
      for (int g = 0; g < NK; g++) line = {line, $sformatf("  %7.2f", avg[g][f])};
      $display("%s", line);
    end
    for (int g = 0; g < NK; g++) begin
      rise[g] = FR;
      for (int f = FR - 1; f >= 0; f--)
        if (avg[g][f] >= 0.95 * TRG && avg[g][f] <= 1.05 * TRG) rise[g] = f;
      trans[g] = 0;
      for (int f = 1; f <= 5; f++) trans[g] += ((avg[g][f] > TRG) ? avg[g][f] - TRG : TRG - avg[g][f]) / 5.0;
      late = 0;
      for (int f = 10; f < FR; f++) late += avg[g][f] / (FR - 10);
      $display("Kp = %0d/256: within 5%% from frame %0d, transient error %0.2f, mean of frames 10-29 %0.2f (%0.2f%%)",
               KPQ[g], rise[g], trans[g], late, 100.0 * (late - TRG) / TRG);
      checks += 2;
      if (rise[g] >= FR) begin failures++; $display("FAIL Kp %0d/256 never reaches the target", KPQ[g]); end
      if (late < 0.92 * TRG || late > 1.08 * TRG) begin failures++; $display("FAIL Kp %0d/256 late mean", KPQ[g]); end
      if (g > 0) begin
        checks += 2;
        if (rise[g] > rise[g - 1]) begin failures++; $display("FAIL Kp %0d/256 rises later than %0d/256", KPQ[g], KPQ[g - 1]); end
        if (trans[g] > trans[g - 1]) begin failures++; $display("FAIL Kp %0d/256 transient above %0d/256", KPQ[g], KPQ[g - 1]); end
      end
    end
    checks++;
    if (mismatch != 0) begin failures++; $display("FAIL copies left lockstep in %0d cycles", mismatch); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
