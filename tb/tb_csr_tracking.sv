// tb_csr_tracking: the adaptive threshold control on moving synthetic
// video, at the real block size N = 16 (so mask counts are the 64..256
// range of the power modes) with a small search range p = 2 to keep the
// run short. Three macro-block positions per frame. Three copies of the
// design run in lockstep on the same streams, one per gradient filter
// (high-pass, Sobel, morphological); since the edge-extraction timing
// does not depend on the filter, their handshakes must stay identical,
// which is checked every cycle.
//
// The video is a textured pattern of flat patches with sharp borders and
// mild noise, moving by (1, 1/2) pixels per frame. Every block of every
// copy is checked against the reference model (threshold parameter in
// use, mask count, motion vector, minimum CSSAD).
//
// Run A: for each target count 96, 128, 160, 192, 224 (with regular
// patterns 8-to-2 .. 8-to-6 below them) the design is reset (m1 = 0,
// full rate) and run for 40 frames. Per filter, the average mask count
// over the 40 frames (settling from the full rate included) must be
// within 17% of the target, and the average over the last 30 frames
// within 8%. On this video the high-pass and Sobel copies settle within
// about 3.5%; the morphological gradient spreads its values more evenly,
// so m1 has further to travel from 0 and the low targets settle slower
// (about 7% at 96).
// Run B: starting at 256, the target drops by 48 every 40 frames (256,
// 208, 160, 112). After each switch the average count over frames 10..39
// must be within 3% of the new target, per filter. (A target of 64 would
// equal the 8-to-2 pattern alone, which any edge pixel exceeds.)
module tb_csr_tracking;
  import me_pkg::*;
  import me_ref_pkg::*;
  localparam int N = 16, P = 2, NMB = 3, F = 12, ONE = 1 << F, KP = 77;
  localparam int NN = N * N, L = N + 2 * P - 1;
  localparam int FR = 40, NF = 3;

  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] mb_idx = '0;
  logic [3:0] sm_m = 4'd8;
  logic [8:0] trg_cnt = '0;
  logic cmb_valid = 0, ref_valid = 0;
  pix_t cmb_pix = '0, ref_pix = '0;
  logic              cmb_ready [NF];
  logic              ref_ready [NF];
  logic              done      [NF];
  logic              busy      [NF];
  logic              edge_stall[NF];
  logic              m1_sat_lo [NF];
  logic              m1_sat_hi [NF];
  phase_e            phase     [NF];
  logic signed [2:0] mv_u      [NF];
  logic signed [2:0] mv_v      [NF];
  logic [15:0]       min_cssad [NF];
  logic [8:0]        csm_cnt   [NF];
  logic [F:0]        m1_used   [NF];

  int checks = 0, failures = 0, mismatch = 0;
  int m1_model [NF][NMB];
  string fname [NF] = '{"high-pass", "Sobel", "morphological"};

  always #5 clk = ~clk;

  for (genvar g = 0; g < NF; g++) begin : g_dut
    power_aware_me #(.N(N), .P(P), .NUM_MB(NMB), .FILTER(filter_e'(g)), .M1_FRAC(F), .KP_Q(KP)) dut (
      .clk, .rst_n, .start, .mb_idx, .sm_m, .trg_cnt,
      .cmb_valid, .cmb_ready(cmb_ready[g]), .cmb_pix, .ref_valid, .ref_ready(ref_ready[g]), .ref_pix,
      .done(done[g]), .mv_u(mv_u[g]), .mv_v(mv_v[g]), .min_cssad(min_cssad[g]), .csm_cnt(csm_cnt[g]),
      .m1_used(m1_used[g]), .busy(busy[g]), .phase(phase[g]), .edge_stall(edge_stall[g]),
      .m1_sat_lo(m1_sat_lo[g]), .m1_sat_hi(m1_sat_hi[g]));
  end

  // The copies differ only in the filter, so they must run in lockstep.
  always @(posedge clk)
    if (rst_n)
      for (int g = 1; g < NF; g++)
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

  task automatic run_block(int mb, int t, int m, int trg, output int cnt_out [NF]);
    int sa[], cmb[], csm[], cnt [NF], bu [NF], bv [NF], bs [NF], x0, y0;
    sa = new[L * L];
    cmb = new[NN];
    x0 = mb * N + P; y0 = P;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) cmb[y * N + x] = frame_pix(t, x0 + x, y0 + y);
    for (int xx = 0; xx < L; xx++)
      for (int yy = 0; yy < L; yy++) sa[xx * L + yy] = frame_pix(t - 1, x0 - P + xx, y0 - P + yy);
    for (int g = 0; g < NF; g++) begin
      cnt[g] = csm_ref(g, cmb, N, m1_model[g][mb], ONE, m, csm);
      search_ref(cmb, sa, csm, N, P, bu[g], bv[g], bs[g]);
    end
    @(negedge clk);
    mb_idx = 2'(mb); sm_m = 4'(m); trg_cnt = 9'(trg);
    start = 1;
    @(negedge clk);
    start = 0;
    feed(cmb, sa);
    while (!done[0]) @(negedge clk);
    for (int g = 0; g < NF; g++) begin
      checks += 4;
      if (int'(m1_used[g]) != m1_model[g][mb]) begin failures++; $display("FAIL %s t%0d mb%0d m1 %0d exp %0d", fname[g], t, mb, m1_used[g], m1_model[g][mb]); end
      if (int'(csm_cnt[g]) != cnt[g]) begin failures++; $display("FAIL %s t%0d mb%0d cnt %0d exp %0d", fname[g], t, mb, csm_cnt[g], cnt[g]); end
      if (int'(mv_u[g]) != bu[g] || int'(mv_v[g]) != bv[g]) begin failures++; $display("FAIL %s t%0d mb%0d mv", fname[g], t, mb); end
      if (int'(min_cssad[g]) != bs[g]) begin failures++; $display("FAIL %s t%0d mb%0d cssad", fname[g], t, mb); end
      m1_model[g][mb] = m1_update(m1_model[g][mb], ONE, KP, cnt[g], trg, NN);
    end
    cnt_out = cnt;
  endtask

  task automatic do_reset();
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    foreach (m1_model[g, k]) m1_model[g][k] = 0;
  endtask

  function automatic int pattern_for(int trg);
    int m;
    if (trg >= NN) return 8;
    m = trg / 32 - 1;
    return (m < 2) ? 2 : m;
  endfunction

  function automatic real rel_err(real avg, int trg);
    real e;
    e = (avg - trg) / trg;
    return (e < 0) ? -e : e;
  endfunction

  initial begin
    int cnt [NF], trg, m, t;
    real sum_all [NF], sum_late [NF], avg_all, avg_late, err_all, err_late;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Run A: stationary targets
    $display("filter          target  avg CSR (40 fr)  error   avg CSR (fr 10-39)  error");
    for (int ti = 0; ti < 5; ti++) begin
      trg = 96 + 32 * ti;
      m = pattern_for(trg);
      do_reset();
      foreach (sum_all[g]) begin sum_all[g] = 0; sum_late[g] = 0; end
      for (int f = 0; f < FR; f++)
        for (int mb = 0; mb < NMB; mb++) begin
          run_block(mb, f + 1, m, trg, cnt);
          for (int g = 0; g < NF; g++) begin
            sum_all[g] += cnt[g];
            if (f >= 10) sum_late[g] += cnt[g];
          end
        end
      for (int g = 0; g < NF; g++) begin
        avg_all  = sum_all[g] / (FR * NMB);
        avg_late = sum_late[g] / ((FR - 10) * NMB);
        err_all  = rel_err(avg_all, trg);
        err_late = rel_err(avg_late, trg);
        $display("%-14s  %6d  %15.3f  %5.2f%%  %18.3f  %5.2f%%", fname[g], trg, avg_all, 100.0 * err_all,
                 avg_late, 100.0 * err_late);
        checks += 2;
        if (err_all > 0.17)  begin failures++; $display("FAIL %s target %0d 40-frame CSR error", fname[g], trg); end
        if (err_late > 0.08) begin failures++; $display("FAIL %s target %0d settled CSR error", fname[g], trg); end
      end
    end
    // Run B: target lowered by 48 every 40 frames
    do_reset();
    t = 1;
    for (int st = 0; st < 4; st++) begin
      trg = 256 - 48 * st;
      m = pattern_for(trg);
      foreach (sum_late[g]) sum_late[g] = 0;
      for (int f = 0; f < FR; f++) begin
        for (int mb = 0; mb < NMB; mb++) begin
          run_block(mb, t, m, trg, cnt);
          if (f >= 10) for (int g = 0; g < NF; g++) sum_late[g] += cnt[g];
        end
        t++;
      end
      for (int g = 0; g < NF; g++) begin
        avg_late = sum_late[g] / ((FR - 10) * NMB);
        err_late = rel_err(avg_late, trg);
        $display("%-14s switch to %0d (8-to-%0d): avg CSR frames 10-39 = %0.3f (%0.2f%%)", fname[g], trg, m,
                 avg_late, 100.0 * err_late);
        checks++;
        if (err_late > 0.03) begin failures++; $display("FAIL %s switching target %0d", fname[g], trg); end
      end
    end
    checks++;
    if (mismatch != 0) begin failures++; $display("FAIL copies left lockstep in %0d cycles", mismatch); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
