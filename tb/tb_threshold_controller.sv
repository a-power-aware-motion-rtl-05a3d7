// tb_threshold_controller: per-macro-block threshold parameters under a
// random sequence of updates (N = 16, Kp = 77/256), compared with the
// update rule evaluated in real arithmetic; checks reset to 0, clamping
// at 0 and 1 with the saturation flags, and that entries are independent.
module tb_threshold_controller;
  import me_ref_pkg::*;
  localparam int N = 16, NN = N * N, F = 12, ONE = 1 << F, MBS = 5, KP = 77;
  logic clk = 0, rst_n = 0;
  logic [2:0] mb_idx = '0;
  logic [F:0] m1;
  logic upd = 0;
  logic [8:0] csm_cnt = '0, trg_cnt = '0;
  logic sat_lo, sat_hi;
  int model [MBS];
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;

  always #5 clk = ~clk;

  threshold_controller #(.N(N), .NUM_MB(MBS), .M1_FRAC(F), .KP_Q(KP)) dut (
    .clk, .rst_n, .mb_idx, .m1, .upd, .csm_cnt, .trg_cnt, .sat_lo, .sat_hi);

  task automatic do_update(int mb, int cnt, int trg);
    int nx;
    bit lo, hi;
    real d;
    d  = (real'(KP) / 256.0) * real'(cnt - trg) / real'(NN) * real'(ONE);
    lo = (model[mb] + int'($floor(d + 0.5))) < 0;
    hi = (model[mb] + int'($floor(d + 0.5))) > ONE;
    nx = m1_update(model[mb], ONE, KP, cnt, trg, NN);
    @(negedge clk);
    mb_idx = 3'(mb); csm_cnt = 9'(cnt); trg_cnt = 9'(trg); upd = 1;
    @(negedge clk);
    upd = 0;
    model[mb] = nx;
    checks++;
    if (int'(m1) != nx) begin failures++; $display("FAIL mb %0d m1=%0d exp %0d", mb, m1, nx); end
    checks++;
    if (sat_lo != lo || sat_hi != hi) begin failures++; $display("FAIL sat flags"); end
    n_lo += int'(lo); n_hi += int'(hi);
  endtask

  initial begin
    foreach (model[k]) model[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < MBS; k++) begin
      mb_idx = 3'(k); #1; checks++;
      if (m1 != '0) begin failures++; $display("FAIL reset mb %0d", k); end
    end
    do_update(0, 64, 128);          // below zero: clamp
    do_update(1, 256, 64);          // large step up
    repeat (6) do_update(1, 256, 0);  // reaches 1.0 and clamps
    do_update(2, 200, 100);
    do_update(2, 90, 100);
    repeat (300) do_update(int'($urandom_range(0, MBS - 1)), int'($urandom_range(0, 256)), int'($urandom_range(64, 256)));
    for (int k = 0; k < MBS; k++) begin
      mb_idx = 3'(k); #1; checks++;
      if (int'(m1) != model[k]) begin failures++; $display("FAIL final mb %0d", k); end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin failures++; $display("FAIL clamps not exercised"); end
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
