// tb_csm_generator: feeds random gradient blocks (N = 8) with random
// threshold parameters and subsample modes, including m1 = 0 (every
// pixel an edge) and m1 = 1 (only the maxima), and compares the mask,
// the count and the done latency (N*N/2 + 1 edges after the last
// gradient) with the reference model.
module tb_csm_generator;
  import me_pkg::*;
  import me_ref_pkg::*;
  localparam int N = 8, NN = N * N, F = 12, ONE = 1 << F;
  logic clk = 0, rst_n = 0;
  logic clear = 0, g_valid = 0;
  grad_t g_data = '0;
  logic [F:0] m1 = '0;
  logic [3:0] sm_m = 4'd2;
  logic [NN-1:0] csm;
  logic [$clog2(NN):0] csm_cnt;
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  csm_generator #(.N(N), .M1_FRAC(F)) dut (.clk, .rst_n, .clear, .g_valid, .g_data,
    .m1, .sm_m, .csm, .csm_cnt, .done);

  task automatic run_block(int m1v, int mv, int maxg);
    int g[], ref_csm[], cnt, lat;
    g = new[NN];
    foreach (g[k]) g[k] = int'($urandom_range(0, maxg));
    m1 = (F+1)'(m1v); sm_m = 4'(mv);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int k = 0; k < NN; k++) begin
      g_valid = 1; g_data = grad_t'(g[k]);
      @(negedge clk);
      if (k < NN - 1 && $urandom_range(0, 3) == 0) begin
        g_valid = 0; @(negedge clk);
      end
    end
    g_valid = 0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    cnt = csm_from_grad(g, N, m1v, ONE, mv, ref_csm);
    checks++;
    if (lat != NN / 2 + 1) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (int'(csm_cnt) != cnt) begin failures++; $display("FAIL cnt %0d exp %0d", csm_cnt, cnt); end
    for (int k = 0; k < NN; k++) begin
      checks++;
      if (int'(csm[k]) != ref_csm[k]) begin
        failures++; $display("FAIL csm[%0d]=%0d exp %0d (m1=%0d m=%0d)", k, csm[k], ref_csm[k], m1v, mv);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_block(0, 2, 2040);
    run_block(ONE, 2, 2040);
    run_block(ONE, 8, 2040);
    run_block(ONE / 2, 4, 255);
    repeat (12) run_block(int'($urandom_range(0, ONE)), int'($urandom_range(2, 8)), int'($urandom_range(1, 2040)));
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
