// tb_me_controller: N = 4, p = 2 (L = 7). Runs three blocks: gap-free
// streams with the EXU done early (checks the L*L + 2p + 2 cycle count),
// a late EXU (the fill must stop one pixel short and edge_stall must be
// seen), and random gaps on both streams. Every block must deliver
// exactly 4p^2 candidates to the selector, in the order u outer, v inner,
// and accept exactly N*N and L*L pixels.
module tb_me_controller;
  import me_pkg::*;
  localparam int N = 4, P = 2, L = N + 2 * P - 1, NN = N * N;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, cmb_valid = 0, cmb_ready, cmb_we, ref_valid = 0, ref_ready, ref_take;
  logic exu_done = 0, edge_stall, shift, acc_en, pat_valid, mvs_clear, mvs_valid, done;
  logic [3:0] cmb_idx;
  logic signed [2:0] mvs_u, mvs_v;
  phase_e phase;
  int checks = 0, failures = 0;
  int ncand, ncmb, nref, nstall, cyc;
  int eu, ev;

  always #5 clk = ~clk;

  me_controller #(.N(N), .P(P)) dut (.clk, .rst_n, .start, .busy, .phase, .cmb_valid, .cmb_ready,
    .cmb_we, .cmb_idx, .ref_valid, .ref_ready, .ref_take, .exu_done, .edge_stall, .shift, .acc_en,
    .pat_valid, .mvs_clear, .mvs_valid, .mvs_u, .mvs_v, .done);

  always @(posedge clk) if (busy) begin
    cyc++;
    if (cmb_we) ncmb++;
    if (ref_take) nref++;
    if (edge_stall) nstall++;
    if (mvs_valid) begin
      checks++;
      if (int'(mvs_u) != eu || int'(mvs_v) != ev) begin
        failures++; $display("FAIL cand (%0d,%0d) exp (%0d,%0d)", mvs_u, mvs_v, eu, ev);
      end
      ncand++;
      ev++;
      if (ev == P) begin ev = -P; eu++; end
    end
  end

  task automatic run(int exu_delay, bit gaps, bit check_cycles);
    int t;
    ncand = 0; ncmb = 0; nref = 0; nstall = 0; cyc = 0; eu = -P; ev = -P;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t = 0;
    while (!done) begin
      cmb_valid = gaps ? 1'($urandom_range(0, 1)) : 1'b1;
      ref_valid = gaps ? 1'($urandom_range(0, 1)) : 1'b1;
      exu_done  = (t >= exu_delay);
      @(negedge clk);
      t++;
    end
    cmb_valid = 0; ref_valid = 0;
    checks += 3;
    if (ncand != 4 * P * P) begin failures++; $display("FAIL %0d candidates", ncand); end
    if (ncmb != NN) begin failures++; $display("FAIL %0d cmb pixels", ncmb); end
    if (nref != L * L) begin failures++; $display("FAIL %0d ref pixels", nref); end
    if (check_cycles) begin
      checks++;
      if (t != L * L + 2 * P + 2) begin failures++; $display("FAIL cycles %0d exp %0d", t, L * L + 2 * P + 2); end
    end
    if (!gaps && exu_delay > N * L) begin
      checks++;
      if (nstall != exu_delay - (N * L - 1)) begin failures++; $display("FAIL stall cycles %0d delay %0d gaps %0d", nstall, exu_delay, gaps); end
    end
    @(negedge clk) exu_done = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 0, 1);
    run(N * L + 9, 0, 0);
    run(40, 1, 0);
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
