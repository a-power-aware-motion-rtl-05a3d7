// tb_edge_extraction_unit: three EXUs (high-pass, Sobel, morphological
// filter, N = 8) receive the same random and structured macro-blocks,
// with gaps in the pixel stream. Each mask and count is compared with
// the reference model (border replication, floating threshold, OR with
// the regular pattern), and the gap-free latency N*N + N*N/2 + N + 4 is checked.
module tb_edge_extraction_unit;
  import me_pkg::*;
  import me_ref_pkg::*;
  localparam int N = 8, NN = N * N, F = 12, ONE = 1 << F;
  logic clk = 0, rst_n = 0;
  logic start = 0, pix_valid = 0;
  pix_t pix = '0;
  logic [3:0] sm_m = 4'd2;
  logic [F:0] m1 = '0;
  logic [NN-1:0] csm [3];
  logic [$clog2(NN):0] cnt [3];
  logic done [3], busy [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  edge_extraction_unit #(.N(N), .FILTER(FILT_HPF), .M1_FRAC(F)) u0 (.clk, .rst_n, .start, .pix_valid, .pix,
    .sm_m, .m1, .csm(csm[0]), .csm_cnt(cnt[0]), .done(done[0]), .busy(busy[0]));
  edge_extraction_unit #(.N(N), .FILTER(FILT_SOBEL), .M1_FRAC(F)) u1 (.clk, .rst_n, .start, .pix_valid, .pix,
    .sm_m, .m1, .csm(csm[1]), .csm_cnt(cnt[1]), .done(done[1]), .busy(busy[1]));
  edge_extraction_unit #(.N(N), .FILTER(FILT_MORPH), .M1_FRAC(F)) u2 (.clk, .rst_n, .start, .pix_valid, .pix,
    .sm_m, .m1, .csm(csm[2]), .csm_cnt(cnt[2]), .done(done[2]), .busy(busy[2]));

  task automatic run_block(int kind, int m1v, int mv, bit gaps);
    int img[], rc[], ec, lat;
    img = new[NN];
    foreach (img[k]) begin
      case (kind)
        0: img[k] = int'($urandom_range(0, 255));
        1: img[k] = ((k % N) >= N / 2) ? 200 : 30;        // vertical edge
        default: img[k] = 100 + int'($urandom_range(0, 6)); // nearly flat
      endcase
    end
    m1 = (F+1)'(m1v); sm_m = 4'(mv);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    for (int k = 0; k < NN; k++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin pix_valid = 0; @(negedge clk); lat++; end
      pix_valid = 1; pix = pix_t'(img[k]);
      @(negedge clk); lat++;
    end
    pix_valid = 0;
    while (!(done[0] && done[1] && done[2])) begin @(negedge clk); lat++; end
    if (!gaps) begin
      checks++;
      if (lat != NN + NN / 2 + N + 4) begin failures++; $display("FAIL latency %0d exp %0d", lat, NN + NN / 2 + N + 4); end
    end
    for (int f = 0; f < 3; f++) begin
      ec = csm_ref(f, img, N, m1v, ONE, mv, rc);
      checks++;
      if (int'(cnt[f]) != ec) begin failures++; $display("FAIL filt %0d cnt %0d exp %0d", f, cnt[f], ec); end
      for (int k = 0; k < NN; k++) begin
        checks++;
        if (int'(csm[f][k]) != rc[k]) begin failures++; $display("FAIL filt %0d csm[%0d]", f, k); end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_block(0, 0, 2, 0);
    run_block(1, ONE / 2, 2, 0);
    run_block(2, ONE / 4, 3, 1);
    repeat (10) run_block(int'($urandom_range(0, 2)), int'($urandom_range(0, ONE)), int'($urandom_range(2, 8)), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
