// tb_pe_array: N = 4 array. Loads a random block, then shifts random
// rows in from the bottom with random masks; after each shift the
// captured column sums must equal sum_y CSM(x,y)*|R(x,y) - S(x,y)| of a
// software copy of the array, and top_out must show the top row.
module tb_pe_array;
  import me_pkg::*;
  localparam int N = 4, NN = N * N;
  logic clk = 0, rst_n = 0;
  logic cmb_we = 0, shift = 0, acc_en = 0;
  logic [$clog2(NN)-1:0] cmb_idx = '0;
  pix_t cmb_pix = '0;
  logic [NN-1:0] csm = '0;
  pix_t bot_in [N], top_out [N];
  logic [9:0] col_sum [N];
  int r [N][N], s [N][N];   // [x][y]
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe_array #(.N(N)) dut (.clk, .rst_n, .cmb_we, .cmb_idx, .cmb_pix, .csm, .shift, .bot_in, .top_out,
    .acc_en, .col_sum);

  initial begin
    foreach (bot_in[c]) bot_in[c] = '0;
    foreach (s[x, y]) s[x][y] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NN; k++) begin
      cmb_we = 1; cmb_idx = 4'(k); cmb_pix = pix_t'($urandom_range(0, 255));
      r[k % N][k / N] = int'(cmb_pix);
      @(negedge clk);
    end
    cmb_we = 0;
    repeat (200) begin
      shift = 1;
      foreach (bot_in[x]) bot_in[x] = pix_t'($urandom_range(0, 255));
      for (int x = 0; x < N; x++) begin
        for (int y = 0; y < N - 1; y++) s[x][y] = s[x][y+1];
        s[x][N-1] = int'(bot_in[x]);
      end
      @(negedge clk);
      shift = 0;
      csm = NN'({$urandom, $urandom});
      acc_en = 1;
      @(negedge clk);
      acc_en = 0;
      for (int x = 0; x < N; x++) begin
        int e;
        e = 0;
        for (int y = 0; y < N; y++)
          if (csm[y * N + x]) e += (r[x][y] > s[x][y]) ? r[x][y] - s[x][y] : s[x][y] - r[x][y];
        checks += 2;
        if (int'(col_sum[x]) != e) begin failures++; $display("FAIL col %0d sum %0d exp %0d", x, col_sum[x], e); end
        if (int'(top_out[x]) != s[x][0]) begin failures++; $display("FAIL top %0d", x); end
      end
    end
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
