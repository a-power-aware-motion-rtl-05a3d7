// tb_shift_register_array: N = 4 columns, p = 3 (depth 5). Random pixels
// are shifted in with random pauses; each column's output must be the
// pixel that entered it exactly 2p-1 shifts earlier.
module tb_shift_register_array;
  import me_pkg::*;
  localparam int N = 4, P = 3, D = 2 * P - 1;
  logic clk = 0, rst_n = 0, shift = 0;
  pix_t bot_in [N], top_out [N];
  int hist [N][$];
  int nshift = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shift_register_array #(.N(N), .P(P)) dut (.clk, .rst_n, .shift, .bot_in, .top_out);

  initial begin
    foreach (bot_in[c]) bot_in[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (400) begin
      @(negedge clk);
      shift = 1'($urandom_range(0, 3) != 0);
      foreach (bot_in[c]) bot_in[c] = pix_t'($urandom_range(0, 255));
      if (shift) begin
        foreach (bot_in[c]) hist[c].push_back(int'(bot_in[c]));
        nshift++;
      end
      @(posedge clk); #1;
      if (nshift >= D) begin
        for (int c = 0; c < N; c++) begin
          checks++;
          if (int'(top_out[c]) != hist[c][nshift - D]) begin
            failures++; $display("FAIL col %0d got %0d exp %0d", c, top_out[c], hist[c][nshift - D]);
          end
        end
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
