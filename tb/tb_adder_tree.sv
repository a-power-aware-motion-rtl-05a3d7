// tb_adder_tree: N = 16 random and all-maximum column sums; the registered
// sum must equal the plain integer sum one cycle later, with out_valid
// following in_valid.
module tb_adder_tree;
  localparam int N = 16, W = 12;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [W-1:0] in_data [N];
  logic [W+3:0] sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adder_tree #(.N(N), .IN_W(W)) dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .sum);

  initial begin
    int exp;
    foreach (in_data[k]) in_data[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      exp = 0;
      foreach (in_data[k]) begin
        in_data[k] = (t == 0) ? '1 : W'($urandom_range(0, (1 << W) - 1));
        exp += int'(in_data[k]);
      end
      in_valid = 1'($urandom_range(0, 4) != 0);
      @(negedge clk);
      checks++;
      if (out_valid != in_valid) begin failures++; $display("FAIL valid"); end
      if (in_valid) begin
        checks++;
        if (int'(sum) != exp) begin failures++; $display("FAIL sum %0d exp %0d", sum, exp); end
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
