// tb_mv_selector: random candidate sequences with many ties; the kept
// vector must be the first minimum in arrival order, and clear must
// start a new search.
module tb_mv_selector;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [15:0] sad = '0, best_sad;
  logic signed [6:0] u = '0, v = '0, best_u, best_v;
  logic best_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mv_selector #(.SAD_W(16), .MV_W(7)) dut (.clk, .rst_n, .clear, .in_valid, .sad, .u, .v,
    .best_sad, .best_u, .best_v, .best_valid);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20) begin
      int bs, bu, bv;
      bs = -1;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int uu = -4; uu < 4; uu++)
        for (int vv = -4; vv < 4; vv++) begin
          in_valid = 1'($urandom_range(0, 5) != 0);
          sad = 16'($urandom_range(40, 60));
          u = 7'(uu); v = 7'(vv);
          if (in_valid && (bs < 0 || int'(sad) < bs)) begin bs = int'(sad); bu = uu; bv = vv; end
          @(negedge clk);
        end
      in_valid = 0;
      @(negedge clk);
      checks += 3;
      if (int'(best_sad) != bs) begin failures++; $display("FAIL sad"); end
      if (int'(best_u) != bu || int'(best_v) != bv) begin failures++; $display("FAIL mv"); end
      if (!best_valid) failures++;
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
