// tb_subsample_mask: exhaustive check of the regular subsample mask bit
// against the step-function basic mask, plus the ones per 4x4 tile
// (2m for m = 2..8, i.e. 4-to-1 up to 1-to-1).
module tb_subsample_mask;
  import me_ref_pkg::*;
  logic [3:0] m;
  logic [1:0] i, j;
  logic       sm;
  int checks = 0, failures = 0;

  subsample_mask dut (.m, .i, .j, .sm);

  initial begin
    for (int mm = 0; mm < 16; mm++) begin
      int ones;
      ones = 0;
      for (int ii = 0; ii < 4; ii++)
        for (int jj = 0; jj < 4; jj++) begin
          m = 4'(mm); i = 2'(ii); j = 2'(jj);
          #1;
          checks++;
          if (int'(sm) != sm_ref(mm, ii, jj)) begin
            failures++;
            $display("FAIL m=%0d i=%0d j=%0d sm=%0d", mm, ii, jj, sm);
          end
          ones += int'(sm);
        end
      if (mm >= 2 && mm <= 8) begin
        checks++;
        if (ones != 2 * mm) begin
          failures++;
          $display("FAIL m=%0d ones=%0d", mm, ones);
        end
      end
    end
    // The 8-to-6 pattern: rows with i even full, odd rows alternate.
    m = 4'd6; i = 2'd1; j = 2'd1; #1; checks++; if (sm !== 1'b0) failures++;
    m = 4'd6; i = 2'd1; j = 2'd2; #1; checks++; if (sm !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
