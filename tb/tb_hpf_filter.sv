// tb_hpf_filter: random and corner-case 3x3 windows through hpf_filter,
// compared with the filter's defining formula evaluated in integers.
module tb_hpf_filter;
  import me_pkg::*;
  import me_ref_pkg::*;
  pix_t  win [3][3];
  grad_t grad;
  int    w [3][3];
  int checks = 0, failures = 0;

  hpf_filter dut (.win, .grad);

  task automatic check_win();
    int exp;
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = pix_t'(w[r][c]);
    #1;
    exp = grad_win(0, w);
    checks++;
    if (int'(grad) != exp) begin
      failures++;
      $display("FAIL grad=%0d exp=%0d", grad, exp);
    end
  endtask

  initial begin
    // flat, single bright centre, single dark centre, step edges
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] = 77;
    check_win();
    w[1][1] = 255; for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) if (r != 1 || c != 1) w[r][c] = 0;
    check_win();
    w[1][1] = 0; for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) if (r != 1 || c != 1) w[r][c] = 255;
    check_win();
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] = (r == 2) ? 255 : 0;
    check_win();
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] = (c == 0) ? 255 : 0;
    check_win();
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] = (r + c >= 3) ? 255 : 0;
    check_win();
    repeat (2000) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] = int'($urandom_range(0, 255));
      check_win();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
