// tb_pe: one processing element. Checks |cmb - ref| + psum_in when
// enabled, that a disabled PE adds nothing and presents constant zero
// operands, that ref_out follows ref_in only on shift, and that the CMB
// register loads only on cmb_we.
module tb_pe;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmb_we = 0, csm = 0, shift = 0;
  pix_t cmb_pix = '0, ref_in = '0, ref_out;
  logic [11:0] psum_in = '0, psum_out;
  int cv = 0, rv = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe #(.COL_W(12)) dut (.clk, .rst_n, .cmb_we, .cmb_pix, .csm, .shift, .ref_in, .ref_out, .psum_in, .psum_out);

  task automatic chk(bit c, int ps);
    int exp;
    @(negedge clk);
    csm = c; psum_in = 12'(ps);
    #1;
    exp = c ? ps + ((cv > rv) ? cv - rv : rv - cv) : ps;
    checks++;
    if (int'(psum_out) != exp) begin failures++; $display("FAIL psum %0d exp %0d", psum_out, exp); end
    checks++;
    if (!c && (dut.a != '0 || dut.b != '0)) begin failures++; $display("FAIL gated operands"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (500) begin
      @(negedge clk);
      cmb_we = 1'($urandom_range(0, 1)); cmb_pix = pix_t'($urandom_range(0, 255));
      shift  = 1'($urandom_range(0, 1)); ref_in  = pix_t'($urandom_range(0, 255));
      @(posedge clk);
      if (cmb_we) cv = int'(cmb_pix);
      if (shift)  rv = int'(ref_in);
      @(negedge clk);
      cmb_we = 0; shift = 0;
      checks++;
      if (int'(ref_out) != rv) begin failures++; $display("FAIL ref_out"); end
      chk(1'($urandom_range(0, 1)), int'($urandom_range(0, 3000)));
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
