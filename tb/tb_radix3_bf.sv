// tb_radix3_bf: self-checking testbench of radix3_bf (combinational). Random
// Q8.12 operands are transformed and compared with a floating-point 3-point
// DFT. The constant sqrt(3)/2 is a shift-and-add approximation (0.8657 against
// 0.8660) and halving truncates, so the allowed error is 0.05 % of the input
// magnitude plus 4 LSB.
module tb_radix3_bf;
  import npusch_pkg::*;
  import npusch_ref_pkg::*;

  logic signed [DFT_W-1:0] xr [3], xi [3], yr [3], yi [3];
  int checks = 0, failures = 0;

  radix3_bf dut (.x_re(xr), .x_im(xi), .y_re(yr), .y_im(yi));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ar [], ai [], er [], ei [];
    real tol;
    ar = new[3]; ai = new[3];
    for (int v = 0; v < 2000; v++) begin
      for (int n = 0; n < 3; n++) begin
        int r, i;
        r = int'($urandom % (1 << (DFT_W - 2))) - (1 << (DFT_W - 3));
        i = int'($urandom % (1 << (DFT_W - 2))) - (1 << (DFT_W - 3));
        xr[n] = DFT_W'(r); xi[n] = DFT_W'(i);
        ar[n] = real'(r); ai[n] = real'(i);
      end
      dft_real(ar, ai, 0, er, ei);
      #1;
      tol = 4.0 + 0.0005 * real'(1 << (DFT_W - 3)) * 3.0;
      checks++;
      for (int k = 0; k < 3; k++)
        if ((real'(yr[k]) - er[k]) > tol || (er[k] - real'(yr[k])) > tol ||
            (real'(yi[k]) - ei[k]) > tol || (ei[k] - real'(yi[k])) > tol) begin
          failures++;
          $display("FAIL X%0d = (%0d,%0d), expected (%f,%f)", k, yr[k], yi[k], er[k], ei[k]);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
