// tb_radix2_bf: self-checking testbench of radix2_bf (combinational). Random
// operands, including the extremes of the range that do not overflow, must
// give y0 = a + b and y1 = a - b exactly on both parts.
module tb_radix2_bf;
  localparam int W = 20;
  logic signed [W-1:0] ar, ai, br, bi, y0r, y0i, y1r, y1i;
  int checks = 0, failures = 0;

  radix2_bf #(.W(W)) dut (.a_re(ar), .a_im(ai), .b_re(br), .b_im(bi), .y0_re(y0r), .y0_im(y0i),
                          .y1_re(y1r), .y1_im(y1i));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2000; v++) begin
      int a_r, a_i, b_r, b_i;
      a_r = int'($urandom % (1 << (W - 1))) - (1 << (W - 2));
      a_i = int'($urandom % (1 << (W - 1))) - (1 << (W - 2));
      b_r = int'($urandom % (1 << (W - 1))) - (1 << (W - 2));
      b_i = int'($urandom % (1 << (W - 1))) - (1 << (W - 2));
      if (v == 0) begin a_r = (1 << (W - 2)) - 1; b_r = (1 << (W - 2)); end
      ar = W'(a_r); ai = W'(a_i); br = W'(b_r); bi = W'(b_i);
      #1;
      checks++;
      if (int'(y0r) != a_r + b_r || int'(y0i) != a_i + b_i ||
          int'(y1r) != a_r - b_r || int'(y1i) != a_i - b_i) begin
        failures++;
        $display("FAIL a=(%0d,%0d) b=(%0d,%0d)", a_r, a_i, b_r, b_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
