// radix3_bf: 3-point DFT butterfly X_k = sum_n x_n W3^(nk), W3 = exp(-j2pi/3),
// in three adder stages and one constant multiply:
//   stage 1: a0 = x0,       a1 = x1 + x2,        a2 = x1 - x2
//   stage 2: b0 = a0 + a1,  b1 = a0 - a1/2,      t  = (sqrt(3)/2) a2
//   stage 3: X0 = b0,       X1 = b1 - j t,       X2 = b1 + j t
// The halving is an arithmetic shift and sqrt(3)/2 is a shift-and-add network
// (npusch_pkg::mul_s60), so there is no general multiplier. Combinational,
// operands of npusch_pkg::DFT_W bits (Q8.12), real and imaginary parts apart.
module radix3_bf
  import npusch_pkg::*;
(
  input  logic signed [DFT_W-1:0] x_re [3],
  input  logic signed [DFT_W-1:0] x_im [3],
  output logic signed [DFT_W-1:0] y_re [3],
  output logic signed [DFT_W-1:0] y_im [3]
);
  logic signed [DFT_W-1:0] a1_re, a1_im, a2_re, a2_im, b1_re, b1_im, t_re, t_im;

  always_comb begin
    a1_re = x_re[1] + x_re[2];
    a1_im = x_im[1] + x_im[2];
    a2_re = x_re[1] - x_re[2];
    a2_im = x_im[1] - x_im[2];
    b1_re = x_re[0] - (a1_re >>> 1);
    b1_im = x_im[0] - (a1_im >>> 1);
    t_re  = mul_s60(a2_re);
    t_im  = mul_s60(a2_im);
    y_re[0] = x_re[0] + a1_re;
    y_im[0] = x_im[0] + a1_im;
    y_re[1] = b1_re + t_im;
    y_im[1] = b1_im - t_re;
    y_re[2] = b1_re - t_im;
    y_im[2] = b1_im + t_re;
  end
endmodule
