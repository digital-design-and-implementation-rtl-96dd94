// radix2_bf: radix-2 butterfly, y0 = a + b, y1 = a - b, on complex operands
// held as separate real and imaginary parts of W bits. Combinational; any
// twiddle factor on the lower branch is applied by the caller. The outputs
// are as wide as the inputs, so callers leave one bit of headroom.
module radix2_bf #(
  parameter int unsigned W = 20
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W-1:0] y0_re,
  output logic signed [W-1:0] y0_im,
  output logic signed [W-1:0] y1_re,
  output logic signed [W-1:0] y1_im
);
  always_comb begin
    y0_re = a_re + b_re;
    y0_im = a_im + b_im;
    y1_re = a_re - b_re;
    y1_im = a_im - b_im;
  end
endmodule
