// rsc_encoder: one 8-state constituent encoder of the rate-1/3 turbo code,
// transfer function G(D) = [1, g1(D)/g0(D)] with g0 = 1 + D^2 + D^3
// (feedback) and g1 = 1 + D + D^3 (parity).
//
// State s1 s2 s3 holds the last three values of the feedback node
// a = u ^ s2 ^ s3. The parity is z = a ^ s1 ^ s3. In termination mode
// (`term` high) the input is taken from the feedback, u = s2 ^ s3, so a = 0
// and three such cycles flush the register to zero; `x` then carries the tail
// bit x_{K+t} and `z` the tail parity z_{K+t}.
//
// `x` and `z` are combinational for the current cycle; the state advances on
// the clock edge when `en` is high. `clear` zeroes the state (the registers
// start from zero for every code block).
module rsc_encoder (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  input  logic en,
  input  logic term,
  input  logic u,
  output logic x,
  output logic z
);
  logic s1, s2, s3, a;

  always_comb begin
    x = term ? (s2 ^ s3) : u;
    a = x ^ s2 ^ s3;
    z = a ^ s1 ^ s3;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
    end else if (en) begin
      s1 <= a;
      s2 <= s1;
      s3 <= s2;
    end
  end
endmodule
