// turbo_qpp_index: generates the interleaved read index Pi(i) of the turbo
// internal interleaver, Pi(i) = (f1*i + f2*i^2) mod K, for i = 0, 1, 2, ...
//
// No multiplier or divider is used. With Pi(i+1) = Pi(i) + g(i) (mod K) and
// g(i) = (f1 + f2*(2i+1)) mod K, the increment itself steps by the constant
// 2*f2 mod K, so each step is two modular additions, each an add followed by
// one conditional subtraction of K (both operands are already below K).
//
// `init` (one cycle) loads f1, f2, K and sets Pi = 0. Each cycle with `step`
// high advances to the next index; `pi` is the registered current index, so
// it holds Pi(i) during the cycle in which element i is consumed.
module turbo_qpp_index #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         init,
  input  logic [W-1:0] k,
  input  logic [W-1:0] f1,
  input  logic [W-1:0] f2,
  input  logic         step,
  output logic [W-1:0] pi
);
  logic [W-1:0] kk, g, inc;

  function automatic logic [W-1:0] mod_add(input logic [W-1:0] a, input logic [W-1:0] b,
                                           input logic [W-1:0] m);
    logic [W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= {1'b0, m}) ? W'(s - {1'b0, m}) : W'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      kk  <= '0;
      g   <= '0;
      inc <= '0;
      pi  <= '0;
    end else if (init) begin
      kk  <= k;
      pi  <= '0;
      g   <= mod_add(f1, f2, k);
      inc <= mod_add(f2, f2, k);
    end else if (step) begin
      pi <= mod_add(pi, g, kk);
      g  <= mod_add(g, inc, kk);
    end
  end
endmodule
