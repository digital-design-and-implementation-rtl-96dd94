// dft12: transform precoder of the SC-FDMA transmitter, a 1/3/6/12-point DFT
// (no 1/sqrt(M) scaling) selected by NSC, built from one radix-3 and one
// radix-2 butterfly that an FSM reuses in successive cycles.
//
//  NSC = 12 (12 = 3 x 4, n = 4 n1 + n2, k = k1 + 3 k2):
//    cycles 0-3   radix-3 over (x[n2], x[n2+4], x[n2+8]), n2 = 0..3, outputs
//                 multiplied by W12^(n2 k1) and stored as T[k1][n2];
//    cycles 4-9   first radix-2 stage of the three 4-point DFTs over n2:
//                 pairs (T[k1][n], T[k1][n+2]), the n = 1 difference times -j;
//    cycles 10-15 second radix-2 stage, giving X[k1], X[k1+6], X[k1+3], X[k1+9].
//  NSC = 6 (6 = 3 x 2): radix-3 twice over (x[n2], x[n2+2], x[n2+4]) with
//    twiddles W6^(n2 k1), then radix-2 three times giving X[k1], X[k1+3].
//  NSC = 3: one radix-3 cycle. NSC = 1: the output is the input.
//
// The twiddles used (W12^1..W12^6) need only halving, negation, swapping and a
// multiply by sqrt(3)/2, which is a shift-and-add network, so the datapath
// has no general multiplier. Arithmetic is carried in npusch_pkg::DFT_W
// (20-bit, Q8.12): inputs are extended by four fraction bits, outputs rounded
// back to Q4.8 and saturated to 12 bits (an unscaled 12-point DFT of
// +-1/sqrt(2) symbols can reach 8.5, just past the Q4.8 range).
//
// Timing: a one-cycle `en` with x[] valid starts a transform (ignored while
// `busy`); `valid_out` pulses 16, 5, 1 or 1 cycles later for NSC = 12, 6, 3, 1
// and y[] then holds the result until the next transform ends. Entries at or
// above NSC are zero.
module dft12
  import npusch_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [3:0] nsc,
  input  cplx12_t    x [12],
  output cplx12_t    y [12],
  output logic       valid_out,
  output logic       busy
);
  typedef logic signed [DFT_W-1:0] sw_t;

  sw_t        xr [12], xi [12];   // latched inputs
  sw_t        tr [12], ti [12];   // intermediate T[k1*4 + n2]
  logic [3:0] n, step, last;

  // ---- shared butterflies
  sw_t r3_in_re [3], r3_in_im [3], r3_out_re [3], r3_out_im [3];
  sw_t r2_a_re, r2_a_im, r2_b_re, r2_b_im, r2_y0_re, r2_y0_im, r2_y1_re, r2_y1_im;

  radix3_bf u_r3 (.x_re(r3_in_re), .x_im(r3_in_im), .y_re(r3_out_re), .y_im(r3_out_im));
  radix2_bf #(.W(DFT_W)) u_r2 (
    .a_re(r2_a_re), .a_im(r2_a_im), .b_re(r2_b_re), .b_im(r2_b_im),
    .y0_re(r2_y0_re), .y0_im(r2_y0_im), .y1_re(r2_y1_re), .y1_im(r2_y1_im)
  );

  // multiply by W12^e = cos(pi e/6) - j sin(pi e/6), e in {0,1,2,3,4,6}
  function automatic void tw12(input sw_t ar, input sw_t ai, input logic [2:0] e,
                               output sw_t zr, output sw_t zi);
    unique case (e)
      3'd1: begin zr = mul_s60(ar) + (ai >>> 1);   zi = mul_s60(ai) - (ar >>> 1); end
      3'd2: begin zr = (ar >>> 1) + mul_s60(ai);   zi = (ai >>> 1) - mul_s60(ar); end
      3'd3: begin zr = ai;                         zi = -ar;                      end
      3'd4: begin zr = mul_s60(ai) - (ar >>> 1);   zi = -(ai >>> 1) - mul_s60(ar); end
      3'd6: begin zr = -ar;                        zi = -ai;                      end
      default: begin zr = ar;                      zi = ai;                       end
    endcase
  endfunction

  // Q8.12 -> Q4.8 with rounding and saturation
  function automatic s12_t to_q48(input sw_t v);
    sw_t r;
    r = (v + sw_t'(8)) >>> 4;
    if (r > sw_t'(2047))       return 12'sd2047;
    else if (r < sw_t'(-2048)) return -12'sd2048;
    else                       return s12_t'(r);
  endfunction

  // ---- operand selection for the current step
  logic [1:0] n2;
  logic [1:0] k1;
  logic       sel;
  logic [3:0] ia, ib;
  always_comb begin
    n2 = '0;
    k1 = '0;
    sel = 1'b0;
    ia = '0;
    ib = '0;
    for (int i = 0; i < 3; i++) begin
      r3_in_re[i] = '0;
      r3_in_im[i] = '0;
    end
    if (n == 4'd12) begin
      n2 = step[1:0];
      for (int i = 0; i < 3; i++) begin
        r3_in_re[i] = xr[4 * i + int'(n2)];
        r3_in_im[i] = xi[4 * i + int'(n2)];
      end
      if (step >= 4'd10) begin
        k1  = 2'((step - 4'd10) >> 1);
        sel = step[0];                       // 10,12,14 -> 0; 11,13,15 -> 1
        ia  = 4'(4 * k1) + (sel ? 4'd2 : 4'd0);
        ib  = ia + 4'd1;
      end else begin
        k1  = 2'((step - 4'd4) >> 1);
        sel = step[0];                       // pair n = 0 or 1
        ia  = 4'(4 * k1) + 4'(sel);
        ib  = ia + 4'd2;
      end
    end else if (n == 4'd6) begin
      n2 = step[1:0];
      for (int i = 0; i < 3; i++) begin
        r3_in_re[i] = xr[2 * i + int'(n2)];
        r3_in_im[i] = xi[2 * i + int'(n2)];
      end
      k1 = 2'(step - 4'd2);
      ia = 4'(4 * k1);
      ib = ia + 4'd1;
    end else begin
      for (int i = 0; i < 3; i++) begin
        r3_in_re[i] = xr[i];
        r3_in_im[i] = xi[i];
      end
    end
    r2_a_re = tr[ia];
    r2_a_im = ti[ia];
    r2_b_re = tr[ib];
    r2_b_im = ti[ib];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      valid_out <= 1'b0;
      n         <= 4'd1;
      step      <= '0;
      last      <= '0;
      for (int i = 0; i < 12; i++) begin
        xr[i] <= '0;
        xi[i] <= '0;
        tr[i] <= '0;
        ti[i] <= '0;
        y[i]  <= '0;
      end
    end else begin
      valid_out <= 1'b0;
      if (!busy) begin
        if (en) begin
          busy <= 1'b1;
          n    <= nsc;
          step <= '0;
          unique case (nsc)
            4'd12:   last <= 4'd15;
            4'd6:    last <= 4'd4;
            default: last <= 4'd0;
          endcase
          for (int i = 0; i < 12; i++) begin
            xr[i] <= sw_t'(x[i].re) <<< 4;
            xi[i] <= sw_t'(x[i].im) <<< 4;
          end
        end
      end else begin
        step <= step + 1'b1;
        if (step == last) begin
          busy      <= 1'b0;
          valid_out <= 1'b1;
        end
        if (n == 4'd12) begin
          if (step < 4'd4) begin
            for (int k = 0; k < 3; k++) begin
              sw_t zr, zi;
              tw12(r3_out_re[k], r3_out_im[k], 3'(int'(n2) * k), zr, zi);
              tr[4 * k + int'(n2)] <= zr;
              ti[4 * k + int'(n2)] <= zi;
            end
          end else if (step < 4'd10) begin
            tr[ia] <= r2_y0_re;
            ti[ia] <= r2_y0_im;
            if (sel) begin                   // times -j
              tr[ib] <= r2_y1_im;
              ti[ib] <= -r2_y1_re;
            end else begin
              tr[ib] <= r2_y1_re;
              ti[ib] <= r2_y1_im;
            end
          end else begin
            y[int'(k1) + (sel ? 3 : 0)]     <= '{re: to_q48(r2_y0_re), im: to_q48(r2_y0_im)};
            y[int'(k1) + (sel ? 9 : 6)]     <= '{re: to_q48(r2_y1_re), im: to_q48(r2_y1_im)};
          end
        end else if (n == 4'd6) begin
          if (step < 4'd2) begin
            for (int k = 0; k < 3; k++) begin
              sw_t zr, zi;
              tw12(r3_out_re[k], r3_out_im[k], 3'(2 * int'(n2) * k), zr, zi);
              tr[4 * k + int'(n2)] <= zr;
              ti[4 * k + int'(n2)] <= zi;
            end
          end else begin
            y[int'(k1)]     <= '{re: to_q48(r2_y0_re), im: to_q48(r2_y0_im)};
            y[int'(k1) + 3] <= '{re: to_q48(r2_y1_re), im: to_q48(r2_y1_im)};
          end
          for (int i = 6; i < 12; i++) y[i] <= '0;
        end else if (n == 4'd3) begin
          for (int k = 0; k < 3; k++) y[k] <= '{re: to_q48(r3_out_re[k]), im: to_q48(r3_out_im[k])};
          for (int i = 3; i < 12; i++) y[i] <= '0;
        end else begin
          y[0] <= '{re: to_q48(xr[0]), im: to_q48(xi[0])};
          for (int i = 1; i < 12; i++) y[i] <= '0;
        end
      end
    end
  end
endmodule
