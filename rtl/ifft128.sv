// ifft128: 128-point inverse FFT producing the SC-FDMA time samples of one
// symbol, y[n] = (1/128) sum_k x[k] exp(+j 2 pi n k / 128).
//
// Radix-2 decimation in frequency over 7 stages of 64 butterflies. Sixteen
// radix2_bf units are reused by a 28-state FSM, 4 cycles per stage: in stage s
// (pair distance h = 64 >> s) cycle q processes butterflies j = 16q .. 16q+15,
// pairing elements i = (j / h) 2h + (j mod h) and i + h, writing a + b back to i
// and (a - b) W^(-(j mod h) 2^s) to i + h. The first stage pairs elements 64
// apart and the last one neighbours. The twiddles come from a 64-entry Q1.14
// table (npusch_pkg::ifft_twiddle). The result lies in bit-reversed order and
// is re-ordered by wiring on output.
//
// Scaling: no scaling inside the stages; the intermediate values carry 7 guard
// bits (21-bit, Q11.10) and the whole 1/128 is applied once, as an arithmetic
// right shift by 7 at the output, as in the document's design (which notes the
// truncation loss of this choice). Outputs are Q4.10, 14 bits.
//
// Timing: a one-cycle `en` loads x[] (ignored while `busy`); 28 cycles later
// `valid_out` pulses and y[] holds the result until the next transform ends.
// The cyclic prefix and the half-subcarrier frequency shift of the SC-FDMA
// signal are outside this block.
module ifft128
  import npusch_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  cplx14_t x [128],
  output cplx14_t y [128],
  output logic    valid_out,
  output logic    busy
);
  localparam int unsigned IW  = 21;   // internal width, Q11.10
  localparam int unsigned NBF = 16;   // radix-2 units

  typedef logic signed [IW-1:0] iw_t;

  iw_t        dr [128], di [128];
  logic [4:0] cyc;                    // 0..27
  logic [2:0] stg;
  logic [1:0] grp;
  assign stg = cyc[4:2];
  assign grp = cyc[1:0];

  iw_t        a_re [NBF], a_im [NBF], b_re [NBF], b_im [NBF];
  iw_t        s_re [NBF], s_im [NBF], d_re [NBF], d_im [NBF];
  iw_t        m_re [NBF], m_im [NBF];
  logic [6:0] i0 [NBF], i1 [NBF];
  logic [5:0] tex [NBF];

  function automatic logic [6:0] bitrev7(input logic [6:0] v);
    return {v[0], v[1], v[2], v[3], v[4], v[5], v[6]};
  endfunction

  // butterfly operand addressing for the current cycle
  always_comb begin
    for (int b = 0; b < NBF; b++) begin
      logic [5:0] j, jm;
      logic [6:0] h;
      j      = 6'({grp, 4'(b)});
      h      = 7'd64 >> stg;
      jm     = j & 6'(h - 1'b1);
      i0[b]  = 7'((7'(j) - 7'(jm)) << 1) + 7'(jm);
      i1[b]  = i0[b] + h;
      tex[b] = 6'(jm << stg);
      a_re[b] = dr[i0[b]];
      a_im[b] = di[i0[b]];
      b_re[b] = dr[i1[b]];
      b_im[b] = di[i1[b]];
    end
  end

  for (genvar b = 0; b < NBF; b++) begin : g_bf
    radix2_bf #(.W(IW)) u_bf (
      .a_re(a_re[b]), .a_im(a_im[b]), .b_re(b_re[b]), .b_im(b_im[b]),
      .y0_re(s_re[b]), .y0_im(s_im[b]), .y1_re(d_re[b]), .y1_im(d_im[b])
    );

    // (d) * W^(-e): complex multiply by the Q1.14 twiddle
    tw16_t tw;
    logic signed [IW+16:0] p_re, p_im;
    always_comb begin
      tw   = ifft_twiddle(tex[b]);
      p_re = d_re[b] * tw.re - d_im[b] * tw.im;
      p_im = d_re[b] * tw.im + d_im[b] * tw.re;
      m_re[b] = iw_t'(p_re >>> 14);
      m_im[b] = iw_t'(p_im >>> 14);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      valid_out <= 1'b0;
      cyc       <= '0;
      for (int i = 0; i < 128; i++) begin
        dr[i] <= '0;
        di[i] <= '0;
        y[i]  <= '0;
      end
    end else begin
      valid_out <= 1'b0;
      if (!busy) begin
        if (en) begin
          busy <= 1'b1;
          cyc  <= '0;
          for (int i = 0; i < 128; i++) begin
            dr[i] <= iw_t'(x[i].re);
            di[i] <= iw_t'(x[i].im);
          end
        end
      end else begin
        for (int b = 0; b < NBF; b++) begin
          dr[i0[b]] <= s_re[b];
          di[i0[b]] <= s_im[b];
          dr[i1[b]] <= m_re[b];
          di[i1[b]] <= m_im[b];
        end
        cyc <= cyc + 1'b1;
        if (cyc == 5'd27) begin
          busy      <= 1'b0;
          valid_out <= 1'b1;
          // the last stage (h = 1) writes elements 96..127 in this cycle:
          // butterfly b holds elements 96 + 2b and 97 + 2b
          for (int i = 0; i < 96; i++)
            y[bitrev7(7'(i))] <= '{re: s14_t'(dr[i] >>> 7), im: s14_t'(di[i] >>> 7)};
          for (int b = 0; b < NBF; b++) begin
            y[bitrev7(7'(96 + 2 * b))] <= '{re: s14_t'(s_re[b] >>> 7), im: s14_t'(s_im[b] >>> 7)};
            y[bitrev7(7'(97 + 2 * b))] <= '{re: s14_t'(m_re[b] >>> 7), im: s14_t'(m_im[b] >>> 7)};
          end
        end
      end
    end
  end
endmodule
