// ifft_input_assembler: gathers the 12 subcarriers of one SC-FDMA symbol,
// streamed by the resource element mapper, into the 128-bin input vector of
// the IFFT and starts the transform.
//
// NB-IoT subcarrier k (0..11) sits at frequency (k - 6 + 1/2) * 15 kHz around
// the carrier centre; this block places k at IFFT bin (k - 6) mod 128, i.e.
// k = 0..5 on bins 122..127 and k = 6..11 on bins 0..5, and leaves the other
// 116 bins at zero. The remaining half-subcarrier (7.5 kHz) shift is not
// applied. Samples are widened from Q4.8 to Q4.10.
//
// Timing: one subcarrier is accepted per cycle (`en`/`in_ready`); after the
// twelfth the IFFT is started as soon as it is idle (`in_ready` is low until
// then), so the IFFT stalls the mapper. `sym_out` gives the SC-FDMA symbol index
// of the vector last handed to the IFFT.
module ifft_input_assembler
  import npusch_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  s12_t       din_re,
  input  s12_t       din_im,
  input  logic [3:0] din_sc,
  input  logic [6:0] din_sym,
  output logic       in_ready,
  output cplx14_t    x [128],
  output logic       ifft_en,
  input  logic       ifft_busy,
  output logic [6:0] sym_out
);
  logic full;

  assign in_ready = !full;
  assign ifft_en  = full && !ifft_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      full    <= 1'b0;
      sym_out <= '0;
      for (int i = 0; i < 128; i++) x[i] <= '0;
    end else begin
      if (ifft_en) full <= 1'b0;
      if (en && in_ready) begin
        x[(din_sc < 4'd6) ? 7'd122 + 7'(din_sc) : 7'(din_sc) - 7'd6] <=
          '{re: s14_t'(din_re) <<< 2, im: s14_t'(din_im) <<< 2};
        if (din_sc == 4'd11) begin
          full    <= 1'b1;
          sym_out <= din_sym;
        end
      end
    end
  end
endmodule
