// dft_input_buffer: serial-to-parallel buffer between the modulator and the
// transform precoder (DFT). It gathers the NSC modulation symbols of one
// SC-FDMA symbol (NSC = 1, 3, 6 or 12 subcarriers) into the 12-entry parallel
// input of dft12, unused entries held at zero.
//
// Symbols enter with `en`/`in_ready`; once NSC have been collected the vector
// is offered with `out_valid` until the DFT takes it (`out_ready`), and
// `in_ready` stays low meanwhile, so a busy DFT stalls the modulator and
// everything upstream of it. NSC is taken at `start`.
module dft_input_buffer
  import npusch_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [3:0] nsc,
  input  logic       en,
  input  s12_t       i_in,
  input  s12_t       q_in,
  output logic       in_ready,
  output cplx12_t    x [12],
  output logic       out_valid,
  input  logic       out_ready
);
  logic [3:0] n, cnt;

  assign in_ready = !out_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      n         <= 4'd1;
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < 12; i++) x[i] <= '0;
    end else begin
      if (start) begin
        n         <= nsc;
        cnt       <= '0;
        out_valid <= 1'b0;
        for (int i = 0; i < 12; i++) x[i] <= '0;
      end else begin
        if (out_valid && out_ready) out_valid <= 1'b0;
        if (en && in_ready) begin
          x[cnt] <= '{re: i_in, im: q_in};
          if (cnt + 1'b1 == n) begin
            cnt       <= '0;
            out_valid <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
