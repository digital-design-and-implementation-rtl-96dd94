// modulator: maps scrambled bits to complex symbols, I and Q in Q4.8.
//
//   BPSK (Q_m = 1): b = 0 -> ( 1 + j)/sqrt(2),  b = 1 -> (-1 - j)/sqrt(2)
//   QPSK (Q_m = 2): b(i) selects the sign of I, b(i+1) the sign of Q
//                   (00 -> +,+  01 -> +,-  10 -> -,+  11 -> -,-)
// with 1/sqrt(2) = 181/256 (0000_1011_0101). The two mappings are two small
// look-up tables followed by a multiplexer controlled by Q_m.
//
// Bits arrive serially (`en`/`data_in`, ready `in_ready`); for QPSK the first
// bit of a pair is held in a register and the symbol is produced with the
// second one. The symbol (`i_out`, `q_out`, `valid_out`) is registered and held
// until `out_ready`. `in_length` bits make one codeword; `done` pulses with the
// last symbol. The plain BPSK constellation of the document's table is used; no
// pi/2 rotation between symbols is applied.
module modulator (
  input  logic                clk,
  input  logic                reset,
  input  logic                start,
  input  logic [1:0]          q_m,
  input  logic [15:0]         in_length,
  input  logic                en,
  input  logic                data_in,
  output logic                in_ready,
  output npusch_pkg::s12_t    i_out,
  output npusch_pkg::s12_t    q_out,
  output logic                valid_out,
  input  logic                out_ready,
  output logic                done
);
  import npusch_pkg::*;

  logic        qpsk, have_first, first_bit, active;
  logic [15:0] len, cnt;

  // look-up tables
  s12_t bpsk_i, bpsk_q, qpsk_i, qpsk_q;
  always_comb begin
    bpsk_i = data_in ? -MOD_AMP : MOD_AMP;
    bpsk_q = bpsk_i;
    qpsk_i = first_bit ? -MOD_AMP : MOD_AMP;
    qpsk_q = data_in ? -MOD_AMP : MOD_AMP;
  end

  assign in_ready = active && (!valid_out || out_ready);

  always_ff @(posedge clk) begin
    if (reset) begin
      qpsk       <= 1'b0;
      have_first <= 1'b0;
      first_bit  <= 1'b0;
      active     <= 1'b0;
      len        <= '0;
      cnt        <= '0;
      i_out      <= '0;
      q_out      <= '0;
      valid_out  <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (valid_out && out_ready) valid_out <= 1'b0;
      if (start) begin
        qpsk       <= (q_m == 2'd2);
        len        <= in_length;
        cnt        <= '0;
        have_first <= 1'b0;
        active     <= (in_length != '0);
      end else if (en && in_ready) begin
        cnt <= cnt + 1'b1;
        if (cnt + 1'b1 == len) active <= 1'b0;
        if (qpsk && !have_first) begin
          first_bit  <= data_in;
          have_first <= 1'b1;
        end else begin
          have_first <= 1'b0;
          i_out      <= qpsk ? qpsk_i : bpsk_i;
          q_out      <= qpsk ? qpsk_q : bpsk_q;
          valid_out  <= 1'b1;
          if (cnt + 1'b1 == len) done <= 1'b1;
        end
      end
    end
  end
endmodule
