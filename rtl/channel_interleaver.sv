// channel_interleaver: NPUSCH channel interleaver. The rate-matched bits are
// grouped into Q_m-bit symbols, written row by row into a matrix of
// C_mux = (N_symb^UL - 1) * N_slots^UL columns (one column per data SC-FDMA
// symbol of the resource unit, N_symb^UL = 7) and read out column by column,
// each symbol's Q_m bits kept together and in order.
//
// For QPSK the even-indexed bits of the stream form one bit plane of a matrix
// row and the odd-indexed bits the other, as the two serial-to-parallel paths of
// the document's design do; for BPSK there is a single plane. Here both planes
// live in one bit-addressed register file: bit j of the input is stored at
// address j (row-major order), and the output reads address
// (r * C_mux + c) * Q_m + b for c = 0..C_mux-1, r = 0..R'_mux-1, b = 0..Q_m-1.
// Row and column strides are kept in accumulators (C_mux is formed as
// 4*N_slots + 2*N_slots), so no multiplier or divider is used; the number of
// rows R'_mux = H / (Q_m C_mux) is counted while the rows are written. The
// input length H is assumed to be a multiple of Q_m * C_mux.
//
// Timing: `start` latches Q_m, H (in_length) and N_slots; H cycles with `en`
// fill the register file; the output then streams one bit per accepted cycle
// with a valid/ready handshake (`valid_out` holds until `out_ready`), which lets
// the scrambler stall the interleaver. `done` pulses with the last bit.
module channel_interleaver #(
  parameter int unsigned HMAX = 4096        // register file size in bits
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  logic [1:0]  q_m,
  input  logic [15:0] in_length,
  input  logic [4:0]  n_slots,
  input  logic        en,
  input  logic        data_in,
  output logic        data_out,
  output logic        valid_out,
  input  logic        out_ready,
  output logic        done
);
  localparam int unsigned AW = $clog2(HMAX) + 1;
  localparam int unsigned IW = $clog2(HMAX);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_READ} state_e;
  state_e state;

  logic          rf [HMAX];
  logic [AW-1:0] h_len, wr_cnt, row_bits, in_row, n_rows;
  logic [7:0]    c_mux, col;
  logic [AW-1:0] row, row_base, col_base;
  logic          qpsk, bsel;

  logic          advance;
  assign advance = !valid_out || out_ready;

  always_ff @(posedge clk) begin
    if (en && state == S_FILL) rf[wr_cnt[IW-1:0]] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S_IDLE;
      h_len     <= '0;
      wr_cnt    <= '0;
      row_bits  <= '0;
      in_row    <= '0;
      n_rows    <= '0;
      c_mux     <= '0;
      col       <= '0;
      row       <= '0;
      row_base  <= '0;
      col_base  <= '0;
      qpsk      <= 1'b0;
      bsel      <= 1'b0;
      data_out  <= 1'b0;
      valid_out <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (valid_out && out_ready) valid_out <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          qpsk     <= (q_m == 2'd2);
          h_len    <= AW'(in_length);
          c_mux    <= 8'({n_slots, 2'b0}) + 8'({n_slots, 1'b0});
          row_bits <= (q_m == 2'd2) ? AW'({n_slots, 3'b0}) + AW'({n_slots, 2'b0})
                                    : AW'({n_slots, 2'b0}) + AW'({n_slots, 1'b0});
          wr_cnt   <= '0;
          in_row   <= '0;
          n_rows   <= '0;
          state    <= (in_length == '0) ? S_IDLE : S_FILL;
        end
        S_FILL: if (en) begin
          wr_cnt <= wr_cnt + 1'b1;
          if (in_row + 1'b1 == row_bits) begin
            in_row <= '0;
            n_rows <= n_rows + 1'b1;
          end else begin
            in_row <= in_row + 1'b1;
          end
          if (wr_cnt + 1'b1 == h_len) begin
            col      <= '0;
            row      <= '0;
            row_base <= '0;
            col_base <= '0;
            bsel     <= 1'b0;
            state    <= S_READ;
          end
        end
        S_READ: if (advance) begin
          data_out  <= rf[IW'(row_base + col_base + AW'(bsel))];
          valid_out <= 1'b1;
          if (qpsk && !bsel) begin
            bsel <= 1'b1;
          end else begin
            bsel <= 1'b0;
            if (row + 1'b1 == n_rows) begin
              row      <= '0;
              row_base <= '0;
              col      <= col + 1'b1;
              col_base <= col_base + (qpsk ? AW'(2) : AW'(1));
              if (col + 1'b1 == c_mux) begin
                done  <= 1'b1;
                state <= S_IDLE;
              end
            end else begin
              row      <= row + 1'b1;
              row_base <= row_base + row_bits;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
