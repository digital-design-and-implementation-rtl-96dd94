// scrambler: bit-level scrambling of the NPUSCH codeword with the length-31
// gold sequence c(n) = (x1(n + Nc) + x2(n + Nc)) mod 2, Nc = 1600.
//
//   x1(n+31) = (x1(n+3) + x1(n)) mod 2,                 x1(0) = 1, x1(1..30) = 0
//   x2(n+31) = (x2(n+3) + x2(n+2) + x2(n+1) + x2(n)) mod 2,
//   x2 initialised with c_init = n_RNTI 2^14 + (n_f mod 2) 2^13
//                                + floor(n_s / 2) 2^9 + N_ID^Ncell
//
// Two 31-bit registers hold x(n) .. x(n+30), bit 0 being x(n); each shift
// appends the new feedback bit at bit 30. After `start` the control loads both
// registers and runs 1600 shifts (the Nc offset) before the first input bit is
// accepted; `in_ready` stays low meanwhile, which stalls the channel
// interleaver upstream. Then each accepted input bit leaves as
// data_in ^ x1(0) ^ x2(0) and both registers shift once.
//
// Interface: `en` with `data_in` is the input stream, `in_ready` its ready;
// `data_out`/`valid_out` the output, held until `out_ready`. `in_length` bits
// are scrambled per codeword, then `done` pulses and the block waits for the
// next `start`. The warm-up of 1600 cycles follows the document's serial
// implementation; the handshakes are this design's own.
module scrambler (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  logic [15:0] n_rnti,
  input  logic [9:0]  n_f,
  input  logic [9:0]  n_s,
  input  logic [15:0] n_id_ncell,
  input  logic [11:0] in_length,
  input  logic        en,
  input  logic        data_in,
  output logic        in_ready,
  output logic        data_out,
  output logic        valid_out,
  input  logic        out_ready,
  output logic        done
);
  import npusch_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_WARM, S_RUN} state_e;
  state_e state;

  logic [30:0] x1, x2;
  logic [10:0] warm_cnt;
  logic [11:0] len, cnt;
  logic [30:0] c_init;

  always_comb begin
    c_init = (31'(n_rnti) << 14) + (31'(n_f[0]) << 13) + (31'(n_s[9:1]) << 9) + 31'(n_id_ncell);
  end

  assign in_ready = (state == S_RUN) && (!valid_out || out_ready);

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S_IDLE;
      x1        <= '0;
      x2        <= '0;
      warm_cnt  <= '0;
      len       <= '0;
      cnt       <= '0;
      data_out  <= 1'b0;
      valid_out <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (valid_out && out_ready) valid_out <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          x1       <= 31'd1;
          x2       <= c_init;
          warm_cnt <= '0;
          len      <= in_length;
          cnt      <= '0;
          state    <= S_WARM;
        end
        S_WARM: begin
          x1       <= {x1[3] ^ x1[0], x1[30:1]};
          x2       <= {x2[3] ^ x2[2] ^ x2[1] ^ x2[0], x2[30:1]};
          warm_cnt <= warm_cnt + 1'b1;
          if (warm_cnt == 11'(NC_SCRAMBLE - 1)) state <= (len == '0) ? S_IDLE : S_RUN;
        end
        S_RUN: if (en && in_ready) begin
          data_out  <= data_in ^ x1[0] ^ x2[0];
          valid_out <= 1'b1;
          x1        <= {x1[3] ^ x1[0], x1[30:1]};
          x2        <= {x2[3] ^ x2[2] ^ x2[1] ^ x2[0], x2[30:1]};
          cnt       <= cnt + 1'b1;
          if (cnt + 1'b1 == len) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
