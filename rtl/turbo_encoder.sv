// turbo_encoder: rate-1/3 parallel concatenated convolutional (turbo) encoder
// for the single NPUSCH code block of K = TBS + 24 bits.
//
// Structure (one code block at a time):
//  * input buffer: the K bits c_0..c_{K-1} from the CRC are written in order;
//  * turbo_qpp_lut gives f1, f2 for K, and turbo_qpp_index produces the
//    interleaved index Pi(i) with additions only;
//  * encoding: in cycle i the buffer is read twice, at i (normal stream) and at
//    Pi(i) (interleaved stream c'_i), and the two bits drive the upper and lower
//    rsc_encoder in parallel. Outputs d0 = x_i, d1 = z_i, d2 = z'_i;
//  * termination: both constituent encoders are flushed for three cycles with
//    their feedback as input, which yields x_K..x_{K+2}, z_K..z_{K+2} and the
//    primed tail bits of the lower encoder;
//  * tail multiplexer: four more output cycles send
//      d0: x_K,   z_{K+1}, x'_K,   z'_{K+1}
//      d1: z_K,   x_{K+2}, z'_K,   x'_{K+2}
//      d2: x_{K+1}, z_{K+2}, x'_{K+1}, z'_{K+2}
//    so each stream has D = K + 4 bits.
//
// Timing: after `start`, K cycles with `en` load the buffer. Encoding then runs
// without gaps: K data cycles, three flush cycles without output, and four tail
// cycles; `turbo_valid` marks the 3 x (K+4) output bits (one bit per stream per
// cycle) and `done` pulses with the last one. New input is not accepted until
// `done`. The document's figure of two cycles from input to output refers to its
// own streaming buffer; here the whole block is buffered first because Pi(i)
// may point at any bit of it. The buffer size KMAX is the largest NB-IoT K.
module turbo_encoder #(
  parameter int unsigned KMAX = 2560
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,        // one-cycle pulse: new code block
  input  logic [11:0] tbs,          // transport block size, K = tbs + 24
  input  logic        en,           // c_k valid
  input  logic        c_k,
  output logic        d0_k,
  output logic        d1_k,
  output logic        d2_k,
  output logic        turbo_valid,
  output logic        done,
  output logic        k_legal       // K is in the interleaver table
);
  import npusch_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_INIT, S_ENC, S_TERM, S_TAIL} state_e;
  state_e state;

  logic        buf_mem [KMAX];
  logic [11:0] k_len, wr_ptr, rd_ptr, pi;
  logic [11:0] f1, f2;
  logic        lut_valid;
  logic [1:0]  tcnt;
  logic [2:0]  tx, tz, txp, tzp;   // captured tail bits, index = flush cycle 0..2

  // upper/lower constituent encoder signals
  logic enc_clear, enc_en, enc_term;
  logic x1, z1, x2, z2;
  logic u_norm, u_int;

  turbo_qpp_lut u_lut (.k(k_len), .f1(f1), .f2(f2), .valid(lut_valid));

  turbo_qpp_index #(.W(12)) u_pi (
    .clk(clk), .rst(rst), .init(state == S_INIT), .k(k_len), .f1(f1), .f2(f2),
    .step(state == S_ENC), .pi(pi)
  );

  assign u_norm = buf_mem[rd_ptr];
  assign u_int  = buf_mem[pi];

  rsc_encoder u_enc_up (.clk(clk), .rst(rst), .clear(enc_clear), .en(enc_en),
                        .term(enc_term), .u(u_norm), .x(x1), .z(z1));
  rsc_encoder u_enc_lo (.clk(clk), .rst(rst), .clear(enc_clear), .en(enc_en),
                        .term(enc_term), .u(u_int), .x(x2), .z(z2));

  assign enc_clear = (state == S_INIT);
  assign enc_en    = (state == S_ENC) || (state == S_TERM);
  assign enc_term  = (state == S_TERM);
  assign k_legal   = lut_valid;

  always_ff @(posedge clk) begin
    if (en && state == S_LOAD) buf_mem[wr_ptr] <= c_k;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      k_len       <= '0;
      wr_ptr      <= '0;
      rd_ptr      <= '0;
      tcnt        <= '0;
      tx          <= '0;
      tz          <= '0;
      txp         <= '0;
      tzp         <= '0;
      d0_k        <= 1'b0;
      d1_k        <= 1'b0;
      d2_k        <= 1'b0;
      turbo_valid <= 1'b0;
      done        <= 1'b0;
    end else begin
      turbo_valid <= 1'b0;
      done        <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k_len  <= tbs + 12'(CRC_LEN);
          wr_ptr <= '0;
          state  <= S_LOAD;
        end
        S_LOAD: if (en) begin
          wr_ptr <= wr_ptr + 1'b1;
          if (wr_ptr + 1'b1 == k_len) state <= S_INIT;
        end
        S_INIT: begin
          rd_ptr <= '0;
          state  <= S_ENC;
        end
        S_ENC: begin
          d0_k        <= x1;
          d1_k        <= z1;
          d2_k        <= z2;
          turbo_valid <= 1'b1;
          rd_ptr      <= rd_ptr + 1'b1;
          if (rd_ptr + 1'b1 == k_len) begin
            tcnt  <= '0;
            state <= S_TERM;
          end
        end
        S_TERM: begin
          tx[tcnt]  <= x1;
          tz[tcnt]  <= z1;
          txp[tcnt] <= x2;
          tzp[tcnt] <= z2;
          tcnt      <= tcnt + 1'b1;
          if (tcnt == 2'd2) begin
            tcnt  <= '0;
            state <= S_TAIL;
          end
        end
        S_TAIL: begin
          turbo_valid <= 1'b1;
          tcnt        <= tcnt + 1'b1;
          unique case (tcnt)
            2'd0: begin d0_k <= tx[0];  d1_k <= tz[0];  d2_k <= tx[1];  end
            2'd1: begin d0_k <= tz[1];  d1_k <= tx[2];  d2_k <= tz[2];  end
            2'd2: begin d0_k <= txp[0]; d1_k <= tzp[0]; d2_k <= txp[1]; end
            default: begin d0_k <= tzp[1]; d1_k <= txp[2]; d2_k <= tzp[2]; end
          endcase
          if (tcnt == 2'd3) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
