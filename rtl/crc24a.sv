// crc24a: CRC attachment for the NPUSCH transport block.
//
// The transport block a_0..a_{A-1} (A = tbs) enters serially, one bit per
// cycle while `en` is high. Each bit is forwarded to `data_out` one cycle
// later and at the same time folded into a 24-bit linear feedback shift
// register built from the generator
//   g_CRC24A(D) = D^24+D^23+D^18+D^17+D^14+D^11+D^10+D^7+D^6+D^5+D^4+D^3+D+1,
// initialised to zero. After the A-th bit the register holds the parity
// p_0..p_23 (p_0 in bit 23), which is shifted out on the next 24 cycles, so
// the output is b_0..b_{A+23} with b_k = a_k for k < A and b_k = p_{k-A} after.
//
// The register is the direct ("pre-multiplied") form: the feedback is the
// input bit XOR the register MSB, so no 24 trailing zeros have to be fed and
// the whole operation takes A + 25 cycles from the first input bit to the last
// parity bit (one register stage of latency). The polynomial, zero
// initialisation and output order follow the 3GPP definition; the `start`
// pulse that latches the block size and clears the register, and the `done`
// pulse, are this design's own framing. `en` is ignored while parity bits are
// being shifted out, so the source must send exactly `tbs` bits per block.
module crc24a #(
  parameter int unsigned TBS_W = 12
) (
  input  logic             clk,
  input  logic             rst,        // synchronous, active high
  input  logic             start,      // one-cycle pulse: new transport block
  input  logic [TBS_W-1:0] tbs,        // transport block size A (latched on start)
  input  logic             en,         // data_in is valid
  input  logic             data_in,
  output logic             data_out,
  output logic             valid_out,
  output logic             done        // one-cycle pulse with the last parity bit
);
  localparam logic [23:0] POLY = 24'h864CFB;  // coefficients D^23..D^0

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_PARITY} state_e;
  state_e           state;
  logic [23:0]      crc;
  logic [TBS_W-1:0] len, cnt;
  logic [4:0]       pcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      crc       <= '0;
      len       <= '0;
      cnt       <= '0;
      pcnt      <= '0;
      data_out  <= 1'b0;
      valid_out <= 1'b0;
      done      <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          len   <= tbs;
          cnt   <= '0;
          crc   <= '0;
          state <= (tbs == '0) ? S_PARITY : S_DATA;
          pcnt  <= '0;
        end
        S_DATA: if (en) begin
          data_out  <= data_in;
          valid_out <= 1'b1;
          crc       <= {crc[22:0], 1'b0} ^ ((data_in ^ crc[23]) ? POLY : 24'h0);
          cnt       <= cnt + 1'b1;
          if (cnt + 1'b1 == len) state <= S_PARITY;
        end
        S_PARITY: begin
          data_out  <= crc[23];
          valid_out <= 1'b1;
          crc       <= {crc[22:0], 1'b0};
          pcnt      <= pcnt + 1'b1;
          if (pcnt == 5'd23) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
