// rate_matcher: rate matching of the turbo coded NPUSCH code block: three
// sub-block interleavers, bit collection into the virtual circular buffer, and
// bit selection with pruning of dummy (<NULL>) bits.
//
// Control (computed at `start` from TBS, Q_m, G and rv_idx):
//   D  = TBS + 28            bits per turbo output stream (K + 4)
//   R  = ceil(D / 32)        rows of each 32-column interleaver matrix
//   ND = 32R - D             dummy bits, all in row 0
//   K_PI = 32R, N_cb = K_w = 3 K_PI
//   k0 = R (2 ceil(N_cb / 8R) rv + 2) = R (24 rv + 2)
//   E  = Q_m floor(G / Q_m)  (one layer, one code block)
//
// Sub-block memories: each stream i has a K_PI-bit memory holding y_k with
// y_{ND+k} = d_k^(i), written row by row, so the row/column address of y is
// simply {row, column}. Dummy positions are never written; a read position is
// <NULL> exactly when its address is below ND. Reading the interleaved output
// v_k^(i) needs no stored permutation: for streams 0 and 1, v at column index
// c and row r is y[{r, P(c)}]; for stream 2 it is y[({r, P(c)} + 1) mod K_PI].
//
// Bit selection walks the circular buffer w = v0, then v1/v2 interlaced, from
// k0 and wraps at N_cb, one candidate per cycle; <NULL> candidates are skipped
// and the others are sent as e_k until E bits have gone out. The walk is kept
// as (region, column c, row r, stream) counters, so no multiply or modulo is
// needed. Every k0 lands on row 0: column 2 and 26 of v0 for rv = 0, 1,
// column 9 and 21 of the v1/v2 region for rv = 2, 3.
//
// Timing: `start`, then D cycles with `en` load the three streams in parallel;
// the output phase follows at once, one candidate bit per cycle; `rm_valid`
// marks the E output bits and `done` pulses with the last. Storing the whole
// block before reading (instead of the partial circular buffer of the document's
// implementation) is this design's choice; the output sequence is the same.
module rate_matcher #(
  parameter int unsigned RMAX = 81          // ceil((2560 + 4) / 32)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [11:0] tbs,
  input  logic [1:0]  qm,
  input  logic [11:0] g,
  input  logic [1:0]  rv_idx,
  input  logic        en,
  input  logic        d0_k,
  input  logic        d1_k,
  input  logic        d2_k,
  output logic        e_k,
  output logic        rm_valid,
  output logic        done
);
  import npusch_pkg::*;

  localparam int unsigned KPI_MAX = 32 * RMAX;
  localparam int unsigned AW      = $clog2(KPI_MAX + 1);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_OUT} state_e;
  state_e state;

  logic mem0 [KPI_MAX];
  logic mem1 [KPI_MAX];
  logic mem2 [KPI_MAX];

  logic [AW-1:0] d_len, n_rows, n_dummy, k_pi, wr_addr, wr_cnt;
  logic [11:0]   e_len, e_cnt;

  // circular buffer walk
  logic          region;      // 0: v0 part, 1: interlaced v1/v2 part
  logic          strm2;       // in region 1: 0 = v1, 1 = v2
  logic [4:0]    col;
  logic [AW-1:0] row;

  logic [AW-1:0] d_next, r_next;
  always_comb begin
    d_next = AW'(tbs) + AW'(CRC_LEN + TAIL_LEN);
    r_next = (d_next + AW'(31)) >> 5;
  end

  // read address and <NULL> test for the current candidate
  logic [AW-1:0] a01, a2;
  logic          cand_bit, cand_null;
  always_comb begin
    a01 = AW'({row, 5'b0}) | AW'(sbi_perm(col));
    a2  = (a01 + 1'b1 == k_pi) ? '0 : a01 + 1'b1;
    if (!region) begin
      cand_bit  = mem0[a01];
      cand_null = (a01 < n_dummy);
    end else if (!strm2) begin
      cand_bit  = mem1[a01];
      cand_null = (a01 < n_dummy);
    end else begin
      cand_bit  = mem2[a2];
      cand_null = (a2 < n_dummy);
    end
  end

  always_ff @(posedge clk) begin
    if (en && state == S_LOAD) begin
      mem0[wr_addr] <= d0_k;
      mem1[wr_addr] <= d1_k;
      mem2[wr_addr] <= d2_k;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      d_len    <= '0;
      n_rows   <= '0;
      n_dummy  <= '0;
      k_pi     <= '0;
      wr_addr  <= '0;
      wr_cnt   <= '0;
      e_len    <= '0;
      e_cnt    <= '0;
      region   <= 1'b0;
      strm2    <= 1'b0;
      col      <= '0;
      row      <= '0;
      e_k      <= 1'b0;
      rm_valid <= 1'b0;
      done     <= 1'b0;
    end else begin
      rm_valid <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          d_len   <= d_next;
          n_rows  <= r_next;
          k_pi    <= r_next << 5;
          n_dummy <= (r_next << 5) - d_next;
          wr_addr <= (r_next << 5) - d_next;
          wr_cnt  <= '0;
          e_len   <= rm_out_len(g, qm);
          e_cnt   <= '0;
          row     <= '0;
          strm2   <= 1'b0;
          unique case (rv_idx)
            2'd0: begin region <= 1'b0; col <= 5'd2;  end
            2'd1: begin region <= 1'b0; col <= 5'd26; end
            2'd2: begin region <= 1'b1; col <= 5'd9;  end
            default: begin region <= 1'b1; col <= 5'd21; end
          endcase
          state   <= S_LOAD;
        end
        S_LOAD: if (en) begin
          wr_addr <= wr_addr + 1'b1;
          wr_cnt  <= wr_cnt + 1'b1;
          if (wr_cnt + 1'b1 == d_len) state <= (e_len == '0) ? S_IDLE : S_OUT;
        end
        S_OUT: begin
          if (!cand_null) begin
            e_k      <= cand_bit;
            rm_valid <= 1'b1;
            e_cnt    <= e_cnt + 1'b1;
            if (e_cnt + 1'b1 == e_len) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end
          // advance the circular buffer position
          if (region && !strm2) begin
            strm2 <= 1'b1;
          end else begin
            strm2 <= 1'b0;
            if (row + 1'b1 == n_rows) begin
              row <= '0;
              col <= col + 1'b1;
              if (col == 5'd31) region <= ~region;
            end else begin
              row <= row + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
