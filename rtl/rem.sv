// rem: resource element mapper for one NPUSCH resource unit (15 kHz spacing).
//
// The DFT output values arrive serially, NSC per SC-FDMA symbol, and are placed
// on the resource grid of the resource unit, 12 subcarriers (rows k) by
// N_symb * N_slots SC-FDMA symbols (columns l), in increasing order of k and
// then l, skipping in every slot the symbol `dmrs_sym` that carries the
// demodulation reference signal. The allocation comes from the subcarrier
// indication field I_sc (0-11: one subcarrier I_sc, 16 slots; 12-15: three
// subcarriers from 3(I_sc-12), 8 slots; 16-17: six from 6(I_sc-16), 4 slots;
// 18: all twelve, 2 slots).
//
// Storage is two memories (real and imaginary parts) of 12 x 112 words, the
// largest grid (7 symbols x 16 slots), addressed 12 l + k. Only allocated data
// elements are written; on read-out every other element (unallocated
// subcarrier or DMRS symbol) is returned as zero, which is the same as filling
// the rest of the grid with zeros but needs no clearing pass.
//
// Timing: `start` latches I_sc, N_symb and the DMRS position; one value is
// accepted per cycle with `en` until the grid is full (`in_ready` then falls).
// The grid is then read out column by column, k = 0..11 in each column, one
// element per cycle with a valid/ready handshake (`out_ready` lets the IFFT
// stall it), with its subcarrier `dout_sc` and symbol `dout_sym` indices.
// `done` pulses when the last element is taken. The DMRS values themselves
// are not generated here.
module rem
  import npusch_pkg::*;
#(
  parameter int unsigned MAX_COLS = 112     // 7 symbols x 16 slots
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  input  logic [5:0] i_sc,
  input  logic [2:0] n_symb,
  input  logic [2:0] dmrs_sym,
  input  logic       en,
  input  s12_t       data_in_real,
  input  s12_t       data_in_im,
  output logic       in_ready,
  output s12_t       data_out_real,
  output s12_t       data_out_im,
  output logic [3:0] dout_sc,
  output logic [6:0] dout_sym,
  output logic       valid_out,
  input  logic       out_ready,
  output logic       done
);
  localparam int unsigned DEPTH = 12 * MAX_COLS;
  localparam int unsigned AW    = $clog2(DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_OUT} state_e;
  state_e state;

  s12_t mem_re [DEPTH];
  s12_t mem_im [DEPTH];

  ru_alloc_t   alloc;
  assign alloc = isc_decode(i_sc);
  logic [3:0]  nsc, sc0;
  logic [2:0]  nsym, dmrs;
  logic [6:0]  n_cols;
  // fill pointers
  logic [3:0]  f_k;        // index within the allocated subcarriers
  logic [6:0]  f_l;
  logic [2:0]  f_ls;       // symbol within slot
  // read pointers
  logic [3:0]  r_k;
  logic [6:0]  r_l;
  logic [2:0]  r_ls;
  logic        last_out;

  logic [AW-1:0] wr_addr, rd_addr;
  assign wr_addr = AW'(f_l) * AW'(12) + AW'(sc0) + AW'(f_k);
  assign rd_addr = AW'(r_l) * AW'(12) + AW'(r_k);

  assign in_ready = (state == S_FILL);

  always_ff @(posedge clk) begin
    if (en && state == S_FILL) begin
      mem_re[wr_addr] <= data_in_real;
      mem_im[wr_addr] <= data_in_im;
    end
  end

  logic rd_data_elem;
  assign rd_data_elem = (r_k >= sc0) && (r_k < sc0 + nsc) && (r_ls != dmrs);

  always_ff @(posedge clk) begin
    if (reset) begin
      state         <= S_IDLE;
      nsc           <= 4'd1;
      sc0           <= '0;
      nsym          <= 3'd7;
      dmrs          <= 3'd3;
      n_cols        <= '0;
      f_k           <= '0;
      f_l           <= '0;
      f_ls          <= '0;
      r_k           <= '0;
      r_l           <= '0;
      r_ls          <= '0;
      last_out      <= 1'b0;
      data_out_real <= '0;
      data_out_im   <= '0;
      dout_sc       <= '0;
      dout_sym      <= '0;
      valid_out     <= 1'b0;
      done          <= 1'b0;
    end else begin
      done <= 1'b0;
      if (valid_out && out_ready) begin
        valid_out <= 1'b0;
        if (last_out) begin
          last_out <= 1'b0;
          done     <= 1'b1;
        end
      end
      unique case (state)
        S_IDLE: if (start) begin
          nsc    <= alloc.nsc;
          sc0    <= alloc.sc_start;
          nsym   <= n_symb;
          dmrs   <= dmrs_sym;
          n_cols <= 7'(n_symb * alloc.n_slots);
          f_k    <= '0;
          f_l    <= (dmrs_sym == 3'd0) ? 7'd1 : 7'd0;
          f_ls   <= (dmrs_sym == 3'd0) ? 3'd1 : 3'd0;
          state  <= S_FILL;
        end
        S_FILL: if (en) begin
          if (f_k + 1'b1 == nsc) begin
            // next data symbol: skip the DMRS symbol of the slot
            logic [6:0] nl;
            logic [2:0] nls;
            f_k <= '0;
            nl  = f_l + 1'b1;
            nls = (f_ls + 1'b1 == nsym) ? 3'd0 : f_ls + 1'b1;
            if (nls == dmrs) begin
              nl  = nl + 1'b1;
              nls = (nls + 1'b1 == nsym) ? 3'd0 : nls + 1'b1;
            end
            f_l  <= nl;
            f_ls <= nls;
            if (nl >= n_cols) begin
              r_k   <= '0;
              r_l   <= '0;
              r_ls  <= '0;
              state <= S_OUT;
            end
          end else begin
            f_k <= f_k + 1'b1;
          end
        end
        S_OUT: if (!valid_out || out_ready) begin
          data_out_real <= rd_data_elem ? mem_re[rd_addr] : '0;
          data_out_im   <= rd_data_elem ? mem_im[rd_addr] : '0;
          dout_sc       <= r_k;
          dout_sym      <= r_l;
          valid_out     <= 1'b1;
          if (r_k == 4'd11) begin
            r_k  <= '0;
            r_l  <= r_l + 1'b1;
            r_ls <= (r_ls + 1'b1 == nsym) ? 3'd0 : r_ls + 1'b1;
            if (r_l + 1'b1 == n_cols) begin
              last_out <= 1'b1;
              state    <= S_IDLE;
            end
          end else begin
            r_k <= r_k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
