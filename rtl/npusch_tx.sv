// npusch_tx: NB-IoT NPUSCH (format 1, 15 kHz subcarrier spacing) transmitter
// chain, from transport block bits to the time-domain samples of the SC-FDMA
// symbols of one resource unit.
//
//   transport block -> crc24a -> turbo_encoder -> rate_matcher
//     -> channel_interleaver -> scrambler -> modulator -> dft_input_buffer
//     -> dft12 -> dft_output_serializer -> rem -> ifft_input_assembler
//     -> ifft128 -> samples
//
// A transmission begins with a one-cycle `start`, which hands the
// configuration `cfg` to every block; the caller then streams the `cfg.tbs`
// transport block bits on `tb_bit` with `tb_en` (one per cycle, any gaps
// allowed). The coding blocks (CRC, turbo coding, rate matching, channel
// interleaving) each hold a whole block before passing it on. From the channel
// interleaver on, the stream uses valid/ready handshakes, so the scrambler's
// 1600-cycle warm-up, a busy DFT and a busy IFFT stall the stages before them.
// The resource element mapper collects the whole resource unit
// (N_symb = 7 symbols x N_slots slots, the DMRS symbol left empty) before the
// symbols are transformed one after another.
//
// Outputs: after each IFFT, `sym_valid` pulses and `samples` holds the 128
// time-domain samples (Q4.10) of SC-FDMA symbol `sym_index`; `done` pulses with
// the last symbol of the resource unit. `k_legal` is low when TBS + 24 is not
// a block size of the turbo interleaver table. `stage_done` carries the
// end-of-block pulses of the six bit-level stages, for progress monitoring.
//
// The chain carries one resource unit per transport block: G must equal the
// number of coded bits of one resource unit (NSC x 6 x N_slots x Q_m).
// Repetitions, multiple resource units, DMRS generation and the cyclic prefix
// are not part of it.
module npusch_tx
  import npusch_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  npusch_cfg_t cfg,
  input  logic        tb_en,
  input  logic        tb_bit,
  output cplx14_t     samples [128],
  output logic        sym_valid,
  output logic [6:0]  sym_index,
  output logic        done,
  output logic        k_legal,
  output logic [5:0]  stage_done     // {modulator, scrambler, interleaver, rate matcher, turbo, CRC}
);
  npusch_cfg_t cfg_q;
  ru_alloc_t   alloc;
  logic [11:0] e_len;

  always_ff @(posedge clk) begin
    if (rst)        cfg_q <= '0;
    else if (start) cfg_q <= cfg;
  end

  // configuration seen by the blocks in the cycle of `start`
  npusch_cfg_t cfg_now;
  assign cfg_now = start ? cfg : cfg_q;
  assign alloc   = isc_decode(cfg_now.i_sc);
  assign e_len   = rm_out_len(cfg_now.g, cfg_now.qm);

  // ---------------------------------------------------------------- CRC
  logic crc_bit, crc_valid, crc_done;
  crc24a #(.TBS_W(12)) u_crc (
    .clk(clk), .rst(rst), .start(start), .tbs(cfg_now.tbs),
    .en(tb_en), .data_in(tb_bit),
    .data_out(crc_bit), .valid_out(crc_valid), .done(crc_done)
  );

  // ---------------------------------------------------------------- turbo
  logic d0, d1, d2, turbo_valid, turbo_done;
  turbo_encoder u_turbo (
    .clk(clk), .rst(rst), .start(start), .tbs(cfg_now.tbs),
    .en(crc_valid), .c_k(crc_bit),
    .d0_k(d0), .d1_k(d1), .d2_k(d2), .turbo_valid(turbo_valid),
    .done(turbo_done), .k_legal(k_legal)
  );

  // ---------------------------------------------------------------- rate matching
  logic e_bit, rm_valid, rm_done;
  rate_matcher u_rm (
    .clk(clk), .rst(rst), .start(start), .tbs(cfg_now.tbs), .qm(cfg_now.qm),
    .g(cfg_now.g), .rv_idx(cfg_now.rv_idx),
    .en(turbo_valid), .d0_k(d0), .d1_k(d1), .d2_k(d2),
    .e_k(e_bit), .rm_valid(rm_valid), .done(rm_done)
  );

  // ---------------------------------------------------------------- channel interleaver
  logic ci_bit, ci_valid, ci_ready, ci_done;
  channel_interleaver u_ci (
    .clk(clk), .reset(rst), .start(start), .q_m(cfg_now.qm),
    .in_length(16'(e_len)), .n_slots(alloc.n_slots),
    .en(rm_valid), .data_in(e_bit),
    .data_out(ci_bit), .valid_out(ci_valid), .out_ready(ci_ready), .done(ci_done)
  );

  // ---------------------------------------------------------------- scrambler
  logic scr_bit, scr_valid, scr_ready, scr_done;
  scrambler u_scr (
    .clk(clk), .reset(rst), .start(start),
    .n_rnti(cfg_now.n_rnti), .n_f(cfg_now.n_f), .n_s(cfg_now.n_s),
    .n_id_ncell(cfg_now.n_id_ncell), .in_length(e_len),
    .en(ci_valid), .data_in(ci_bit), .in_ready(ci_ready),
    .data_out(scr_bit), .valid_out(scr_valid), .out_ready(scr_ready), .done(scr_done)
  );

  // ---------------------------------------------------------------- modulator
  s12_t mod_i, mod_q;
  logic mod_valid, mod_ready, mod_done;
  modulator u_mod (
    .clk(clk), .reset(rst), .start(start), .q_m(cfg_now.qm), .in_length(16'(e_len)),
    .en(scr_valid), .data_in(scr_bit), .in_ready(scr_ready),
    .i_out(mod_i), .q_out(mod_q), .valid_out(mod_valid), .out_ready(mod_ready),
    .done(mod_done)
  );

  // ---------------------------------------------------------------- DFT
  cplx12_t dft_x [12];
  cplx12_t dft_y [12];
  logic    buf_valid, buf_ready, dft_valid, dft_busy, ser_busy;
  dft_input_buffer u_dbuf (
    .clk(clk), .rst(rst), .start(start), .nsc(alloc.nsc),
    .en(mod_valid), .i_in(mod_i), .q_in(mod_q), .in_ready(mod_ready),
    .x(dft_x), .out_valid(buf_valid), .out_ready(buf_ready)
  );

  assign buf_ready = !dft_busy && !ser_busy;

  dft12 u_dft (
    .clk(clk), .rst(rst), .en(buf_valid && buf_ready), .nsc(alloc.nsc),
    .x(dft_x), .y(dft_y), .valid_out(dft_valid), .busy(dft_busy)
  );

  cplx12_t ser_out;
  logic    ser_valid, rem_in_ready;
  dft_output_serializer u_dser (
    .clk(clk), .rst(rst), .nsc(alloc.nsc), .load(dft_valid), .y(dft_y),
    .data_out(ser_out), .valid_out(ser_valid), .out_ready(rem_in_ready), .busy(ser_busy)
  );

  // ---------------------------------------------------------------- REM
  s12_t       rem_re, rem_im;
  logic [3:0] rem_sc;
  logic [6:0] rem_sym;
  logic       rem_valid, rem_ready, rem_done;
  rem u_rem (
    .clk(clk), .reset(rst), .start(start), .i_sc(cfg_now.i_sc), .n_symb(3'(N_SYMB_UL)),
    .dmrs_sym(cfg_now.dmrs_sym),
    .en(ser_valid), .data_in_real(ser_out.re), .data_in_im(ser_out.im), .in_ready(rem_in_ready),
    .data_out_real(rem_re), .data_out_im(rem_im), .dout_sc(rem_sc), .dout_sym(rem_sym),
    .valid_out(rem_valid), .out_ready(rem_ready), .done(rem_done)
  );

  // ---------------------------------------------------------------- IFFT
  cplx14_t    ifft_x [128];
  logic       ifft_en, ifft_busy, ifft_valid;
  logic [6:0] asm_sym, run_sym;
  ifft_input_assembler u_asm (
    .clk(clk), .rst(rst), .en(rem_valid), .din_re(rem_re), .din_im(rem_im),
    .din_sc(rem_sc), .din_sym(rem_sym), .in_ready(rem_ready),
    .x(ifft_x), .ifft_en(ifft_en), .ifft_busy(ifft_busy), .sym_out(asm_sym)
  );

  ifft128 u_ifft (
    .clk(clk), .rst(rst), .en(ifft_en), .x(ifft_x), .y(samples),
    .valid_out(ifft_valid), .busy(ifft_busy)
  );

  assign stage_done = {mod_done, scr_done, ci_done, rm_done, turbo_done, crc_done};

  // symbol bookkeeping and end of transmission
  logic       last_pending;
  logic [6:0] last_sym;
  assign last_sym = 7'(N_SYMB_UL * alloc.n_slots - 1);
  always_ff @(posedge clk) begin
    if (rst) begin
      run_sym      <= '0;
      sym_index    <= '0;
      sym_valid    <= 1'b0;
      done         <= 1'b0;
      last_pending <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      done      <= 1'b0;
      if (start) last_pending <= 1'b0;
      if (rem_done) last_pending <= 1'b1;
      if (ifft_en) run_sym <= asm_sym;
      if (ifft_valid) begin
        sym_valid <= 1'b1;
        sym_index <= run_sym;
        if (last_pending && run_sym == last_sym) begin
          done         <= 1'b1;
          last_pending <= 1'b0;
        end
      end
    end
  end
endmodule
