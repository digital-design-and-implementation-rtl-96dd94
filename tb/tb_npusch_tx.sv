// tb_npusch_tx: end-to-end self-checking testbench of the npusch_tx top level
// at its default (full-size) parameters: transport blocks up to 2536 bits,
// every resource-unit shape (1, 3, 6, 12 subcarriers), BPSK and QPSK and all
// four redundancy versions.
//
// For each transmission a reference chain built from the behavioural models
// (CRC24A long division, turbo code with literal QPP formula, rate matching
// with explicit <NULL> matrices, channel interleaver, gold-sequence
// scrambler, constellation mapping, floating-point DFT with the 12-bit output
// saturation, resource grid, floating-point 128-point IDFT / 128) is computed.
// Checks:
//  * the bits entering the modulator equal the reference scrambled codeword
//    exactly (probed inside the top);
//  * all 7 N_slots SC-FDMA symbols come out once, in order, with `done` on the
//    last, and every one of the 128 samples of every symbol is within 6 LSB
//    (Q4.10) of the reference;
//  * k_legal is high, and each of the six stage_done pulses comes exactly once.
// Mechanisms counted over the whole run; each must happen at least once,
// otherwise it is counted as a failure: scrambler warm-up stall of the channel
// interleaver, DFT-busy stall of the modulator path, IFFT-busy stall of the
// mapper, <NULL> bits skipped by the rate matcher, repetition past N_cb,
// BPSK and QPSK runs, each NSC, each redundancy version, gaps on the input.
module tb_npusch_tx;
  import npusch_pkg::*;
  import npusch_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, tb_en = 0, tb_bit = 0;
  npusch_cfg_t cfg;
  cplx14_t samples [128];
  logic sym_valid, done, k_legal;
  logic [6:0] sym_index;
  logic [5:0] stage_done;
  int n_stage [6] = '{0, 0, 0, 0, 0, 0};
  int checks = 0, failures = 0;

  npusch_tx dut (.clk(clk), .rst(rst), .start(start), .cfg(cfg), .tb_en(tb_en), .tb_bit(tb_bit),
                 .samples(samples), .sym_valid(sym_valid), .sym_index(sym_index), .done(done),
                 .k_legal(k_legal), .stage_done(stage_done));

  always #5 clk = ~clk;

  // mechanism counters
  int n_scr_stall = 0, n_dft_stall = 0, n_ifft_stall = 0, n_null_skip = 0, n_repeat = 0;
  int n_bpsk = 0, n_qpsk = 0, n_rv [4] = '{0, 0, 0, 0}, n_nsc [4] = '{0, 0, 0, 0};
  int n_gaps = 0;
  bit in_rm_out = 0;

  // streams observed inside the top
  bitq_t mod_in;
  cplx14_t sym_got [112][128];
  int sym_order [$];
  int n_done = 0;

  always @(posedge clk) begin
    if (dut.ci_valid && !dut.ci_ready && dut.u_scr.state == 2'd1) n_scr_stall++;   // S_WARM
    if (dut.buf_valid && !dut.buf_ready) n_dft_stall++;
    if (dut.rem_valid && !dut.rem_ready) n_ifft_stall++;
    if (dut.rm_valid) in_rm_out = 1;
    if (dut.rm_done) in_rm_out = 0;
    else if (in_rm_out && !dut.rm_valid) n_null_skip++;
    if (dut.scr_valid && dut.scr_ready) mod_in.push_back(dut.scr_bit);
    if (sym_valid) begin
      sym_order.push_back(int'(sym_index));
      for (int n = 0; n < 128; n++) sym_got[sym_index][n] = samples[n];
    end
    if (done) n_done++;
    for (int i = 0; i < 6; i++) if (stage_done[i]) n_stage[i]++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sat12(real v);
    real r;
    r = v * 256.0;
    r = (r >= 0.0) ? real'(longint'(r + 0.5)) : -real'(longint'(-r + 0.5));
    if (r > 2047.0) r = 2047.0;
    if (r < -2048.0) r = -2048.0;
    return r / 256.0;
  endfunction

  task automatic run(input int tbs, input int f1, input int f2, input int qm, input int i_sc,
                     input int rv, input bit gaps);
    bitq_t a, c, d0, d1, d2, e, h, cs, s;
    logic [23:0] p;
    int n, k0, ns, G, bad, K, ncols, nd0;
    int st0 [6];
    real gr [12][112], gi [12][112];
    real max_err;
    if (i_sc < 12) begin n = 1; k0 = i_sc; ns = 16; end
    else if (i_sc < 16) begin n = 3; k0 = 3 * (i_sc - 12); ns = 8; end
    else if (i_sc < 18) begin n = 6; k0 = 6 * (i_sc - 16); ns = 4; end
    else begin n = 12; k0 = 0; ns = 2; end
    G = n * 6 * ns * qm;
    ncols = 7 * ns;
    K = tbs + 24;

    // ---------------- reference chain
    a = {};
    for (int i = 0; i < tbs; i++) a.push_back(1'($urandom));
    p = crc24a_ref(a);
    c = a;
    for (int j = 0; j < 24; j++) c.push_back(p[23 - j]);
    turbo_ref(c, f1, f2, d0, d1, d2);
    e = rm_ref(d0, d1, d2, G, rv);
    if (G > 3 * 32 * ((K + 4 + 31) / 32)) n_repeat++;
    h = ci_ref(e, qm, ns);
    cfg = '0;
    cfg.tbs = 12'(tbs); cfg.qm = 2'(qm); cfg.g = 12'(G); cfg.rv_idx = 2'(rv);
    cfg.i_sc = 6'(i_sc); cfg.dmrs_sym = 3'd3;
    cfg.n_rnti = 16'($urandom); cfg.n_f = 10'($urandom % 1024); cfg.n_s = 10'($urandom % 20);
    cfg.n_id_ncell = 16'($urandom % 504);
    cs = gold_ref(c_init_ref(int'(cfg.n_rnti), int'(cfg.n_f), int'(cfg.n_s),
                             int'(cfg.n_id_ncell)), G);
    s = {};
    for (int i = 0; i < G; i++) s.push_back(h[i] ^ cs[i]);
    // modulation, DFT per symbol, resource grid
    for (int k = 0; k < 12; k++) for (int l = 0; l < 112; l++) begin gr[k][l] = 0.0; gi[k][l] = 0.0; end
    begin
      int si, l;
      si = 0;
      l = 0;
      for (int q = 0; q < 6 * ns; q++) begin
        real xr [], xi [], yr [], yi [];
        if (l % 7 == 3) l++;
        xr = new[n]; xi = new[n];
        for (int m = 0; m < n; m++) begin
          if (qm == 1) begin
            xr[m] = s[si] ? -181.0 / 256.0 : 181.0 / 256.0;
            xi[m] = xr[m];
            si++;
          end else begin
            xr[m] = s[si] ? -181.0 / 256.0 : 181.0 / 256.0;
            xi[m] = s[si + 1] ? -181.0 / 256.0 : 181.0 / 256.0;
            si += 2;
          end
        end
        dft_real(xr, xi, 0, yr, yi);
        for (int m = 0; m < n; m++) begin
          gr[k0 + m][l] = sat12(yr[m]);
          gi[k0 + m][l] = sat12(yi[m]);
        end
        l++;
      end
    end

    // ---------------- drive the DUT
    mod_in = {};
    sym_order = {};
    nd0 = n_done;
    st0 = n_stage;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < tbs; i++) begin
      if (gaps) while ($urandom % 4 == 0) begin n_gaps++; @(negedge clk); end
      tb_en = 1; tb_bit = a[i];
      @(negedge clk);
      tb_en = 0;
    end
    while (n_done == nd0) @(negedge clk);
    repeat (3) @(negedge clk);

    // ---------------- checks
    checks++;
    if (!k_legal) begin failures++; $display("FAIL TBS=%0d: k_legal low", tbs); end
    bad = 0;
    if (mod_in.size() != G) bad = 1000000;
    else for (int i = 0; i < G; i++) if (mod_in[i] != s[i]) bad++;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL TBS=%0d qm=%0d isc=%0d rv=%0d: %0d wrong scrambled bits (%0d of %0d)", tbs,
               qm, i_sc, rv, bad, mod_in.size(), G);
    end
    bad = 0;
    if (sym_order.size() != ncols) bad = 1;
    else for (int l = 0; l < ncols; l++) if (sym_order[l] != l) bad = 1;
    checks++;
    if (bad || n_done != nd0 + 1) begin
      failures++;
      $display("FAIL TBS=%0d: %0d symbols out, %0d done pulses", tbs, sym_order.size(),
               n_done - nd0);
    end
    bad = 0;
    for (int i = 0; i < 6; i++) if (n_stage[i] != st0[i] + 1) bad++;
    checks++;
    if (bad) begin failures++; $display("FAIL TBS=%0d: stage done pulses wrong", tbs); end
    bad = 0;
    max_err = 0.0;
    for (int l = 0; l < ncols; l++) begin
      real xr [], xi [], yr [], yi [];
      xr = new[128]; xi = new[128];
      for (int b = 0; b < 128; b++) begin xr[b] = 0.0; xi[b] = 0.0; end
      for (int k = 0; k < 12; k++) begin
        xr[(k + 122) % 128] = gr[k][l];
        xi[(k + 122) % 128] = gi[k][l];
      end
      dft_real(xr, xi, 1, yr, yi);
      for (int t = 0; t < 128; t++) begin
        real dr, di;
        dr = real'(sym_got[l][t].re) - yr[t] / 128.0 * 1024.0;
        di = real'(sym_got[l][t].im) - yi[t] / 128.0 * 1024.0;
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > max_err) max_err = dr;
        if (di > max_err) max_err = di;
        if (dr > 6.0 || di > 6.0) bad++;
      end
    end
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL TBS=%0d qm=%0d isc=%0d: %0d samples off, worst %f LSB", tbs, qm, i_sc,
               bad, max_err);
    end
    $display("run TBS=%0d qm=%0d NSC=%0d rv=%0d: %0d symbols, worst sample error %0.2f LSB",
             tbs, qm, n, rv, sym_order.size(), max_err);
    if (qm == 1) n_bpsk++; else n_qpsk++;
    n_rv[rv]++;
    n_nsc[(n == 1) ? 0 : (n == 3) ? 1 : (n == 6) ? 2 : 3]++;
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    cfg = '0;
    for (int l = 0; l < 112; l++) for (int t = 0; t < 128; t++) sym_got[l][t] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    //   TBS   f1   f2  Qm  I_sc rv gaps
    run(16,    3,  10, 2, 18, 0, 0);
    run(16,    3,  10, 1, 5,  2, 1);
    run(40,    7,  16, 2, 13, 1, 0);
    run(104,  15,  32, 1, 17, 3, 1);
    run(2536, 39,  80, 2, 18, 0, 0);
    run(1000, 31,  64, 1, 0,  1, 0);
    run(488,  31,  64, 2, 16, 2, 1);
    run(2024, 31,  64, 2, 15, 3, 0);
    run(2536, 39,  80, 1, 11, 2, 0);
    need("scrambler warm-up stall", n_scr_stall);
    need("DFT busy stall", n_dft_stall);
    need("IFFT busy stall", n_ifft_stall);
    need("rate matcher <NULL> skip", n_null_skip);
    need("repetition past N_cb", n_repeat);
    need("BPSK transmissions", n_bpsk);
    need("QPSK transmissions", n_qpsk);
    for (int r = 0; r < 4; r++) need($sformatf("redundancy version %0d", r), n_rv[r]);
    need("NSC = 1", n_nsc[0]);
    need("NSC = 3", n_nsc[1]);
    need("NSC = 6", n_nsc[2]);
    need("NSC = 12", n_nsc[3]);
    need("input gaps", n_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
