// tb_rate_matcher: self-checking testbench of rate_matcher. Random coded blocks
// (three D-bit streams, D = TBS + 28) are rate matched for all four redundancy
// versions, BPSK and QPSK, and output sizes from strong puncturing to more
// than one pass around the circular buffer (repetition). The output is
// compared with a model that builds the <NULL>-padded matrices, the
// permutations and the circular buffer literally. Includes the document's
// example TBS = 16, rv = 2, Q_m = 1, G = 24.
// Timing: the walk visits one buffer position per cycle, so the number of
// cycles from the last input bit to `done` must be (positions visited) + 1.
// Random input gaps are used on some blocks.
module tb_rate_matcher;
  import npusch_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, en = 0, i0 = 0, i1 = 0, i2 = 0;
  logic [11:0] tbs, g;
  logic [1:0] qm, rv;
  logic ek, vk, done;
  int checks = 0, failures = 0;

  rate_matcher dut (.clk(clk), .rst(rst), .start(start), .tbs(tbs), .qm(qm), .g(g),
                    .rv_idx(rv), .en(en), .d0_k(i0), .d1_k(i1), .d2_k(i2), .e_k(ek),
                    .rm_valid(vk), .done(done));

  always #5 clk = ~clk;

  longint cyc = 0, t_last, t_done;
  bitq_t got;
  always @(posedge clk) begin
    cyc++;
    if (en) t_last = cyc;
    if (done) t_done = cyc;
    if (vk) got.push_back(ek);
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int TBS, input int q, input int G, input int r, input bit gaps);
    bitq_t a0, a1, a2, e;
    int D, E, bad, walk;
    D = TBS + 28;
    E = q * (G / q);
    a0 = {}; a1 = {}; a2 = {};
    for (int i = 0; i < D; i++) begin
      a0.push_back(1'($urandom)); a1.push_back(1'($urandom)); a2.push_back(1'($urandom));
    end
    e = rm_ref(a0, a1, a2, E, r);
    walk = rm_walk;
    got = {};
    tbs = 12'(TBS); qm = 2'(q); g = 12'(G); rv = 2'(r);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < D; i++) begin
      if (gaps) while ($urandom % 3 == 0) @(negedge clk);
      en = 1; i0 = a0[i]; i1 = a1[i]; i2 = a2[i];
      @(negedge clk);
      en = 0;
    end
    while (!done) @(negedge clk);
    @(negedge clk);
    bad = 0;
    if (got.size() != E) bad = 1000000;
    else for (int i = 0; i < E; i++) if (got[i] != e[i]) bad++;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL TBS=%0d qm=%0d G=%0d rv=%0d: %0d mismatches, %0d bits", TBS, q, G, r,
               bad, got.size());
    end
    checks++;
    if (t_done - t_last != walk + 1) begin
      failures++;
      $display("FAIL TBS=%0d rv=%0d: %0d cycles after last input, expected %0d", TBS, r,
               t_done - t_last, walk + 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(16, 1, 24, 2, 0);                       // example of the document
    for (int r = 0; r < 4; r++) begin
      run(16, 1, 96, r, 0);
      run(88, 2, 288, r, 1);
      run(1000, 2, 288, r, 0);
      run(2536, 1, 96, r, 0);
      run(2536, 2, 4094, r, 0);
      run(104, 2, 2000, r, 0);                  // repetition past N_cb
      run(8 * ($urandom % 317), 1 + $urandom % 2, 1 + $urandom % 4095, r, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
