// tb_turbo_encoder: self-checking testbench of turbo_encoder.
//  * The worked example of the document (K = 40, f1 = 3, f2 = 10): the 40
//    input bits and the expected 44-bit streams d0, d1, d2 are taken from it.
//  * Random code blocks for several K (up to 2560 = 2536 + 24) compared with a
//    bit-level turbo model; the (f1, f2) rows used by the model are written
//    here independently of the RTL table.
//  * Cycle counts: the first output is registered on the second clock edge
//    after the edge that takes the last input bit (an INIT cycle, then the
//    first encoding cycle), and
//    from the first output to `done` there are K + 7 cycles (K data outputs,
//    3 flush cycles without output, 4 tail outputs).
module tb_turbo_encoder;
  import npusch_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, en = 0, ck = 0;
  logic [11:0] tbs;
  logic d0, d1, d2, tv, done, k_legal;
  int checks = 0, failures = 0;

  turbo_encoder dut (.clk(clk), .rst(rst), .start(start), .tbs(tbs), .en(en), .c_k(ck),
                     .d0_k(d0), .d1_k(d1), .d2_k(d2), .turbo_valid(tv), .done(done),
                     .k_legal(k_legal));

  always #5 clk = ~clk;

  // all timing is sampled in one process at the rising edge
  longint cyc = 0;
  bitq_t g0, g1, g2;
  longint t_first, t_last, t_done;
  always @(posedge clk) begin
    cyc++;
    if (en) t_last = cyc;
    if (done) t_done = cyc;
    if (tv) begin
      if (g0.size() == 0) t_first = cyc;
      g0.push_back(d0); g1.push_back(d1); g2.push_back(d2);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cmp(bitq_t a, bitq_t b);
    int bad;
    bad = 0;
    if (a.size() != b.size()) return 1000000;
    for (int i = 0; i < a.size(); i++) if (a[i] != b[i]) bad++;
    return bad;
  endfunction

  function automatic bitq_t str2q(string s);
    bitq_t q;
    q = {};
    for (int i = 0; i < s.len(); i++) q.push_back(s[i] == "1");
    return q;
  endfunction

  task automatic run(input bitq_t c, input bitq_t e0, input bitq_t e1, input bitq_t e2,
                     input bit gaps);
    int K, bad;
    K = c.size();
    g0 = {}; g1 = {}; g2 = {};
    tbs = 12'(K - 24);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < K; i++) begin
      if (gaps) while ($urandom % 3 == 0) @(negedge clk);
      en = 1; ck = c[i];
      @(negedge clk);
      en = 0;
    end
    while (!done) @(negedge clk);
    @(negedge clk);
    bad = cmp(g0, e0) + cmp(g1, e1) + cmp(g2, e2);
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL K=%0d: %0d mismatches (got %0d bits)", K, bad, g0.size());
    end
    checks++;
    if (t_first - t_last != 3 || t_done - t_first + 1 != K + 7 || !k_legal) begin
      failures++;
      $display("FAIL K=%0d timing: first-last=%0d done-first+1=%0d legal=%0d", K,
               t_first - t_last, t_done - t_first + 1, k_legal);
    end
  endtask

  task automatic run_rand(input int K, input int f1, input int f2, input bit gaps);
    bitq_t c, e0, e1, e2;
    c = {};
    for (int i = 0; i < K; i++) c.push_back(1'($urandom));
    turbo_ref(c, f1, f2, e0, e1, e2);
    run(c, e0, e1, e2, gaps);
  endtask

  initial begin
    bitq_t p0, p1, p2, c;
    repeat (3) @(negedge clk);
    rst = 0;
    // worked example of the document, K = 40
    p0 = str2q("10010010111001001011100100101110010010111111");
    p1 = str2q("11101111110000101000001001000101010110101111");
    p2 = str2q("10101010100100111101011000010000010011110101");
    c = p0[0:39];
    run(c, p0, p1, p2, 0);
    run_rand(40, 3, 10, 1);
    run_rand(64, 7, 16, 0);
    run_rand(128, 15, 32, 0);
    run_rand(512, 31, 64, 1);
    run_rand(1024, 31, 64, 0);
    run_rand(2048, 31, 64, 0);
    run_rand(2560, 39, 80, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
