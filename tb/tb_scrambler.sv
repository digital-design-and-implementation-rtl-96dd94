// tb_scrambler: self-checking testbench of scrambler. For random n_RNTI, n_f,
// n_s and N_ID^Ncell the scrambled output must equal the input XOR a gold
// sequence model (x1, x2 generated bit by bit from their definitions, first
// 1600 values dropped). in_ready must stay low for exactly the 1600 warm-up
// cycles after `start`. Random input gaps and random `out_ready`
// back-pressure are applied; both must be seen (stall cycles counted).
module tb_scrambler;
  import npusch_ref_pkg::*;

  logic clk = 0, reset = 1, start = 0, en = 0, din = 0, rdy = 1;
  logic [15:0] rnti, nid;
  logic [9:0] nf, ns;
  logic [11:0] len;
  logic in_ready, dout, vout, done;
  int checks = 0, failures = 0, stalls = 0;
  bit bp = 0;

  scrambler dut (.clk(clk), .reset(reset), .start(start), .n_rnti(rnti), .n_f(nf), .n_s(ns),
                 .n_id_ncell(nid), .in_length(len), .en(en), .data_in(din),
                 .in_ready(in_ready), .data_out(dout), .valid_out(vout), .out_ready(rdy),
                 .done(done));

  always #5 clk = ~clk;

  longint cyc = 0, t_start, t_ready;
  bitq_t got;
  bit waiting = 0;
  always @(posedge clk) begin
    cyc++;
    if (start) begin t_start = cyc; waiting = 1; end
    if (waiting && in_ready) begin t_ready = cyc; waiting = 0; end
    if (vout && rdy) got.push_back(dout);
    if (vout && !rdy) stalls++;
  end
  always @(negedge clk) rdy <= bp ? 1'($urandom % 2) : 1'b1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int L, input bit backp);
    bitq_t a, c;
    int bad, ci;
    a = {};
    for (int i = 0; i < L; i++) a.push_back(1'($urandom));
    rnti = 16'($urandom); nf = 10'($urandom % 1024); ns = 10'($urandom % 20);
    nid = 16'($urandom % 504);
    ci = c_init_ref(int'(rnti), int'(nf), int'(ns), int'(nid));
    c = gold_ref(ci, L);
    len = 12'(L);
    bp = backp;
    got = {};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < L; i++) begin
      if (backp) while ($urandom % 4 == 0) @(negedge clk);
      en = 1; din = a[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      en = 0;
    end
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    bad = 0;
    if (got.size() != L) bad = 1000000;
    else for (int i = 0; i < L; i++) if (got[i] != (a[i] ^ c[i])) bad++;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL L=%0d cinit=%0d: %0d mismatches", L, ci, bad);
    end
    checks++;
    if (t_ready - t_start != 1601) begin
      failures++;
      $display("FAIL warm-up: in_ready %0d cycles after start", t_ready - t_start);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    run(96, 0);
    run(288, 1);
    run(4032, 0);
    run(2564, 0);                      // codeword length used in the document's tests
    for (int v = 0; v < 6; v++) run(1 + $urandom % 600, v % 2);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL back-pressure never happened"); end
    $display("back-pressure cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
