// tb_modulator: self-checking testbench of modulator. Random bit streams are
// mapped in BPSK and QPSK mode with random input gaps and random `out_ready`
// back-pressure; every symbol must equal the document's constellation tables
// with amplitude 181/256 (BPSK 0 -> +,+ and 1 -> -,-; QPSK first bit -> sign
// of I, second bit -> sign of Q), the number of symbols must be L / Q_m, and
// `done` must come with the last one. Stall cycles are counted and must occur.
module tb_modulator;
  import npusch_pkg::*;
  import npusch_ref_pkg::*;

  logic clk = 0, reset = 1, start = 0, en = 0, din = 0, rdy = 1;
  logic [1:0] qm;
  logic [15:0] len;
  logic in_ready, vout, done;
  s12_t iq, qq;
  int checks = 0, failures = 0, stalls = 0, dones = 0;
  bit bp = 0;

  modulator dut (.clk(clk), .reset(reset), .start(start), .q_m(qm), .in_length(len), .en(en),
                 .data_in(din), .in_ready(in_ready), .i_out(iq), .q_out(qq), .valid_out(vout),
                 .out_ready(rdy), .done(done));

  always #5 clk = ~clk;

  s12_t gi [$], gq [$];
  always @(posedge clk) begin
    if (vout && rdy) begin gi.push_back(iq); gq.push_back(qq); end
    if (vout && !rdy) stalls++;
    if (done) dones++;
  end
  always @(negedge clk) rdy <= bp ? 1'($urandom % 2) : 1'b1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int q, input int L, input bit backp);
    bitq_t a;
    int bad, ns, d0;
    s12_t ei, eq;
    a = {};
    for (int i = 0; i < L; i++) a.push_back(1'($urandom));
    gi = {}; gq = {};
    bp = backp;
    qm = 2'(q); len = 16'(L);
    d0 = dones;
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
    ns = L / q;
    while (gi.size() < ns) @(negedge clk);
    repeat (3) @(negedge clk);
    bad = 0;
    if (gi.size() != ns) bad = 1000000;
    else for (int s = 0; s < ns; s++) begin
      if (q == 1) begin
        ei = a[s] ? -s12_t'(181) : s12_t'(181);
        eq = ei;
      end else begin
        ei = a[2 * s] ? -s12_t'(181) : s12_t'(181);
        eq = a[2 * s + 1] ? -s12_t'(181) : s12_t'(181);
      end
      if (gi[s] != ei || gq[s] != eq) bad++;
    end
    checks++;
    if (bad || dones != d0 + 1) begin
      failures++;
      $display("FAIL qm=%0d L=%0d: %0d mismatches, %0d done pulses", q, L, bad, dones - d0);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    run(1, 96, 0);
    run(2, 192, 0);
    run(1, 144, 1);
    run(2, 288, 1);
    for (int v = 0; v < 6; v++) run(1 + v % 2, 2 * (1 + $urandom % 200), v % 2);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL back-pressure never happened"); end
    $display("back-pressure cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
