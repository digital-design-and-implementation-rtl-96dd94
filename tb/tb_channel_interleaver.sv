// tb_channel_interleaver: self-checking testbench of channel_interleaver.
// Random codewords are written for every resource-unit shape (N_slots = 16, 8,
// 4, 2, i.e. C_mux = 96, 48, 24, 12 columns), BPSK and QPSK, and one, two or
// more matrix rows, including the largest H the register file holds. The output
// must equal a model that writes Q_m-bit symbols row by row and reads them
// column by column. Half of the codewords are read with a randomly toggling
// `out_ready`; the number of cycles the output was stalled is counted and must
// be non-zero. Without back-pressure the last output follows the last input by
// H cycles (one bit per cycle).
module tb_channel_interleaver;
  import npusch_ref_pkg::*;

  logic clk = 0, reset = 1, start = 0, en = 0, din = 0, rdy = 1;
  logic [1:0] qm;
  logic [15:0] len;
  logic [4:0] ns;
  logic dout, vout, done;
  int checks = 0, failures = 0, stalls = 0;
  bit bp = 0;

  channel_interleaver dut (.clk(clk), .reset(reset), .start(start), .q_m(qm), .in_length(len),
                           .n_slots(ns), .en(en), .data_in(din), .data_out(dout),
                           .valid_out(vout), .out_ready(rdy), .done(done));

  always #5 clk = ~clk;

  longint cyc = 0, t_last, t_done;
  bitq_t got;
  always @(posedge clk) begin
    cyc++;
    if (en) t_last = cyc;
    if (done) t_done = cyc;
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

  task automatic run(input int q, input int nslots, input int rows, input bit backp);
    bitq_t e, h;
    int H, bad;
    H = q * 6 * nslots * rows;
    e = {};
    for (int i = 0; i < H; i++) e.push_back(1'($urandom));
    h = ci_ref(e, q, nslots);
    got = {};
    bp = backp;
    qm = 2'(q); len = 16'(H); ns = 5'(nslots);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < H; i++) begin
      en = 1; din = e[i];
      @(negedge clk);
      en = 0;
    end
    while (got.size() < H) @(negedge clk);
    repeat (3) @(negedge clk);
    bad = 0;
    if (got.size() != H) bad = 1000000;
    else for (int i = 0; i < H; i++) if (got[i] != h[i]) bad++;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL qm=%0d nslots=%0d rows=%0d: %0d mismatches", q, nslots, rows, bad);
    end
    if (!backp) begin
      checks++;
      if (t_done - t_last != H + 1) begin
        failures++;
        $display("FAIL H=%0d: done %0d cycles after last input", H, t_done - t_last);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    for (int q = 1; q <= 2; q++) begin
      run(q, 16, 1, 0);
      run(q, 8, 2, 1);
      run(q, 4, 3, 0);
      run(q, 2, 12, 1);
      run(q, 2, 1, 0);
    end
    run(2, 16, 21, 0);                 // H = 4032
    run(1, 16, 42, 1);                 // H = 4032
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL back-pressure never happened"); end
    $display("back-pressure cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
