// tb_dft_output_serializer: self-checking testbench of dft_output_serializer.
// A random 12-entry result is loaded for NSC = 12, 6, 3, 1; the first NSC
// entries must come out in order, one per accepted cycle, under random
// out_ready back-pressure (stall cycles counted, must be non-zero); `busy`
// must be high until the last one is taken, and a `load` while busy must be
// ignored.
module tb_dft_output_serializer;
  import npusch_pkg::*;

  logic clk = 0, rst = 1, load = 0, ordy = 0;
  logic [3:0] nsc;
  cplx12_t y [12];
  cplx12_t dout;
  logic vout, busy;
  int checks = 0, failures = 0, stalls = 0;

  dft_output_serializer dut (.clk(clk), .rst(rst), .nsc(nsc), .load(load), .y(y),
                             .data_out(dout), .valid_out(vout), .out_ready(ordy), .busy(busy));

  always #5 clk = ~clk;

  cplx12_t got [$];
  always @(posedge clk) begin
    if (vout && ordy) got.push_back(dout);
    if (vout && !ordy) stalls++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    cplx12_t s [12];
    int bad;
    for (int k = 0; k < 12; k++) begin
      s[k].re = s12_t'($urandom); s[k].im = s12_t'($urandom);
      y[k] = s[k];
    end
    nsc = 4'(n);
    got = {};
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    bad = busy ? 0 : 1;
    for (int k = 0; k < 12; k++) y[k] = '{re: s12_t'($urandom), im: s12_t'($urandom)};
    load = 1;                                   // ignored while busy
    @(negedge clk) load = 0;
    while (busy) begin
      ordy = 1'($urandom % 2);
      @(negedge clk);
    end
    ordy = 0;
    if (got.size() != n) bad += 100;
    else for (int k = 0; k < n; k++) if (got[k] != s[k]) bad++;
    checks++;
    if (bad) begin failures++; $display("FAIL NSC=%0d: %0d errors", n, bad); end
  endtask

  initial begin
    for (int k = 0; k < 12; k++) y[k] = '0;
    nsc = 4'd12;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int v = 0; v < 5; v++) begin
      run(12); run(6); run(3); run(1);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
