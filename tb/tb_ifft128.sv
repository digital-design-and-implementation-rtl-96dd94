// tb_ifft128: self-checking testbench of ifft128. Random inputs, both sparse
// (the 12 NB-IoT bins used by the transmitter, +-8191) and dense (all 128
// bins, +-4095), are transformed and compared with a floating-point inverse
// DFT divided by 128. The output is truncated by a 7-bit shift after
// unscaled stages with Q1.14 twiddles, so up to 3 LSB of error is allowed.
// valid_out must be set on the 28th clock edge after the edge that takes `en`,
// `busy` must be high meanwhile and an `en` while busy must be ignored.
module tb_ifft128;
  import npusch_pkg::*;
  import npusch_ref_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  cplx14_t x [128], y [128];
  logic valid_out, busy;
  int checks = 0, failures = 0;

  ifft128 dut (.clk(clk), .rst(rst), .en(en), .x(x), .y(y), .valid_out(valid_out), .busy(busy));

  always #5 clk = ~clk;

  longint cyc = 0, t_en, t_val;
  always @(posedge clk) begin
    cyc++;
    if (en && !busy) t_en = cyc;
    if (valid_out) t_val = cyc;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit sparse, input bit poke);
    real ar [], ai [], er [], ei [];
    int bad;
    real worst;
    ar = new[128]; ai = new[128];
    for (int b = 0; b < 128; b++) begin
      int r, i;
      if (sparse) begin
        bit used;
        used = (b < 6) || (b >= 122);
        r = used ? int'($urandom % 16383) - 8191 : 0;
        i = used ? int'($urandom % 16383) - 8191 : 0;
      end else begin
        r = int'($urandom % 8191) - 4095;
        i = int'($urandom % 8191) - 4095;
      end
      x[b].re = s14_t'(r); x[b].im = s14_t'(i);
      ar[b] = real'(r); ai[b] = real'(i);
    end
    dft_real(ar, ai, 1, er, ei);
    @(negedge clk) en = 1;
    @(negedge clk) en = 0;
    if (poke) begin
      x[0].re = 14'sd1000;              // must be ignored: the IFFT is busy
      @(negedge clk) en = 1;
      @(negedge clk) en = 0;
    end
    while (!valid_out) @(negedge clk);
    @(negedge clk);
    bad = 0;
    worst = 0.0;
    for (int n = 0; n < 128; n++) begin
      real dr, di;
      dr = real'(y[n].re) - er[n] / 128.0;
      di = real'(y[n].im) - ei[n] / 128.0;
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > worst) worst = dr;
      if (di > worst) worst = di;
      if (dr > 3.0 || di > 3.0) bad++;
    end
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL sparse=%0d: %0d wrong samples, worst error %f", sparse, bad, worst);
    end
    checks++;
    if (t_val - t_en - 1 != 28) begin
      failures++;
      $display("FAIL latency %0d", t_val - t_en - 1);
    end
  endtask

  initial begin
    for (int b = 0; b < 128; b++) x[b] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int v = 0; v < 8; v++) run(v % 2, v == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
