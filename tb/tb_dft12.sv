// tb_dft12: self-checking testbench of dft12. Random Q4.8 input vectors
// (modulation symbols +-181/256 and general values) are transformed for
// NSC = 12, 6, 3 and 1 and compared with a floating-point unscaled DFT,
// rounded and saturated to the 12-bit output (tolerance 2 LSB). Entries at or
// above NSC must be zero. valid_out must be set by the 16th, 5th, 1st and 1st
// clock edge after the edge that takes `en` for NSC = 12, 6, 3, 1, `busy` must be high meanwhile, and an `en`
// while busy must be ignored.
module tb_dft12;
  import npusch_pkg::*;
  import npusch_ref_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [3:0] nsc;
  cplx12_t x [12], y [12];
  logic valid_out, busy;
  int checks = 0, failures = 0;

  dft12 dut (.clk(clk), .rst(rst), .en(en), .nsc(nsc), .x(x), .y(y), .valid_out(valid_out),
             .busy(busy));

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

  function automatic real sat(real v);
    real r;
    r = (v >= 0.0) ? real'(longint'(v + 0.5)) : -real'(longint'(-v + 0.5));
    if (r > 2047.0) r = 2047.0;
    if (r < -2048.0) r = -2048.0;
    return r;
  endfunction

  task automatic run(input int n, input bit qpsk, input bit poke);
    real ar [], ai [], er [], ei [];
    int bad, lat;
    ar = new[n]; ai = new[n];
    for (int i = 0; i < 12; i++) begin
      if (qpsk) begin
        x[i].re = ($urandom % 2) ? s12_t'(181) : -s12_t'(181);
        x[i].im = ($urandom % 2) ? s12_t'(181) : -s12_t'(181);
      end else begin
        x[i].re = s12_t'(int'($urandom % 512) - 256);
        x[i].im = s12_t'(int'($urandom % 512) - 256);
      end
      if (i < n) begin ar[i] = real'(x[i].re); ai[i] = real'(x[i].im); end
    end
    dft_real(ar, ai, 0, er, ei);
    nsc = 4'(n);
    @(negedge clk) en = 1;
    @(negedge clk) en = 0;
    if (poke && n > 3) begin
      cplx12_t keep;
      keep = x[0];
      x[0].re = 12'sd100;               // must be ignored: DFT is busy
      en = 1;
      @(negedge clk) en = 0;
      x[0] = keep;
    end
    while (!valid_out) @(negedge clk);
    @(negedge clk);
    lat = int'(t_val - t_en) - 1;   // both sampled at edges; valid is set on edge t_en + lat
    bad = 0;
    for (int k = 0; k < 12; k++) begin
      if (k < n) begin
        real dr, di;
        dr = real'(y[k].re) - sat(er[k]);
        di = real'(y[k].im) - sat(ei[k]);
        if (dr > 2.0 || dr < -2.0 || di > 2.0 || di < -2.0) begin
          bad++;
          $display("  k=%0d got (%0d,%0d) expected (%f,%f)", k, y[k].re, y[k].im, er[k], ei[k]);
        end
      end else if (y[k].re != 0 || y[k].im != 0) bad++;
    end
    checks++;
    if (bad) begin failures++; $display("FAIL NSC=%0d: %0d wrong outputs", n, bad); end
    checks++;
    if (lat != ((n == 12) ? 16 : (n == 6) ? 5 : 1)) begin
      failures++;
      $display("FAIL NSC=%0d: valid_out %0d cycles after en", n, lat);
    end
  endtask

  initial begin
    for (int i = 0; i < 12; i++) x[i] = '0;
    nsc = 4'd12;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int v = 0; v < 10; v++) begin
      run(12, v % 2, v == 3);
      run(6, v % 2, v == 4);
      run(3, v % 2, 0);
      run(1, v % 2, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
