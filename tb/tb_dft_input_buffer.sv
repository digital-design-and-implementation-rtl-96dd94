// tb_dft_input_buffer: self-checking testbench of dft_input_buffer. Random
// symbols are fed for NSC = 1, 3, 6, 12 with random input gaps; each group of
// NSC symbols must appear in x[0..NSC-1] (x[NSC..11] zero) with out_valid, and
// the vector must be held with in_ready low while out_ready is withheld for a
// random number of cycles (stall cycles counted, must be non-zero).
module tb_dft_input_buffer;
  import npusch_pkg::*;

  logic clk = 0, rst = 1, start = 0, en = 0, ordy = 0;
  logic [3:0] nsc;
  s12_t ii, qq;
  logic in_ready, out_valid;
  cplx12_t x [12];
  int checks = 0, failures = 0, stalls = 0;

  dft_input_buffer dut (.clk(clk), .rst(rst), .start(start), .nsc(nsc), .en(en), .i_in(ii),
                        .q_in(qq), .in_ready(in_ready), .x(x), .out_valid(out_valid),
                        .out_ready(ordy));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic group(input int n);
    cplx12_t s [12];
    int bad, w;
    for (int i = 0; i < n; i++) begin
      s[i].re = s12_t'($urandom); s[i].im = s12_t'($urandom);
      while ($urandom % 3 == 0) @(negedge clk);
      en = 1; ii = s[i].re; qq = s[i].im;
      @(negedge clk);
      en = 0;
    end
    bad = 0;
    w = $urandom % 6;
    for (int c = 0; c < w; c++) begin
      if (!out_valid || in_ready) bad++;
      stalls++;
      @(negedge clk);
    end
    if (!out_valid) bad++;
    for (int k = 0; k < 12; k++)
      if (k < n ? (x[k] != s[k]) : (x[k] != '0)) bad++;
    ordy = 1;
    @(negedge clk);
    ordy = 0;
    if (out_valid || !in_ready) bad++;
    checks++;
    if (bad) begin failures++; $display("FAIL NSC=%0d: %0d errors", n, bad); end
  endtask

  initial begin
    ii = '0; qq = '0; nsc = 4'd12;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int m = 0; m < 4; m++) begin
      int n;
      n = (m == 0) ? 12 : (m == 1) ? 6 : (m == 2) ? 3 : 1;
      nsc = 4'(n);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int v = 0; v < 5; v++) group(n);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
