// tb_ifft_input_assembler: self-checking testbench of ifft_input_assembler.
// Twelve random subcarrier values per symbol are sent; the IFFT input vector
// must hold subcarrier k at bin (k - 6) mod 128 scaled from Q4.8 to Q4.10
// (times 4), every other bin zero, and ifft_en must pulse once per symbol. A
// simulated busy IFFT holds ifft_en and in_ready low (stall cycles counted,
// must be non-zero). sym_out must give the symbol index.
module tb_ifft_input_assembler;
  import npusch_pkg::*;

  logic clk = 0, rst = 1, en = 0, ibusy = 0;
  s12_t dre, dim;
  logic [3:0] dsc;
  logic [6:0] dsym, sym_out;
  logic in_ready, ifft_en;
  cplx14_t x [128];
  int checks = 0, failures = 0, stalls = 0;

  ifft_input_assembler dut (.clk(clk), .rst(rst), .en(en), .din_re(dre), .din_im(dim),
                            .din_sc(dsc), .din_sym(dsym), .in_ready(in_ready), .x(x),
                            .ifft_en(ifft_en), .ifft_busy(ibusy), .sym_out(sym_out));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dre = '0; dim = '0; dsc = '0; dsym = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int s = 0; s < 20; s++) begin
      int vr [12], vi [12];
      int bad, w;
      bad = 0;
      for (int k = 0; k < 12; k++) begin
        vr[k] = int'($urandom % 4096) - 2048;
        vi[k] = int'($urandom % 4096) - 2048;
        while (!in_ready) @(negedge clk);
        en = 1; dre = s12_t'(vr[k]); dim = s12_t'(vi[k]); dsc = 4'(k); dsym = 7'(s);
        @(negedge clk);
        en = 0;
      end
      w = (s % 2) ? 1 + $urandom % 5 : 0;
      ibusy = (w != 0);
      for (int c = 0; c < w; c++) begin
        #1;
        if (ifft_en || in_ready) begin bad++; $display("  stall cycle %0d: en=%0d rdy=%0d", c, ifft_en, in_ready); end
        stalls++;
        @(negedge clk);
      end
      ibusy = 0;
      #1;
      if (!ifft_en || sym_out != 7'(s)) begin bad++; $display("  release: en=%0d sym=%0d", ifft_en, sym_out); end
      for (int b = 0; b < 128; b++) begin
        int k, er, ei;
        k = (b >= 122) ? b - 122 : (b < 6) ? b + 6 : -1;
        er = (k >= 0) ? 4 * vr[k] : 0;
        ei = (k >= 0) ? 4 * vi[k] : 0;
        if (int'(x[b].re) != er || int'(x[b].im) != ei) bad++;
      end
      @(negedge clk);
      if (ifft_en || !in_ready) begin bad++; $display("  after: en=%0d rdy=%0d", ifft_en, in_ready); end
      checks++;
      if (bad) begin failures++; $display("FAIL symbol %0d: %0d errors", s, bad); end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
