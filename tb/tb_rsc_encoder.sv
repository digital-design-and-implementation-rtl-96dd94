// tb_rsc_encoder: self-checking testbench of rsc_encoder. Random input
// sequences (with random cycles where `en` is low) are encoded and followed by
// three termination cycles; the systematic/parity outputs and the tail bits
// must equal a bit-level model of g0 = 1 + D^2 + D^3, g1 = 1 + D + D^3, and the
// state must be back at zero after the tail (checked by encoding a zero input,
// whose parity must then be zero). `clear` between blocks is exercised.
module tb_rsc_encoder;
  import npusch_ref_pkg::*;

  logic clk = 0, rst = 1, clear = 0, en = 0, term = 0, u = 0;
  logic x, z;
  int checks = 0, failures = 0;

  rsc_encoder dut (.clk(clk), .rst(rst), .clear(clear), .en(en), .term(term), .u(u),
                   .x(x), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    bitq_t in, zr, xt, zt;
    int bad;
    bad = 0;
    in = {};
    for (int i = 0; i < n; i++) in.push_back(1'($urandom));
    rsc_ref(in, zr, xt, zt);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int i = 0; i < n; i++) begin
      while ($urandom % 5 == 0) @(negedge clk);
      u = in[i]; en = 1;
      #1;
      if (x !== in[i] || z !== zr[i]) bad++;
      @(negedge clk);
      en = 0;
    end
    for (int t = 0; t < 3; t++) begin
      term = 1; en = 1; u = 1'($urandom);
      #1;
      if (x !== xt[t] || z !== zt[t]) bad++;
      @(negedge clk);
    end
    term = 0; u = 0;
    #1;
    if (z !== 1'b0) bad++;       // state flushed to zero
    en = 0;
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL n=%0d: %0d mismatches", n, bad);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int v = 0; v < 20; v++) run(1 + $urandom % 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
