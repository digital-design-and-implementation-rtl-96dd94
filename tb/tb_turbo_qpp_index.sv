// tb_turbo_qpp_index: self-checking testbench of turbo_qpp_index. For a set of
// (K, f1, f2) rows the generator is initialised and stepped K times (with
// random idle cycles between steps); every index must equal the direct formula
// Pi(i) = (f1 i + f2 i^2) mod K. A second init must restart from Pi(0) = 0.
module tb_turbo_qpp_index;
  logic clk = 0, rst = 1, init = 0, step = 0;
  logic [11:0] k, f1, f2, pi;
  int checks = 0, failures = 0;

  turbo_qpp_index #(.W(12)) dut (.clk(clk), .rst(rst), .init(init), .k(k), .f1(f1),
                                 .f2(f2), .step(step), .pi(pi));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int kk, input int ff1, input int ff2, input bit gaps);
    int bad;
    bad = 0;
    k = 12'(kk); f1 = 12'(ff1); f2 = 12'(ff2);
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    for (longint i = 0; i < kk; i++) begin
      if (pi != 12'((ff1 * i + ff2 * i * i) % kk)) bad++;
      if (gaps) while ($urandom % 4 == 0) @(negedge clk);
      step = 1;
      @(negedge clk);
      step = 0;
    end
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL K=%0d: %0d wrong indices", kk, bad);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(40, 3, 10, 0);
    run(40, 3, 10, 1);
    run(64, 7, 16, 0);
    run(400, 151, 40, 1);
    run(848, 239, 106, 0);
    run(1536, 71, 48, 0);
    run(2432, 265, 456, 0);
    run(2560, 39, 80, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
