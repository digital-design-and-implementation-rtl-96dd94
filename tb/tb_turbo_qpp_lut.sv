// tb_turbo_qpp_lut: self-checking testbench of turbo_qpp_lut. Every K from 0
// to 4095 is applied. For each K the table reports as valid, the pair (f1, f2)
// must make Pi(i) = (f1 i + f2 i^2) mod K a permutation of 0..K-1; K must be a
// multiple of 8 in 40..2560 (largest NB-IoT code block is 2536 + 24); the
// number of valid rows must be 132 (the 3GPP rows up to K = 2560). Several rows
// are compared with the published values, and K = 2560 must be present.
module tb_turbo_qpp_lut;
  logic [11:0] k, f1, f2;
  logic valid;
  int checks = 0, failures = 0;

  turbo_qpp_lut dut (.k(k), .f1(f1), .f2(f2), .valid(valid));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_row(input int kk, input int ef1, input int ef2);
    k = 12'(kk);
    #1;
    checks++;
    if (!valid || f1 != 12'(ef1) || f2 != 12'(ef2)) begin
      failures++;
      $display("FAIL K=%0d: valid=%0d f1=%0d f2=%0d, expected %0d %0d", kk, valid, f1, f2, ef1, ef2);
    end
  endtask

  initial begin
    int nvalid;
    bit seen [];
    nvalid = 0;
    for (int kk = 0; kk < 4096; kk++) begin
      k = 12'(kk);
      #1;
      if (valid) begin
        bit bad;
        nvalid++;
        checks++;
        bad = (kk % 8 != 0) || kk < 40 || kk > 2560;
        seen = new[kk];
        for (int i = 0; i < kk; i++) seen[i] = 0;
        for (longint i = 0; i < kk; i++) begin
          int p;
          p = int'((longint'(f1) * i + longint'(f2) * i * i) % kk);
          if (seen[p]) bad = 1;
          seen[p] = 1;
        end
        if (bad) begin
          failures++;
          $display("FAIL K=%0d: f1=%0d f2=%0d is not a permutation", kk, f1, f2);
        end
      end
    end
    checks++;
    if (nvalid != 132) begin
      failures++;
      $display("FAIL %0d valid rows, expected 132", nvalid);
    end
    expect_row(40, 3, 10);
    expect_row(48, 7, 12);
    expect_row(64, 7, 16);
    expect_row(128, 15, 32);
    expect_row(512, 31, 64);
    expect_row(1024, 31, 64);
    expect_row(2048, 31, 64);
    expect_row(2560, 39, 80);
    k = 12'd41;
    #1;
    checks++;
    if (valid) begin failures++; $display("FAIL K=41 reported valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
