// tb_crc24a: self-checking testbench of crc24a. Random transport blocks of
// several sizes (16 and 2536 included) are sent; the output must be the block
// itself followed by the 24 parity bits of a long-division CRC24A reference.
// The cycle count from the first input bit to the last parity bit must be
// A + 25 when the input has no gaps; one block is sent with random gaps.
module tb_crc24a;
  import npusch_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, en = 0, din = 0;
  logic [11:0] tbs;
  logic dout, vout, done;
  int checks = 0, failures = 0;

  crc24a dut (.clk(clk), .rst(rst), .start(start), .tbs(tbs), .en(en), .data_in(din),
              .data_out(dout), .valid_out(vout), .done(done));

  always #5 clk = ~clk;

  bitq_t got;
  always @(posedge clk) if (vout) got.push_back(dout);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int A, input bit gaps);
    bitq_t a;
    logic [23:0] p;
    longint t0, t1;
    a = {};
    for (int i = 0; i < A; i++) a.push_back(1'($urandom));
    got = {};
    tbs = 12'(A);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = $time / 10;
    for (int i = 0; i < A; i++) begin
      if (gaps) while ($urandom % 3 == 0) @(negedge clk);
      en = 1; din = a[i];
      @(negedge clk);
      en = 0;
    end
    while (!done) @(posedge clk);
    t1 = $time / 10;
    @(negedge clk);
    p = crc24a_ref(a);
    checks++;
    if (got.size() != A + 24) begin
      failures++;
      $display("FAIL A=%0d: %0d output bits", A, got.size());
    end else begin
      int bad = 0;
      for (int i = 0; i < A; i++) if (got[i] != a[i]) bad++;
      for (int j = 0; j < 24; j++) if (got[A + j] != p[23 - j]) bad++;
      if (bad) begin failures++; $display("FAIL A=%0d: %0d wrong bits", A, bad); end
    end
    if (!gaps) begin
      checks++;
      if (t1 - t0 + 1 != A + 25) begin
        failures++;
        $display("FAIL A=%0d: %0d cycles, expected %0d", A, t1 - t0 + 1, A + 25);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(16, 0);
    run(2536, 0);
    for (int v = 0; v < 8; v++) run(16 + 8 * ($urandom % 300), 0);
    run(120, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
