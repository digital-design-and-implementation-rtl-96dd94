// tb_rem: self-checking testbench of rem (resource element mapper). For every
// kind of I_sc (single subcarrier 0..11, three, six and twelve subcarriers)
// and several DMRS positions, random values are written with random gaps
// and the whole grid is read back under random out_ready back-pressure. The
// read-out must walk the 12 x (7 N_slots) grid column by column with the right
// subcarrier/symbol indices; allocated data elements must hold the input values
// in increasing subcarrier then symbol order, skipping the DMRS symbol of each
// slot, and every other element must be zero. The number of accepted inputs
// must be NSC x 6 x N_slots (in_ready falls after that).
module tb_rem;
  import npusch_pkg::*;

  logic clk = 0, reset = 1, start = 0, en = 0, ordy = 1;
  logic [5:0] isc;
  logic [2:0] nsymb, dmrs;
  s12_t dre, dim, ore, oim;
  logic in_ready, vout, done;
  logic [3:0] osc;
  logic [6:0] osym;
  int checks = 0, failures = 0, stalls = 0;
  bit bp = 0;

  rem dut (.clk(clk), .reset(reset), .start(start), .i_sc(isc), .n_symb(nsymb),
           .dmrs_sym(dmrs), .en(en), .data_in_real(dre), .data_in_im(dim),
           .in_ready(in_ready), .data_out_real(ore), .data_out_im(oim), .dout_sc(osc),
           .dout_sym(osym), .valid_out(vout), .out_ready(ordy), .done(done));

  always #5 clk = ~clk;

  typedef struct { int re, im, sc, sym; } elem_t;
  elem_t got [$];
  int dones = 0;
  always @(posedge clk) begin
    if (vout && ordy) got.push_back('{int'(ore), int'(oim), int'(osc), int'(osym)});
    if (vout && !ordy) stalls++;
    if (done) dones++;
  end
  always @(negedge clk) ordy <= bp ? 1'($urandom % 2) : 1'b1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int i_sc, input int dm, input bit backp);
    int n, k0, ns, cols, ndata, bad, idx, d0;
    int gr [12][112], gi [12][112];
    if (i_sc < 12) begin n = 1; k0 = i_sc; ns = 16; end
    else if (i_sc < 16) begin n = 3; k0 = 3 * (i_sc - 12); ns = 8; end
    else if (i_sc < 18) begin n = 6; k0 = 6 * (i_sc - 16); ns = 4; end
    else begin n = 12; k0 = 0; ns = 2; end
    cols = 7 * ns;
    ndata = n * 6 * ns;
    for (int k = 0; k < 12; k++) for (int l = 0; l < 112; l++) begin gr[k][l] = 0; gi[k][l] = 0; end
    got = {};
    bp = backp;
    d0 = dones;
    isc = 6'(i_sc); nsymb = 3'd7; dmrs = 3'(dm);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    idx = 0;
    for (int l = 0; l < cols; l++) begin
      if (l % 7 == dm) continue;
      for (int k = k0; k < k0 + n; k++) begin
        gr[k][l] = int'($urandom % 4096) - 2048;
        gi[k][l] = int'($urandom % 4096) - 2048;
        while ($urandom % 4 == 0) @(negedge clk);
        en = 1; dre = s12_t'(gr[k][l]); dim = s12_t'(gi[k][l]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        en = 0;
        idx++;
      end
    end
    bad = 0;
    repeat (2) @(negedge clk);
    if (in_ready) bad++;                 // grid full, no more input taken
    while (dones == d0) @(negedge clk);
    repeat (2) @(negedge clk);
    if (got.size() != 12 * cols) bad += 1000;
    else
      for (int i = 0; i < 12 * cols; i++) begin
        int k, l;
        k = i % 12; l = i / 12;
        if (got[i].sc != k || got[i].sym != l || got[i].re != gr[k][l] || got[i].im != gi[k][l])
          bad++;
      end
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL I_sc=%0d dmrs=%0d: %0d errors (%0d inputs, %0d outputs)", i_sc, dm, bad,
               idx, got.size());
    end
  endtask

  initial begin
    dre = '0; dim = '0; isc = '0; nsymb = 3'd7; dmrs = 3'd3;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int i = 0; i <= 18; i++) run(i, 3, i % 2);
    run(18, 0, 0);
    run(16, 6, 1);
    run(5, 0, 0);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no back-pressure exercised"); end
    $display("back-pressure cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
