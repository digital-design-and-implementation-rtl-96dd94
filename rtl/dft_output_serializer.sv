// dft_output_serializer: parallel-to-serial converter between the DFT and the
// resource element mapper. When the DFT signals a result (`load`), the first
// NSC of its 12 outputs are captured and then sent one per cycle, y[0] first,
// on `data_out`/`valid_out` whenever the mapper is ready (`out_ready`). `busy`
// is high from the load until the last value has been taken, and the next
// DFT is held off meanwhile.
module dft_output_serializer
  import npusch_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] nsc,
  input  logic       load,
  input  cplx12_t    y [12],
  output cplx12_t    data_out,
  output logic       valid_out,
  input  logic       out_ready,
  output logic       busy
);
  cplx12_t    hold [12];
  logic [3:0] idx, n;

  assign busy      = valid_out;
  assign data_out  = hold[idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      n         <= 4'd1;
      valid_out <= 1'b0;
      for (int i = 0; i < 12; i++) hold[i] <= '0;
    end else if (load && !valid_out) begin
      hold      <= y;
      n         <= nsc;
      idx       <= '0;
      valid_out <= 1'b1;
    end else if (valid_out && out_ready) begin
      if (idx + 1'b1 == n) begin
        valid_out <= 1'b0;
        idx       <= '0;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
