// Symbol buffer of the Viterbi accelerator.
//
// Holds the received soft-decision symbol that every distance unit compares
// with the output table while a metric column (full mode) or a run of
// single entries (sub-state mode) is computed. One symbol is N_MAX values of
// SOFT_W bits, value i in bits [i*SOFT_W +: SOFT_W]; a code with n < N_MAX
// outputs leaves the upper values unused.
//
// Interface: loaded from the low S bits of DATA_IN in the cycle we is high
// (one cycle per symbol, as in the accelerator's operation sequence); cleared
// by reset. The packing and the soft width are this design's choice.
module vit_symbol_buffer #(
  parameter int unsigned S = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [S-1:0] din,
  output logic [S-1:0] sym
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sym <= '0;
    else if (we) sym <= din;
  end

endmodule
