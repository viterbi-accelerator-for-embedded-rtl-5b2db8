// Two-way multiplexer.
//
// Used for the accelerator's MUX1 (metric-table write data: DATA_IN or the
// newly computed entries), MUX2 (computational-unit metric operands: local
// metric table or DATA_IN) and for the In A / In B selector at the
// accelerator's input in the datapath. sel = 0 selects in0, sel = 1 in1.
// Combinational.
module vit_mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out
);

  always_comb out = sel ? in1 : in0;

endmodule
