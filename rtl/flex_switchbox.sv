// Datapath interconnect switchbox.
//
// One switchbox sits in front of each datapath unit input and routes one of
// the datapath unit outputs to it. The selecting address comes straight from
// the instruction's interconnect control field and is ceil(log2(N_IN)) bits
// wide. The baseline datapath has nine unit outputs on every switchbox (four
// address bits); integrating the Viterbi accelerator adds one input to the
// register-file and load/store switchboxes, which still fits in four bits.
// An address beyond the last input selects zero (this design's choice).
// Combinational.
module flex_switchbox #(
  parameter int unsigned N_IN = 9,
  parameter int unsigned W    = 32,
  parameter int unsigned SEL_W = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic [W-1:0]     in [N_IN],
  input  logic [SEL_W-1:0] sel,
  output logic [W-1:0]     out
);

  always_comb begin
    out = '0;
    for (int unsigned i = 0; i < N_IN; i++)
      if (32'(sel) == i) out = in[i];
  end

endmodule
