// Soft-decision branch metric (distance) unit.
//
// Compares the received soft symbol with one expected encoder output (an
// output-table entry) and returns their distance. Each received value is an
// unsigned SOFT_W-bit confidence level: 0 is a certain "0", 2**SOFT_W-1 a
// certain "1". For every code output i < n the unit adds r_i when the expected
// bit is 0 and (2**SOFT_W-1) - r_i when it is 1.
//
// This linear form is this design's choice for the Euclidean distance the
// accelerator is specified with: for antipodal expected points the squared
// Euclidean distances of all branches differ only by a common offset and a
// common positive scale from these sums, so the add-compare-select decisions
// are the same, while the adder tree stays small. With SOFT_W = 1 the result
// is the Hamming distance of hard-decision decoding.
//
// Interface: purely combinational. sym packs N_MAX values, value i in
// sym[i*SOFT_W +: SOFT_W]; code bit i is expected output i; n selects how many
// outputs take part (1..N_MAX).
module vit_distance #(
  parameter int unsigned SOFT_W = 2,
  parameter int unsigned N_MAX  = 4,
  parameter int unsigned DIST_W = $clog2(N_MAX * ((1 << SOFT_W) - 1) + 1)
) (
  input  logic [N_MAX*SOFT_W-1:0] sym,
  input  logic [N_MAX-1:0]        code,
  input  logic [2:0]              n,
  output logic [DIST_W-1:0]       bm
);

  localparam logic [SOFT_W-1:0] VMAX = '1;

  always_comb begin
    bm = '0;
    for (int unsigned i = 0; i < N_MAX; i++) begin
      logic [DIST_W-1:0] t;
      t = DIST_W'(sym[i*SOFT_W +: SOFT_W]);
      if (code[i]) t = DIST_W'(VMAX) - t;
      if (i < 32'(n)) bm = bm + t;
    end
  end

endmodule
