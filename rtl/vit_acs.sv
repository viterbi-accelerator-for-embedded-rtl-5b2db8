// Add-compare-select unit.
//
// A new path metric is the smaller of the two candidate sums
// pm0 + bm0 and pm1 + bm1, where pm0/pm1 are the metrics of the two
// predecessor states and bm0/bm1 the branch metrics of the transitions from
// them. dec tells which branch survived (0: the first, 1: the second); ties
// keep the first.
//
// Metrics are B-bit unsigned values that are allowed to wrap around. The
// comparison takes the sign of the B-bit difference, so the result stays
// correct as long as the spread of all metrics in a column is below
// 2**(B-1). This modulo normalisation is this design's choice: the accelerator
// keeps only one metric column and has no step that rescales it.
//
// Purely combinational.
module vit_acs #(
  parameter int unsigned B      = 8,
  parameter int unsigned DIST_W = 5
) (
  input  logic [B-1:0]      pm0,
  input  logic [B-1:0]      pm1,
  input  logic [DIST_W-1:0] bm0,
  input  logic [DIST_W-1:0] bm1,
  output logic [B-1:0]      pm_new,
  output logic              dec
);

  logic [B-1:0] sum0, sum1, diff;

  always_comb begin
    sum0   = pm0 + B'(bm0);
    sum1   = pm1 + B'(bm1);
    diff   = sum1 - sum0;
    dec    = diff[B-1];  // sum1 < sum0 (modulo 2**B)
    pm_new = dec ? sum1 : sum0;
  end

endmodule
