// Computational unit of the Viterbi accelerator.
//
// P identical lanes, each with two distance units and one add-compare-select
// unit, so that P new path metrics are produced per cycle. Lane i compares
// the received symbol with its two output-table entries (the two branches
// into its new state), adds the resulting branch metrics to the two
// predecessor path metrics and keeps the smaller sum.
//
// Interface (combinational):
//   pm_pairs  2*B*P bits: lane i's predecessor metrics at [2*B*i +: 2*B],
//             first predecessor in the low half; comes through MUX2 from
//             the local metric table or directly from DATA_IN.
//   codes     2*N_MAX*P bits: lane i's two output-table entries at
//             [2*N_MAX*i +: 2*N_MAX], first branch low.
//   new_pm    P*B bits: lane i's new metric at [B*i +: B], the word that
//             DATA_OUT carries.
//   dec       lane i's surviving branch (0 = first predecessor).
// Four lanes of two distance units and one ACS follow the document; the lane
// count is the parameter P.
module vit_comp_unit #(
  parameter int unsigned P      = 4,
  parameter int unsigned B      = 8,
  parameter int unsigned SOFT_W = 2,
  parameter int unsigned N_MAX  = 4
) (
  input  logic [N_MAX*SOFT_W-1:0] sym,
  input  logic [2:0]              n,
  input  logic [2*B*P-1:0]        pm_pairs,
  input  logic [2*N_MAX*P-1:0]    codes,
  output logic [P*B-1:0]          new_pm,
  output logic [P-1:0]            dec
);

  localparam int unsigned DIST_W = $clog2(N_MAX * ((1 << SOFT_W) - 1) + 1);

  for (genvar i = 0; i < P; i++) begin : g_lane
    logic [DIST_W-1:0] bm0, bm1;

    vit_distance #(.SOFT_W(SOFT_W), .N_MAX(N_MAX), .DIST_W(DIST_W)) u_dist0 (
      .sym (sym),
      .code(codes[2*N_MAX*i +: N_MAX]),
      .n   (n),
      .bm(bm0)
    );

    vit_distance #(.SOFT_W(SOFT_W), .N_MAX(N_MAX), .DIST_W(DIST_W)) u_dist1 (
      .sym (sym),
      .code(codes[2*N_MAX*i + N_MAX +: N_MAX]),
      .n   (n),
      .bm(bm1)
    );

    vit_acs #(.B(B), .DIST_W(DIST_W)) u_acs (
      .pm0   (pm_pairs[2*B*i +: B]),
      .pm1   (pm_pairs[2*B*i + B +: B]),
      .bm0   (bm0),
      .bm1   (bm1),
      .pm_new(new_pm[B*i +: B]),
      .dec   (dec[i])
    );
  end

endmodule
