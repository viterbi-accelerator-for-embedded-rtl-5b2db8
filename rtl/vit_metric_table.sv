// Local metric table of the Viterbi accelerator.
//
// Keeps only the newest column of path metrics, 2**(K-1) entries of B bits,
// which is all that is needed to compute the next column; the full table
// lives in main memory. Because every new entry is computed from two old
// ones that later new entries still need, the table has two banks: the
// current column is read from one bank while the next column is written into
// the other, and the roles swap when a column is complete (the swap is done
// by the control unit through wr_bank/rd_bank). The two banks are this
// design's choice.
//
// Write port: in a cycle with we high, the P entries of wdata (entry e in
// wdata[e*B +: B]) go to bank wr_bank at indices wr_idx + e (modulo
// 2**(K-1)). Read port: for each computational unit i, rd_addr[i] names
// the first of two neighbouring entries of bank rd_bank; pair i appears on
// rd_pairs[2*B*i +: 2*B] with the entry at rd_addr[i] in the low half.
// Reads are combinational; both banks are cleared by reset.
module vit_metric_table #(
  parameter int unsigned K = 6,
  parameter int unsigned B = 8,
  parameter int unsigned P = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic               wr_bank,
  input  logic [K-2:0]       wr_idx,
  input  logic [P*B-1:0]     wdata,
  input  logic               rd_bank,
  input  logic [K-2:0]       rd_addr [P],
  output logic [2*P*B-1:0]   rd_pairs
);

  localparam int unsigned NS = 1 << (K - 1);

  logic [B-1:0] mt [2][NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < 2; b++)
        for (int unsigned i = 0; i < NS; i++) mt[b][i] <= '0;
    end else if (we) begin
      for (int unsigned e = 0; e < P; e++)
        mt[wr_bank][(K-1)'(wr_idx + (K-1)'(e))] <= wdata[e*B +: B];
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < P; i++) begin
      rd_pairs[2*B*i +: B]     = mt[rd_bank][rd_addr[i]];
      rd_pairs[2*B*i + B +: B] = mt[rd_bank][(K-1)'(rd_addr[i] + (K-1)'(1))];
    end
  end

endmodule
