// Output table of the Viterbi accelerator.
//
// Stores the expected encoder output for every (input bit, encoder state)
// pair of a constraint-length-K code: 2**K entries of N_MAX bits. Entry
// index = {u, s}, u the encoder input bit and s the K-1 bit state before the
// input (most recent bit first), so entries 0 .. 2**(K-1)-1 hold the outputs
// for input 0 and the rest those for input 1. With this order the two
// branches into new state j use entries 2j and 2j+1, for the full code and
// for a portion of a longer code alike.
//
// Software computes the table once per code and loads it 8 entries per
// cycle: entry e of a load sits in DATA_IN[8e +: N_MAX] and is written at
// index ptr + e. The read port returns the 2P consecutive entries from
// rd_idx on (modulo 2**K), two for each of the P computational units.
// Reads are combinational; the table is cleared by reset. The index order
// follows the document's output-table example; the load packing and bit
// order are this design's choice.
module vit_output_table #(
  parameter int unsigned K      = 6,
  parameter int unsigned N_MAX  = 4,
  parameter int unsigned P      = 4,
  parameter int unsigned DIN_W  = 64,
  parameter int unsigned PER_LD = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [K-1:0]            wr_ptr,
  input  logic [DIN_W-1:0]        wdata,
  input  logic [K-1:0]            rd_idx,
  output logic [2*P*N_MAX-1:0]    codes
);

  localparam int unsigned NE    = 1 << K;
  localparam int unsigned FIELD = DIN_W / PER_LD;

  logic [N_MAX-1:0] ot [NE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NE; i++) ot[i] <= '0;
    end else if (we) begin
      for (int unsigned e = 0; e < PER_LD; e++)
        ot[K'(wr_ptr + K'(e))] <= wdata[e*FIELD +: N_MAX];
    end
  end

  always_comb begin
    for (int unsigned e = 0; e < 2*P; e++)
      codes[e*N_MAX +: N_MAX] = ot[K'(rd_idx + K'(e))];
  end

endmodule
