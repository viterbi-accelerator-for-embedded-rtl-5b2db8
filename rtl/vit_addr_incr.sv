// Address pointer incrementer of the Viterbi accelerator.
//
// Produces ADDRESS_OUT, the main-memory byte address at which the load/store
// unit stores the word currently on DATA_OUT. Software loads a base address
// once; every compute cycle then presents the pointer on ADDRESS_OUT
// together with the new metric entries and advances it by the number of
// bytes produced (step). The whole metric table thus builds up in main memory,
// where the software traceback reads it.
//
// Interface: load copies base into the pointer. In a cycle with adv high,
// addr_out takes the pointer value and the pointer moves on by step; both
// registers hold otherwise. addr_out is registered, aligned with the
// registered DATA_OUT. Byte addressing and the step sizes are this design's
// choice.
module vit_addr_incr #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned STEP_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] base,
  input  logic              adv,
  input  logic [STEP_W-1:0] step,
  output logic [ADDR_W-1:0] addr_out
);

  logic [ADDR_W-1:0] ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr      <= '0;
      addr_out <= '0;
    end else if (load) begin
      ptr      <= base;
    end else if (adv) begin
      addr_out <= ptr;
      ptr      <= ptr + ADDR_W'(step);
    end
  end

endmodule
