// Control unit of the Viterbi accelerator.
//
// Decodes the 3-bit opcode that the processor issues every cycle and keeps
// the accelerator's sequencing state: the output-table and metric-table
// load pointers, the position within the column being computed, the
// current metric-table bank and the state counter of sub-state mode. The
// processor (its compiler) schedules every step, so a column of 2**(k-1)
// states takes 2**(k-1)/P back-to-back OP_COL cycles, and a sub-state entry
// one OP_ENTRY cycle.
//
// Full mode, OP_COL: the P new states j0 .. j0+P-1 are computed from the
// current bank and written to the other bank; after the last group of the
// column the banks swap (col_last pulses).
// Sub-state mode, OP_ENTRY: one new state, local index j0 = L, from two
// metrics on DATA_IN; L counts up and returns to 0 when a new output-table
// portion is loaded.
//
// HALT freezes the accelerator: while it is high the opcode is ignored and
// no state changes (this reading of the HALT pin is this design's choice).
// Outputs are combinational from the opcode and registered state.
module vit_control_unit
  import vit_pkg::*;
#(
  parameter int unsigned K = 6,
  parameter int unsigned P = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                halt,
  input  logic [OPCODE_W-1:0] opcode,
  input  vit_cfg_t            cfg,
  output vit_ctrl_t           ctrl,
  output logic [K-1:0]        ot_ptr,    // output-table write index
  output logic                mt_wr_bank,
  output logic [K-2:0]        mt_wr_idx,
  output logic                rd_bank,
  output logic [K-2:0]        j0,        // first new state of this cycle
  output logic                col_last   // this OP_COL completes a column
);

  localparam int unsigned KW = K - 1;   // width of a state index

  vit_op_e op;
  assign op = vit_op_e'(opcode);

  logic         cur_bank;
  logic [K-1:0] ot_p;
  logic [KW-1:0] mt_p, col_j, sub_l;
  logic [K:0]    n_states;   // 2**(k-1) states in the configured code
  logic [K:0]    n_ot;       // 2**k output-table entries

  assign n_states = (K+1)'(1) << (cfg.k - 4'd1);
  assign n_ot     = (K+1)'(1) << cfg.k;

  // Next value of a pointer that advances by step and wraps at limit.
  function automatic logic [K:0] wrap_add(logic [K:0] v, int unsigned step, logic [K:0] limit);
    logic [K:0] s;
    s = v + (K+1)'(step);
    return (s >= limit) ? '0 : s;
  endfunction

  always_comb begin
    ctrl       = '0;
    mt_wr_bank = cur_bank;
    mt_wr_idx  = mt_p;
    rd_bank    = cur_bank;
    j0         = col_j;
    col_last   = 1'b0;
    ot_ptr     = ot_p;
    if (!halt) begin
      unique case (op)
        OP_CFG:    ctrl.cfg_we    = 1'b1;
        OP_ADDR:   ctrl.addr_load = 1'b1;
        OP_LD_OT:  ctrl.ot_we     = 1'b1;
        OP_LD_SYM: ctrl.sym_we    = 1'b1;
        OP_LD_MT: begin
          ctrl.mt_we    = 1'b1;
          ctrl.mux1_sel = 1'b0;
        end
        OP_COL: begin
          ctrl.compute  = 1'b1;
          ctrl.mt_we    = 1'b1;
          ctrl.mux1_sel = 1'b1;
          ctrl.mux2_sel = 1'b0;
          mt_wr_bank    = ~cur_bank;
          mt_wr_idx     = col_j;
          col_last      = (wrap_add((K+1)'(col_j), P, n_states) == '0);
        end
        OP_ENTRY: begin
          ctrl.compute  = 1'b1;
          ctrl.substate = 1'b1;
          ctrl.mux2_sel = 1'b1;
          j0            = sub_l;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_bank <= 1'b0;
      ot_p     <= '0;
      mt_p     <= '0;
      col_j    <= '0;
      sub_l    <= '0;
    end else if (!halt) begin
      unique case (op)
        OP_CFG: begin
          cur_bank <= 1'b0;
          ot_p     <= '0;
          mt_p     <= '0;
          col_j    <= '0;
          sub_l    <= '0;
        end
        OP_LD_OT: begin
          ot_p  <= K'(wrap_add({1'b0, ot_p}, OT_PER_LOAD, n_ot));
          sub_l <= '0;
        end
        OP_LD_MT: mt_p  <= KW'(wrap_add((K+1)'(mt_p), P, n_states));
        OP_COL: begin
          col_j <= KW'(wrap_add((K+1)'(col_j), P, n_states));
          if (col_last) cur_bank <= ~cur_bank;
        end
        OP_ENTRY: sub_l <= KW'(wrap_add((K+1)'(sub_l), 1, n_states));
        default: ;
      endcase
    end
  end

endmodule
