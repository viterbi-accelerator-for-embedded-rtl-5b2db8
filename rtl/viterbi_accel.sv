// Lightweight Viterbi accelerator for an embedded processor datapath.
//
// The accelerator performs only the branch-metric and path-metric steps of
// soft-decision Viterbi decoding; the processor computes the output table
// and does the traceback in software. It keeps just the newest column of the
// metric table locally and streams every new column out to main memory,
// 32 bits (four metrics) per cycle, with the address to store it at.
//
// Structure (as in the accelerator's block diagram): a configuration
// register, a symbol buffer, an output table, a two-bank metric table, a
// computational unit of P lanes (two distance units and one ACS each), MUX1
// choosing the metric-table write data (DATA_IN when loading, the new
// entries when computing), MUX2 choosing the lane operands (metric table or
// DATA_IN), an address pointer incrementer and the control unit.
//
// Two modes:
//  * Full mode (configured k <= K): after the table and one metric column
//    are loaded, each symbol takes one OP_LD_SYM and 2**(k-1)/P OP_COL cycles.
//    For K = 6, P = 4 that is 1 + 8 cycles per symbol.
//  * Sub-state mode (code constraint length above K): software loads one
//    2**K-entry portion of the code's output table at a time, then issues
//    OP_ENTRY with the two predecessor metrics in DATA_IN[2B-1:0]; lane 0
//    returns the new metric in DATA_OUT[B-1:0] one cycle later. The
//    accelerator then behaves like an ALU fed from the register file.
//
// Interface: DATA_IN (64 bits) carries every load and, in sub-state mode,
// the metric operands; DATA_OUT and ADDRESS_OUT are registered and change
// only in compute cycles, one cycle after the OP_COL/OP_ENTRY that produced
// them. Lane i's new metric is DATA_OUT[B*i +: B]. ADDRESS_OUT is a byte
// address and advances by P*B/8 per OP_COL and by B/8 per OP_ENTRY. HALT
// freezes the accelerator. The opcode set, the two metric-table banks, the
// metric width B = 8 (from the 32-bit output carrying four metrics), the
// 2-bit soft values and the modulo metric arithmetic are this design's
// choices where the document leaves them open.
module viterbi_accel
  import vit_pkg::*;
#(
  parameter int unsigned K      = 6,  // accelerator constraint length
  parameter int unsigned P      = 4,  // computational lanes
  parameter int unsigned B      = 8,  // path-metric width
  parameter int unsigned SOFT_W = 2,  // bits per received soft value
  parameter int unsigned N_MAX  = 4   // largest 1/R supported
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  halt,
  input  logic [OPCODE_W-1:0]   opcode,
  input  logic [DATA_IN_W-1:0]  data_in,
  output logic [DATA_OUT_W-1:0] data_out,
  output logic [ADDR_W-1:0]     address_out
);

  localparam int unsigned S  = N_MAX * SOFT_W;
  localparam int unsigned KW = K - 1;

  if (P * B > DATA_OUT_W || 2 * P * B > DATA_IN_W || S > DATA_IN_W || K < 3 || P > (1 << (K - 1))) begin : g_bad_params
    $error("viterbi_accel: parameters do not fit the datapath buses");
  end

  vit_ctrl_t       ctrl;
  vit_cfg_t        cfg;
  logic [K-1:0]    ot_ptr;
  logic            mt_wr_bank, rd_bank, col_last;
  logic [KW-1:0]   mt_wr_idx, j0;
  logic [S-1:0]    sym;
  logic [2*P*N_MAX-1:0] codes;
  logic [2*P*B-1:0] mt_pairs, pm_pairs;
  logic [P*B-1:0]  new_pm, mt_wdata;
  logic [P-1:0]    dec;
  logic [KW-1:0]   rd_addr [P];
  logic [KW-1:0]   half_mask;

  vit_control_unit #(.K(K), .P(P)) u_ctrl (
    .clk, .rst_n, .halt, .opcode, .cfg,
    .ctrl, .ot_ptr, .mt_wr_bank, .mt_wr_idx, .rd_bank, .j0, .col_last
  );

  vit_config_reg #(.K(K), .N_MAX(N_MAX)) u_cfg (
    .clk, .rst_n, .we(ctrl.cfg_we), .din(data_in[CFG_W-1:0]), .cfg
  );

  vit_symbol_buffer #(.S(S)) u_sym (
    .clk, .rst_n, .we(ctrl.sym_we), .din(data_in[S-1:0]), .sym
  );

  // The two branches into new state j use output-table entries 2j, 2j+1.
  vit_output_table #(.K(K), .N_MAX(N_MAX), .P(P), .DIN_W(DATA_IN_W), .PER_LD(OT_PER_LOAD)) u_ot (
    .clk, .rst_n, .we(ctrl.ot_we), .wr_ptr(ot_ptr), .wdata(data_in),
    .rd_idx({j0, 1'b0}), .codes
  );

  // Predecessors of state j = {u, j'} are 2j' and 2j'+1, j' = j mod 2**(k-2).
  assign half_mask = KW'((1 << (cfg.k - 4'd2)) - 1);
  always_comb begin
    for (int unsigned i = 0; i < P; i++)
      rd_addr[i] = {KW'((j0 + KW'(i)) & half_mask), 1'b0} [KW-1:0];
  end

  vit_mux2 #(.W(P*B)) u_mux1 (
    .sel(ctrl.mux1_sel), .in0(data_in[P*B-1:0]), .in1(new_pm), .out(mt_wdata)
  );

  vit_metric_table #(.K(K), .B(B), .P(P)) u_mt (
    .clk, .rst_n, .we(ctrl.mt_we), .wr_bank(mt_wr_bank), .wr_idx(mt_wr_idx),
    .wdata(mt_wdata), .rd_bank, .rd_addr, .rd_pairs(mt_pairs)
  );

  vit_mux2 #(.W(2*P*B)) u_mux2 (
    .sel(ctrl.mux2_sel), .in0(mt_pairs), .in1(data_in[2*P*B-1:0]), .out(pm_pairs)
  );

  vit_comp_unit #(.P(P), .B(B), .SOFT_W(SOFT_W), .N_MAX(N_MAX)) u_cu (
    .sym, .n(cfg.n), .pm_pairs, .codes, .new_pm, .dec
  );

  // Output register: the P new metrics, or lane 0 alone in sub-state mode.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      data_out <= '0;
    else if (ctrl.compute)
      data_out <= ctrl.substate ? DATA_OUT_W'(new_pm[B-1:0]) : DATA_OUT_W'(new_pm);
  end

  localparam int unsigned STEP_W = $clog2(P * B / 8 + 1) + 1;

  vit_addr_incr #(.ADDR_W(ADDR_W), .STEP_W(STEP_W)) u_addr (
    .clk, .rst_n,
    .load    (ctrl.addr_load),
    .base    (data_in[ADDR_W-1:0]),
    .adv     (ctrl.compute),
    .step    (ctrl.substate ? STEP_W'((B + 7) / 8) : STEP_W'((P * B + 7) / 8)),
    .addr_out(address_out)
  );

endmodule
