// Viterbi accelerator integrated in an exposed-control processor datapath.
//
// The processor datapath routes every unit output to every unit input
// through switchboxes, one multiplexer per unit input, addressed directly by
// the instruction's interconnect control field. This module is the part of
// that datapath that changes when the accelerator is added:
//  * the accelerator's 64-bit input: DATA_IN[63:32] comes straight from a
//    register-file read port (rf_a), DATA_IN[31:0] from a 2-way multiplexer
//    choosing the other register-file port (In A) or the load/store output
//    (In B), steered by one added interconnect control bit (in_sel);
//  * the switchboxes of the register-file write port and of the load/store
//    data input gain the accelerator's DATA_OUT as tenth input;
//  * the switchbox of the load/store address input gains ADDRESS_OUT.
// Ten inputs still fit the four switchbox address bits. The accelerator
// takes three extra datapath control bits as its opcode.
//
// The processor's own units (register file, load/store, ALU, multiplier,
// program counter) are outside this module: their nine outputs arrive on
// dp_out, indexed by vit_pkg::dp_src_e, and the three routed unit inputs
// leave as rf_wdata, ls_data and ls_addr. All routing is combinational; the
// accelerator's outputs are registered inside it. Which register-file port
// feeds which half of DATA_IN and the switchbox input order are this
// design's choice; the routing itself follows the integration description.
module viterbi_datapath_slice
  import vit_pkg::*;
#(
  parameter int unsigned K      = 6,
  parameter int unsigned P      = 4,
  parameter int unsigned B      = 8,
  parameter int unsigned SOFT_W = 2,
  parameter int unsigned N_MAX  = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // baseline datapath unit outputs
  input  logic [DP_W-1:0]     dp_out [DP_UNITS_OUT],
  // datapath unit control field: accelerator opcode and halt
  input  logic [OPCODE_W-1:0] vit_opcode,
  input  logic                vit_halt,
  // interconnect control field
  input  logic                in_sel,        // 0: In A (register file), 1: In B (load/store)
  input  logic [SB_SEL_W-1:0] sb_rf_sel,     // register-file write data
  input  logic [SB_SEL_W-1:0] sb_ls_data_sel,
  input  logic [SB_SEL_W-1:0] sb_ls_addr_sel,
  // routed unit inputs
  output logic [DP_W-1:0]     rf_wdata,
  output logic [DP_W-1:0]     ls_data,
  output logic [DP_W-1:0]     ls_addr
);

  localparam int unsigned N_SB = DP_UNITS_OUT + 1;

  logic [DP_W-1:0]       in_lo;
  logic [DATA_IN_W-1:0]  data_in;
  logic [DATA_OUT_W-1:0] vit_data_out;
  logic [ADDR_W-1:0]     vit_addr_out;
  logic [DP_W-1:0]       sb_data_in [N_SB];
  logic [DP_W-1:0]       sb_addr_in [N_SB];

  vit_mux2 #(.W(DP_W)) u_in_mux (
    .sel(in_sel), .in0(dp_out[SRC_RF_B]), .in1(dp_out[SRC_LS_REG]), .out(in_lo)
  );

  assign data_in = {dp_out[SRC_RF_A], in_lo};

  viterbi_accel #(.K(K), .P(P), .B(B), .SOFT_W(SOFT_W), .N_MAX(N_MAX)) u_vit (
    .clk, .rst_n,
    .halt       (vit_halt),
    .opcode     (vit_opcode),
    .data_in    (data_in),
    .data_out   (vit_data_out),
    .address_out(vit_addr_out)
  );

  always_comb begin
    for (int unsigned i = 0; i < DP_UNITS_OUT; i++) begin
      sb_data_in[i] = dp_out[i];
      sb_addr_in[i] = dp_out[i];
    end
    sb_data_in[SRC_VITERBI] = vit_data_out;
    sb_addr_in[SRC_VITERBI] = vit_addr_out;
  end

  flex_switchbox #(.N_IN(N_SB), .W(DP_W)) u_sb_rf (
    .in(sb_data_in), .sel(sb_rf_sel), .out(rf_wdata)
  );

  flex_switchbox #(.N_IN(N_SB), .W(DP_W)) u_sb_ls_data (
    .in(sb_data_in), .sel(sb_ls_data_sel), .out(ls_data)
  );

  flex_switchbox #(.N_IN(N_SB), .W(DP_W)) u_sb_ls_addr (
    .in(sb_addr_in), .sel(sb_ls_addr_sel), .out(ls_addr)
  );

endmodule
