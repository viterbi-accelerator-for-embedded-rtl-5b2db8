// Shared types and constants of the datapath Viterbi accelerator.
//
// The accelerator is driven cycle by cycle by a 3-bit opcode taken from the
// processor's exposed datapath control field (three extra control bits, as in
// the integration described for the FlexCore datapath). The opcode encoding
// below, the configuration word layout and the bus packing are this design's
// own choices; the bus widths (64-bit input, 32-bit output and address) and
// the load rates (8 output-table entries, 4 metric entries per cycle) follow
// the accelerator description.
package vit_pkg;

  // Processor-side bus widths.
  localparam int unsigned DATA_IN_W  = 64;  // DATA_IN: two 32-bit datapath words
  localparam int unsigned DATA_OUT_W = 32;  // DATA_OUT: one datapath word
  localparam int unsigned ADDR_W     = 32;  // ADDRESS_OUT: byte address in main memory
  localparam int unsigned OPCODE_W   = 3;

  // Output-table load format: D entries per DATA_IN word, one byte each.
  localparam int unsigned OT_PER_LOAD = 8;
  localparam int unsigned OT_FIELD_W  = DATA_IN_W / OT_PER_LOAD;

  // Accelerator operations, one per cycle.
  typedef enum logic [OPCODE_W-1:0] {
    OP_NOP    = 3'd0,  // hold
    OP_CFG    = 3'd1,  // configuration register <- DATA_IN, clear all pointers
    OP_ADDR   = 3'd2,  // address pointer <- DATA_IN[31:0] (base address)
    OP_LD_OT  = 3'd3,  // write 8 output-table entries, advance pointer by 8
    OP_LD_MT  = 3'd4,  // write P metric entries of the current column
    OP_LD_SYM = 3'd5,  // symbol buffer <- DATA_IN
    OP_COL    = 3'd6,  // full mode: compute P entries of the next column
    OP_ENTRY  = 3'd7   // sub-state mode: compute 1 entry from DATA_IN metrics
  } vit_op_e;

  // Run-time configuration, written by OP_CFG from DATA_IN[6:0].
  typedef struct packed {
    logic [2:0] n;  // code outputs per input bit (1/R), 1..N_MAX
    logic [3:0] k;  // constraint length in use, 3..K
  } vit_cfg_t;

  localparam int unsigned CFG_W = $bits(vit_cfg_t);

  // Datapath control produced by the control unit each cycle.
  typedef struct packed {
    logic cfg_we;     // load configuration register
    logic addr_load;  // load base address pointer
    logic ot_we;      // write output-table entries
    logic sym_we;     // load symbol buffer
    logic mt_we;      // write metric-table entries
    logic mux1_sel;   // MUX1: 0 = DATA_IN (load), 1 = new entries (compute)
    logic mux2_sel;   // MUX2: 0 = local metric table, 1 = DATA_IN (sub-state)
    logic compute;    // a compute cycle: register DATA_OUT, advance address
    logic substate;   // the compute cycle is a sub-state one (single entry)
  } vit_ctrl_t;

  // Outputs of the baseline datapath units, in the order they enter every
  // interconnect switchbox (nine inputs, four address bits). Two output
  // registers each for MULT, PC and ALU, two for the register file and one
  // for load/store. The order is this design's choice.
  typedef enum logic [3:0] {
    SRC_MULT_LSB = 4'd0,
    SRC_MULT_MSB = 4'd1,
    SRC_PC_BUF   = 4'd2,
    SRC_PC_REG   = 4'd3,
    SRC_ALU_BUF  = 4'd4,
    SRC_ALU_REG  = 4'd5,
    SRC_RF_A     = 4'd6,
    SRC_RF_B     = 4'd7,
    SRC_LS_REG   = 4'd8,
    SRC_VITERBI  = 4'd9   // added input: DATA_OUT or ADDRESS_OUT
  } dp_src_e;

  localparam int unsigned DP_UNITS_OUT = 9;
  localparam int unsigned DP_W         = 32;
  localparam int unsigned SB_SEL_W     = 4;

endpackage
