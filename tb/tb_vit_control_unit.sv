// Self-checking test of the control unit. A directed part checks that a
// K = 6 column takes exactly 8 OP_COL cycles before the banks swap and that
// HALT freezes everything; a random part drives 4000 random opcodes, halts
// and configurations (k = 3..6) and compares every control output with a
// software model of the sequencing rules.
module tb_vit_control_unit;
  import vit_pkg::*;
  localparam int K = 6, P = 4;

  logic clk = 0, rst_n = 0, halt = 0;
  logic [2:0] opcode = '0;
  vit_cfg_t cfg;
  vit_ctrl_t ctrl;
  logic [K-1:0] ot_ptr;
  logic mt_wr_bank, rd_bank, col_last;
  logic [K-2:0] mt_wr_idx, j0;
  int checks = 0, failures = 0;

  // model state
  int m_bank, m_ot, m_mt, m_col, m_sub, m_k;

  vit_control_unit #(.K(K), .P(P)) dut (.clk, .rst_n, .halt, .opcode, .cfg, .ctrl, .ot_ptr,
                                        .mt_wr_bank, .mt_wr_idx, .rd_bank, .j0, .col_last);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    if (failures < 15) $display("FAIL %s (op=%0d halt=%0d) ot=%0d m_ot=%0d mt=%0d m_mt=%0d j0=%0d col=%0d sub=%0d k=%0d bank=%0d/%0d", what, opcode, halt, ot_ptr, m_ot, mt_wr_idx, m_mt, j0, m_col, m_sub, m_k, rd_bank, m_bank);
  endtask

  // Compare outputs for the opcode on the inputs now, then advance the model.
  task automatic check_and_step();
    int ns, nt;
    bit e_last;
    ns = 1 << (m_k - 1);
    nt = 1 << m_k;
    e_last = 0;
    checks++;
    if (halt || opcode == OP_NOP) begin
      if (ctrl != '0) fail("ctrl not idle");
    end else begin
      case (vit_op_e'(opcode))
        OP_CFG:    if (!ctrl.cfg_we || ctrl.compute) fail("cfg");
        OP_ADDR:   if (!ctrl.addr_load || ctrl.compute) fail("addr");
        OP_LD_OT:  if (!ctrl.ot_we || int'(ot_ptr) != m_ot) fail("ld_ot");
        OP_LD_SYM: if (!ctrl.sym_we || ctrl.mt_we) fail("ld_sym");
        OP_LD_MT:  if (!ctrl.mt_we || ctrl.mux1_sel || int'(mt_wr_bank) != m_bank || int'(mt_wr_idx) != m_mt) fail("ld_mt");
        OP_COL: begin
          e_last = (m_col + P >= ns);
          if (!ctrl.compute || ctrl.substate || !ctrl.mt_we || !ctrl.mux1_sel || ctrl.mux2_sel ||
              int'(mt_wr_bank) != 1 - m_bank || int'(rd_bank) != m_bank || int'(mt_wr_idx) != m_col ||
              int'(j0) != m_col || col_last != e_last) fail("col");
        end
        OP_ENTRY:  if (!ctrl.compute || !ctrl.substate || !ctrl.mux2_sel || ctrl.mt_we || int'(j0) != m_sub) fail("entry");
        default: ;
      endcase
    end
    if (!halt) begin
      case (vit_op_e'(opcode))
        OP_CFG:   begin m_bank = 0; m_ot = 0; m_mt = 0; m_col = 0; m_sub = 0; end
        OP_LD_OT: begin m_ot = (m_ot + 8 >= nt) ? 0 : m_ot + 8; m_sub = 0; end
        OP_LD_MT: m_mt = (m_mt + P >= ns) ? 0 : m_mt + P;
        OP_COL:   begin m_col = (m_col + P >= ns) ? 0 : m_col + P; if (e_last) m_bank ^= 1; end
        OP_ENTRY: m_sub = (m_sub + 1 >= ns) ? 0 : m_sub + 1;
        default: ;
      endcase
    end
  endtask

  task automatic issue(int op, bit h);
    @(negedge clk);
    opcode = 3'(op);
    halt = h;
    #1 check_and_step();
  endtask

  initial begin
    int swaps;
    m_bank = 0; m_ot = 0; m_mt = 0; m_col = 0; m_sub = 0; m_k = 6;
    cfg.k = 4'd6; cfg.n = 3'd2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // one K = 6 column: 8 cycles, col_last on the eighth only
    swaps = 0;
    for (int c = 0; c < 8; c++) begin
      issue(int'(OP_COL), 0);
      if (col_last) begin
        swaps++;
        checks++;
        if (c != 7) fail("column ended early");
      end
    end
    checks++;
    if (swaps != 1) fail("no bank swap after 8 cycles");
    issue(int'(OP_NOP), 0);
    checks++;
    if (rd_bank != 1'b1) fail("banks not swapped");
    // HALT freezes the column position
    issue(int'(OP_COL), 1);
    issue(int'(OP_COL), 1);
    issue(int'(OP_COL), 0);
    checks++;
    if (j0 != '0) fail("halt did not freeze");
    // random operation
    for (int t = 0; t < 4000; t++) begin
      int op;
      op = $urandom_range(0, 7);
      issue(op, ($urandom_range(0, 9) == 0));
      if (op == int'(OP_CFG) && !halt) begin
        // the configuration register output changes after the CFG cycle
        @(negedge clk);
        opcode = '0; halt = 0;
        m_k = $urandom_range(3, 6);
        cfg.k = 4'(m_k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
