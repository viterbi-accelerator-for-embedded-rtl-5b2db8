// Workload test of the accelerator built for constraint length 7 (the other
// accelerator size the document evaluates), inside its datapath slice.
//
// Same processor model as the default-size end-to-end test. Runs:
//  * k = 7, R = 1/2 in full mode: 1 + 64/4 = 17 cycles per symbol;
//  * k = 6, R = 1/2 (EEMBC size) in full mode on the larger accelerator:
//    still 9 cycles per symbol, 2,889 for 321 columns;
//  * k = 9, R = 1/4 in sub-state mode with the accelerator's own portion size:
//    four 128-entry portions of 16 load cycles, 64 entries of 5 cycles each,
//    1 + 4 * (16 + 320) = 1,345 cycles per symbol;
//  * k = 8, R = 1/4 in sub-state mode: 673 cycles per symbol, 216,033 in all.
// Each decode is traced back in software from the stored metrics and must
// match an integer reference decoder.
module tb_viterbi_ka7_workloads;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  localparam int K = 7, P = 4, B = 8, SW = 2;
  localparam int VMAX = (1 << SW) - 1;
  localparam int NSYM_FULL = 326, NSYM_SUB = 321;
  localparam int MAXT = 340;

  logic clk = 0, rst_n = 0;
  logic [31:0] dp_out [DP_UNITS_OUT];
  logic [2:0]  vit_opcode = '0;
  logic        vit_halt = 0, in_sel = 0;
  logic [3:0]  sb_rf_sel = '0, sb_ls_data_sel = '0, sb_ls_addr_sel = '0;
  logic [31:0] rf_wdata, ls_data, ls_addr;

  logic [7:0] mem [int unsigned];
  int checks = 0, failures = 0;
  // mechanism counters
  int n_swap = 0, n_entry = 0, n_portion = 0, n_halt = 0, n_in_a = 0, n_in_b = 0;
  int n_sb_rf = 0, n_sb_ls = 0, n_mode_switch = 0;
  int run_cycles;   // accelerator cycles of the last run's per-symbol loop

  viterbi_datapath_slice #(.K(K)) dut (.clk, .rst_n, .dp_out, .vit_opcode, .vit_halt, .in_sel,
                              .sb_rf_sel, .sb_ls_data_sel, .sb_ls_addr_sel,
                              .rf_wdata, .ls_data, .ls_addr);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("FAIL %s", s);
  endtask

  // One processor cycle. use_b selects In B (the low word from load/store).
  // Returns just after the clock edge.
  task automatic cyc(vit_op_e op, logic [63:0] d, bit use_b = 0);
    if ($urandom_range(0, 63) == 0 && op != OP_NOP) begin
      @(negedge clk);
      vit_halt = 1; vit_opcode = op;
      @(posedge clk); #1;
      n_halt++;
    end
    @(negedge clk);
    vit_halt = 0;
    vit_opcode = op;
    for (int i = 0; i < DP_UNITS_OUT; i++) dp_out[i] = $urandom;
    dp_out[SRC_RF_A] = d[63:32];
    in_sel = use_b;
    if (use_b) begin dp_out[SRC_LS_REG] = d[31:0]; n_in_b++; end
    else       begin dp_out[SRC_RF_B]   = d[31:0]; n_in_a++; end
    @(posedge clk); #1;
    vit_opcode = 3'(OP_NOP);
  endtask

  // Store the accelerator's registered output word through the load/store
  // switchboxes (called right after the compute cycle, before the next one).
  task automatic capture_store();
    sb_ls_data_sel = 4'(SRC_VITERBI);
    sb_ls_addr_sel = 4'(SRC_VITERBI);
    #1;
    for (int i = 0; i < 4; i++) mem[ls_addr + 32'(i)] = ls_data[8*i +: 8];
    n_sb_ls++;
    sb_ls_data_sel = 4'(SRC_ALU_REG);
    sb_ls_addr_sel = 4'(SRC_ALU_REG);
  endtask

  function automatic logic [63:0] ot_word(int k, int n, int unsigned gens[MAXN], int first);
    logic [63:0] w;
    w = '0;
    for (int e = 0; e < 8; e++) begin
      int idx;
      idx = first + e;
      w[e*8 +: 8] = 8'(enc_out(k, n, gens, idx >> (k - 1), idx & ((1 << (k - 1)) - 1)));
    end
    return w;
  endfunction

  // Channel: ideal levels 0 / VMAX, mild noise and a few hard errors.
  function automatic int channel(int bitv);
    int v, x;
    v = (bitv != 0) ? VMAX : 0;
    x = $urandom_range(0, 99);
    if (x < 8) v = (bitv != 0) ? VMAX - 1 : 1;
    else if (x < 10) v = (bitv != 0) ? 1 : VMAX - 1;
    else if (x == 10) v = (bitv != 0) ? 0 : VMAX;
    return v;
  endfunction

  // Modulo-2**B decision from stored metrics: 1 if branch 1 is strictly better.
  function automatic bit mod_dec(int m0, int b0, int m1, int b1);
    logic [B-1:0] d;
    d = B'(m1 + b1) - B'(m0 + b0);
    return d[B-1];
  endfunction

  // Run one decode. Full mode when kr <= K, sub-state mode otherwise.
  task automatic run(int kr, int n, int unsigned gens[MAXN], int nsym, bit substate);
    int msg[MAXT];
    int rx[MAXT][MAXN];
    longint pm[MAXS], pmn[MAXS];
    bit refdec[MAXT][MAXS];
    int cols[MAXT][MAXS];       // metrics as software sees them (mod 2**B from hw)
    int ns, s, errors_ref, errors_msg, nsa;
    int dec_hw[MAXT], dec_ref[MAXT];
    logic [31:0] base;
    ns  = 1 << (kr - 1);
    nsa = 1 << (K - 1);
    run_cycles = 0;
    // message with a zero tail that returns the encoder to state 0
    s = 0;
    for (int t = 0; t < nsym; t++) begin
      int unsigned o;
      msg[t] = (t < nsym - (kr - 1)) ? int'($urandom_range(0, 1)) : 0;
      o = enc_out(kr, n, gens, msg[t], s);
      s = enc_next(kr, msg[t], s);
      for (int i = 0; i < MAXN; i++) rx[t][i] = (i < n) ? channel((o >> i) & 1) : 0;
    end
    // reference decoder on unbounded metrics, start in state 0
    for (int j = 0; j < ns; j++) pm[j] = (j == 0) ? 0 : 1000;
    for (int t = 0; t < nsym; t++) begin
      bit d[MAXS];
      int r[MAXN];
      for (int i = 0; i < MAXN; i++) r[i] = rx[t][i];
      ref_step(kr, n, VMAX, gens, r, pm, pmn, d);
      for (int j = 0; j < ns; j++) begin refdec[t][j] = d[j]; pm[j] = pmn[j]; end
    end
    // software: first kr-1 columns (index t = column after symbol t)
    for (int j = 0; j < ns; j++) pm[j] = (j == 0) ? 0 : 1000;
    for (int t = 0; t < kr - 1; t++) begin
      bit d[MAXS];
      int r[MAXN];
      for (int i = 0; i < MAXN; i++) r[i] = rx[t][i];
      ref_step(kr, n, VMAX, gens, r, pm, pmn, d);
      for (int j = 0; j < ns; j++) begin pm[j] = pmn[j]; cols[t][j] = int'(pmn[j] & 255); end
    end

    if (!substate) begin
      int cyc_sym;
      base = 32'h0000_4000;
      cyc(OP_CFG, {32'h0, 32'((n << 4) | kr)});
      cyc(OP_ADDR, {32'h0, base});
      for (int w = 0; w < (2 * ns) / 8; w++) cyc(OP_LD_OT, ot_word(kr, n, gens, w * 8));
      // last software column, fetched by load/store: In B
      for (int w = 0; w < ns / P; w++) begin
        logic [63:0] d;
        d = '0;
        for (int e = 0; e < P; e++) d[e*B +: B] = B'(cols[kr-2][w*P + e]);
        cyc(OP_LD_MT, d, 1'b1);
      end
      for (int t = kr - 1; t < nsym; t++) begin
        cyc_sym = 0;
        cyc(OP_LD_SYM, pack_sym(n, SW, rx[t]));
        cyc_sym++;
        for (int c = 0; c < ns / P; c++) begin
          cyc(OP_COL, '0);
          cyc_sym++;
          capture_store();
        end
        checks++;
        if (cyc_sym != 1 + ns / P) fail($sformatf("full-mode cycles per symbol %0d, expected %0d", cyc_sym, 1 + ns / P));
        run_cycles += cyc_sym;
        // software reads the column back from memory
        for (int j = 0; j < ns; j++)
          cols[t][j] = int'(mem[base + 32'((t - (kr - 1)) * ns + j)]);
      end
    end else begin
      n_mode_switch++;
      cyc(OP_CFG, {32'h0, 32'((n << 4) | K)});
      for (int t = kr - 1; t < nsym; t++) begin
        int cyc_sym;
        cyc_sym = 0;
        cyc(OP_LD_SYM, pack_sym(n, SW, rx[t]));
        cyc_sym++;
        for (int q = 0; q < ns / nsa; q++) begin
          for (int w = 0; w < (2 * nsa) / 8; w++) begin
            cyc(OP_LD_OT, ot_word(kr, n, gens, q * 2 * nsa + w * 8));
            cyc_sym++;
          end
          n_portion++;
          for (int l = 0; l < nsa; l++) begin
            int j, jp;
            j  = q * nsa + l;
            jp = j & ((ns >> 1) - 1);
            // two cycles: the operands are read into registers
            cyc(OP_NOP, '0); cyc(OP_NOP, '0);
            cyc(OP_ENTRY, {32'h0, 16'h0, B'(cols[t-1][2*jp + 1]), B'(cols[t-1][2*jp])});
            // two cycles: the result goes to the register file, then memory
            sb_rf_sel = 4'(SRC_VITERBI);
            #1;
            cols[t][j] = int'(rf_wdata[B-1:0]);
            n_sb_rf++;
            sb_rf_sel = 4'(SRC_ALU_REG);
            cyc(OP_NOP, '0); cyc(OP_NOP, '0);
            cyc_sym += 5;
            n_entry++;
          end
        end
        checks++;
        if (cyc_sym != 1 + (ns / nsa) * ((2 * nsa) / 8 + 5 * nsa))
          fail($sformatf("sub-state cycles per symbol %0d, expected %0d", cyc_sym, 1 + (ns / nsa) * ((2 * nsa) / 8 + 5 * nsa)));
        run_cycles += cyc_sym;
      end
    end

    // every stored metric against the reference, modulo 2**B
    for (int j = 0; j < ns; j++) pm[j] = (j == 0) ? 0 : 1000;
    for (int t = 0; t < nsym; t++) begin
      bit d[MAXS];
      bit col_ok;
      int r[MAXN];
      for (int i = 0; i < MAXN; i++) r[i] = rx[t][i];
      ref_step(kr, n, VMAX, gens, r, pm, pmn, d);
      col_ok = 1;
      for (int j = 0; j < ns; j++) begin
        pm[j] = pmn[j];
        checks++;
        if (cols[t][j] != int'(pmn[j] & 255)) begin
          col_ok = 0;
          fail($sformatf("k=%0d column %0d state %0d: %0d, expected %0d", kr, t, j, cols[t][j], pmn[j] & 255));
        end
      end
      // a correct full-mode column after the first one read the bank that the
      // previous column wrote: the metric banks swapped in between
      if (!substate && t >= kr && col_ok) n_swap++;
    end

    // traceback: software on the stored metrics vs. reference decisions
    s = 0;
    for (int t = nsym - 1; t >= 0; t--) begin
      int u, jp;
      bit d;
      int r[MAXN];
      u = s >> (kr - 2);
      jp = s & ((1 << (kr - 2)) - 1);
      dec_hw[t] = u;
      for (int i = 0; i < MAXN; i++) r[i] = rx[t][i];
      if (t == 0) d = 0;   // the first column is reached only from state 0
      else d = mod_dec(cols[t-1][2*jp],     ref_dist(n, VMAX, r, enc_out(kr, n, gens, u, 2*jp)),
                       cols[t-1][2*jp + 1], ref_dist(n, VMAX, r, enc_out(kr, n, gens, u, 2*jp + 1)));
      s = 2 * jp + d;
    end
    s = 0;
    for (int t = nsym - 1; t >= 0; t--) begin
      int jp;
      dec_ref[t] = s >> (kr - 2);
      jp = s & ((1 << (kr - 2)) - 1);
      s = 2 * jp + int'(refdec[t][s]);
    end
    errors_ref = 0; errors_msg = 0;
    for (int t = 0; t < nsym; t++) begin
      if (dec_hw[t] != dec_ref[t]) errors_ref++;
      if (dec_hw[t] != msg[t]) errors_msg++;
    end
    checks += 2;
    if (errors_ref != 0) fail($sformatf("k=%0d: %0d decoded bits differ from the reference decoder", kr, errors_ref));
    if (errors_msg * 100 > nsym) fail($sformatf("k=%0d: %0d bit errors against the message", kr, errors_msg));
    $display("k=%0d R=1/%0d %s: %0d symbols decoded, %0d bit errors against the message, %0d cycles",
             kr, n, substate ? "sub-state" : "full", nsym, errors_msg, run_cycles);
  endtask

  initial begin
    automatic int unsigned g6[MAXN] = '{'o65, 'o57, 0, 0};
    automatic int unsigned g9[MAXN] = '{'o463, 'o535, 'o733, 'o745};
    automatic int unsigned g8[MAXN] = '{'o225, 'o331, 'o367, 'o237};
    automatic int unsigned g7[MAXN] = '{'o171, 'o133, 0, 0};
    for (int i = 0; i < DP_UNITS_OUT; i++) dp_out[i] = '0;
    sb_ls_data_sel = 4'(SRC_ALU_REG);
    sb_ls_addr_sel = 4'(SRC_ALU_REG);
    sb_rf_sel      = 4'(SRC_ALU_REG);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(7, 2, g7, NSYM_SUB + 6, 1'b0);
    checks++;
    if (run_cycles != 321 * 17) fail($sformatf("k=7 full mode took %0d cycles, expected 5,457", run_cycles));
    run(6, 2, g6, NSYM_FULL, 1'b0);
    checks++;
    if (run_cycles != 2889) fail($sformatf("k=6 on the k=7 accelerator took %0d cycles, expected 2,889", run_cycles));
    run(9, 4, g9, NSYM_SUB + 8, 1'b1);
    checks++;
    if (run_cycles != 431745) fail($sformatf("k=9 took %0d cycles, expected 431,745", run_cycles));
    run(8, 4, g8, NSYM_SUB + 7, 1'b1);
    checks++;
    if (run_cycles != 216033) fail($sformatf("k=8 took %0d cycles, expected 216,033", run_cycles));
    $display("bank swaps=%0d substate entries=%0d portion loads=%0d halts=%0d in_a=%0d in_b=%0d rf_routes=%0d ls_routes=%0d mode switches=%0d",
             n_swap, n_entry, n_portion, n_halt, n_in_a, n_in_b, n_sb_rf, n_sb_ls, n_mode_switch);
    checks++;
    if (n_swap == 0 || n_entry == 0 || n_portion == 0 || n_halt == 0 || n_in_a == 0 || n_in_b == 0 ||
        n_sb_rf == 0 || n_sb_ls == 0 || n_mode_switch == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
