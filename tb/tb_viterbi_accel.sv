// Self-checking test of the Viterbi accelerator at its default size
// (K = 6, four lanes, 8-bit metrics, 2-bit soft values).
//
// Full mode, the way software drives it: configure, load a base address,
// load the output table (8 cycles for k = 6), load a metric column (8 cycles),
// then per symbol one OP_LD_SYM and 2**(k-1)/4 OP_COL cycles (9 cycles per
// symbol for k = 6). Every DATA_OUT word and ADDRESS_OUT is compared with an
// integer reference one cycle after its OP_COL. Runs k = 6, R = 1/2 and
// k = 4, R = 1/3, with random HALT cycles inserted.
// Sub-state mode: a k = 8, R = 1/2 code, longer than the accelerator. Per
// symbol, four 64-entry output-table portions are loaded and each serves 32
// OP_ENTRY cycles with the predecessor metrics on DATA_IN.
module tb_viterbi_accel;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  localparam int K = 6, P = 4, B = 8, SW = 2, NM = 4;
  localparam int VMAX = (1 << SW) - 1;

  logic clk = 0, rst_n = 0, halt = 0;
  logic [2:0]  opcode = '0;
  logic [63:0] data_in = '0;
  logic [31:0] data_out, address_out;
  int checks = 0, failures = 0;
  int halts = 0, columns = 0, entries = 0;

  viterbi_accel dut (.clk, .rst_n, .halt, .opcode, .data_in, .data_out, .address_out);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one opcode for one cycle; return just after the clock edge.
  task automatic step(vit_op_e op, logic [63:0] d);
    // occasionally stall the accelerator first; nothing may change
    if ($urandom_range(0, 15) == 0) begin
      logic [31:0] hold_d, hold_a;
      @(negedge clk);
      halt = 1; opcode = op; data_in = d;
      hold_d = data_out; hold_a = address_out;
      @(posedge clk); #1;
      halts++;
      checks++;
      if (data_out != hold_d || address_out != hold_a) begin
        failures++;
        $display("FAIL outputs changed under HALT");
      end
    end
    @(negedge clk);
    halt = 0; opcode = op; data_in = d;
    @(posedge clk); #1;
    opcode = 3'(OP_NOP);
  endtask

  task automatic expect32(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
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

  task automatic random_symbol(int n, output int r[MAXN]);
    for (int i = 0; i < MAXN; i++) r[i] = (i < n) ? $urandom_range(0, VMAX) : 0;
  endtask

  task automatic run_full(int k, int n, int unsigned gens[MAXN], int nsym);
    longint pm[MAXS], pmn[MAXS];
    bit dec[MAXS];
    int ns, r[MAXN];
    logic [31:0] addr;
    int cycles;
    ns = 1 << (k - 1);
    step(OP_CFG, {32'h0, 32'((n << 4) | k)});
    addr = $urandom & 32'hFFFF_FFF0;
    step(OP_ADDR, {32'h0, addr});
    cycles = 0;
    for (int w = 0; w < (2 * ns) / 8; w++) begin step(OP_LD_OT, ot_word(k, n, gens, w * 8)); cycles++; end
    checks++;
    if (k == 6 && cycles != 8) begin failures++; $display("FAIL output table load cycles %0d", cycles); end
    for (int s = 0; s < ns; s++) pm[s] = 1000 + longint'($urandom_range(0, 40));
    for (int w = 0; w < ns / P; w++) begin
      logic [63:0] d;
      d = '0;
      for (int e = 0; e < P; e++) d[e*B +: B] = B'(pm[w*P + e]);
      step(OP_LD_MT, d);
    end
    for (int t = 0; t < nsym; t++) begin
      random_symbol(n, r);
      step(OP_LD_SYM, pack_sym(n, SW, r));
      ref_step(k, n, VMAX, gens, r, pm, pmn, dec);
      cycles = 1;
      for (int c = 0; c < ns / P; c++) begin
        logic [31:0] e;
        step(OP_COL, {$urandom, $urandom});   // DATA_IN is ignored in full mode
        cycles++;
        for (int i = 0; i < P; i++) e[i*B +: B] = B'(pmn[c*P + i]);
        expect32(data_out, e, $sformatf("k=%0d symbol %0d group %0d", k, t, c));
        expect32(address_out, addr, "address");
        addr += 4;
      end
      checks++;
      if (k == 6 && cycles != 9) begin failures++; $display("FAIL cycles per symbol %0d", cycles); end
      for (int s = 0; s < ns; s++) pm[s] = pmn[s];
      columns++;
    end
  endtask

  task automatic run_substate(int kr, int n, int unsigned gens[MAXN], int nsym);
    longint pm[MAXS], pmn[MAXS];
    bit dec[MAXS];
    int ns, nsa, r[MAXN];
    logic [31:0] addr;
    ns  = 1 << (kr - 1);
    nsa = 1 << (K - 1);
    step(OP_CFG, {32'h0, 32'((n << 4) | K)});
    addr = 32'h0001_0000;
    step(OP_ADDR, {32'h0, addr});
    for (int s = 0; s < ns; s++) pm[s] = 500 + longint'($urandom_range(0, 40));
    for (int t = 0; t < nsym; t++) begin
      random_symbol(n, r);
      step(OP_LD_SYM, pack_sym(n, SW, r));
      ref_step(kr, n, VMAX, gens, r, pm, pmn, dec);
      for (int q = 0; q < ns / nsa; q++) begin
        for (int w = 0; w < (2 * nsa) / 8; w++) step(OP_LD_OT, ot_word(kr, n, gens, q * 2 * nsa + w * 8));
        for (int l = 0; l < nsa; l++) begin
          int j, jp;
          j  = q * nsa + l;
          jp = j & ((ns >> 1) - 1);
          step(OP_ENTRY, {$urandom, 16'($urandom), B'(pm[2*jp + 1]), B'(pm[2*jp])});
          expect32(data_out, 32'(pmn[j] & 255), $sformatf("substate symbol %0d state %0d", t, j));
          expect32(address_out, addr, "substate address");
          addr += 1;
          entries++;
        end
      end
      for (int s = 0; s < ns; s++) pm[s] = pmn[s];
    end
  endtask

  initial begin
    automatic int unsigned g6[MAXN] = '{'o65, 'o57, 0, 0};
    automatic int unsigned g4[MAXN] = '{'o15, 'o13, 'o17, 0};
    automatic int unsigned g8[MAXN] = '{'o371, 'o247, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_full(6, 2, g6, 40);
    run_full(4, 3, g4, 30);
    run_substate(8, 2, g8, 4);
    checks++;
    if (halts == 0 || columns == 0 || entries == 0) begin
      failures++;
      $display("FAIL coverage halts=%0d columns=%0d entries=%0d", halts, columns, entries);
    end
    $display("halts=%0d columns=%0d substate_entries=%0d", halts, columns, entries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
