// Self-checking test of the computational unit. First the trellis example
// (K = 3, R = 1/2, hard decisions, received "11", previous column 2 3 0 3)
// on a 1-bit-soft instance, which must give the next column 3 1 2 1; then
// random symbols, code rates, expected outputs and predecessor metrics on a
// default instance, each lane against integer arithmetic.
module tb_vit_comp_unit;
  import vit_ref_pkg::*;
  localparam int P = 4, B = 8, SW = 2, NM = 4;

  logic [NM*SW-1:0]   sym;
  logic [2:0]         n;
  logic [2*B*P-1:0]   pm_pairs;
  logic [2*NM*P-1:0]  codes;
  logic [P*B-1:0]     new_pm;
  logic [P-1:0]       dec;

  logic [NM-1:0]      hsym;
  logic [2*B*P-1:0]   hpm;
  logic [2*NM*P-1:0]  hcodes;
  logic [P*B-1:0]     hnew;
  logic [P-1:0]       hdec;

  int checks = 0, failures = 0;

  vit_comp_unit #(.P(P), .B(B), .SOFT_W(SW), .N_MAX(NM)) dut (.sym, .n, .pm_pairs, .codes, .new_pm, .dec);
  vit_comp_unit #(.P(P), .B(B), .SOFT_W(1), .N_MAX(NM)) dut_hard (.sym(hsym), .n(3'd2), .pm_pairs(hpm),
                                                                 .codes(hcodes), .new_pm(hnew), .dec(hdec));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Trellis example. Output table in {input, state} order; code bit 0 is OUT1.
    automatic int unsigned ot[8] = '{'b00, 'b11, 'b01, 'b10, 'b11, 'b00, 'b10, 'b01};
    automatic int prev[4] = '{2, 3, 0, 3};
    automatic int expc[4] = '{3, 1, 2, 1};
    hsym = 4'b0011;
    for (int j = 0; j < 4; j++) begin
      int jp;
      jp = j & 1;
      hpm[2*B*j +: B]       = B'(prev[2*jp]);
      hpm[2*B*j + B +: B]   = B'(prev[2*jp + 1]);
      hcodes[2*NM*j +: NM]      = NM'(ot[2*j]);
      hcodes[2*NM*j + NM +: NM] = NM'(ot[2*j + 1]);
    end
    #1;
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (int'(hnew[B*j +: B]) != expc[j]) begin
        failures++;
        $display("FAIL trellis example state %0d got %0d exp %0d", j, hnew[B*j +: B], expc[j]);
      end
    end

    for (int t = 0; t < 3000; t++) begin
      int r[MAXN];
      int base;
      n = 3'($urandom_range(1, NM));
      for (int i = 0; i < NM; i++) r[i] = $urandom_range(0, (1 << SW) - 1);
      sym = (NM*SW)'(pack_sym(NM, SW, r));
      base = $urandom_range(0, 1000);
      for (int i = 0; i < 2*P; i++) begin
        pm_pairs[B*i +: B] = B'(base + $urandom_range(0, 100));
        codes[NM*i +: NM]  = NM'($urandom);
      end
      #1;
      for (int i = 0; i < P; i++) begin
        int a0, a1, c0, c1, e;
        bit ed;
        a0 = int'(pm_pairs[2*B*i +: B]);
        a1 = int'(pm_pairs[2*B*i + B +: B]);
        // unwrap relative to base so integer comparison is exact
        if (a0 < (base & 255)) a0 += 256;
        if (a1 < (base & 255)) a1 += 256;
        c0 = a0 + ref_dist(int'(n), (1 << SW) - 1, r, 32'(codes[2*NM*i +: NM]));
        c1 = a1 + ref_dist(int'(n), (1 << SW) - 1, r, 32'(codes[2*NM*i + NM +: NM]));
        ed = c1 < c0;
        e = ed ? c1 : c0;
        checks++;
        if (new_pm[B*i +: B] != B'(e) || dec[i] != ed) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d got %0d exp %0d", i, new_pm[B*i +: B], e & 255);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
