// Self-checking test of the distance unit: random symbols, expected bits and
// code rates against a sum of absolute differences to the ideal levels, plus
// the hard-decision (Hamming) case of the trellis example, run at SOFT_W = 1.
module tb_vit_distance;
  import vit_ref_pkg::*;

  localparam int SW = 2, NM = 4;
  localparam int DW = $clog2(NM * ((1 << SW) - 1) + 1);

  logic [NM*SW-1:0] sym;
  logic [NM-1:0]    code;
  logic [2:0]       n;
  logic [DW-1:0]    bm;

  logic [NM-1:0] hsym, hcode;
  logic [2:0]    hn;
  logic [2:0]    hbm;

  int checks = 0, failures = 0;

  vit_distance #(.SOFT_W(SW), .N_MAX(NM)) dut (.sym, .code, .n, .bm);
  vit_distance #(.SOFT_W(1), .N_MAX(NM)) dut_hard (.sym(hsym), .code(hcode), .n(hn), .bm(hbm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r[MAXN];
    int exp_d;
    for (int t = 0; t < 3000; t++) begin
      n = 3'($urandom_range(1, NM));
      code = NM'($urandom);
      for (int i = 0; i < NM; i++) r[i] = $urandom_range(0, (1 << SW) - 1);
      sym = (NM*SW)'(pack_sym(NM, SW, r));
      #1;
      exp_d = ref_dist(int'(n), (1 << SW) - 1, r, 32'(code));
      checks++;
      if (int'(bm) != exp_d) begin
        failures++;
        if (failures < 10) $display("FAIL dist n=%0d code=%b sym=%h got %0d exp %0d", n, code, sym, bm, exp_d);
      end
    end
    // Trellis example: received "11" against the eight table entries
    // 00 11 10 01 11 00 01 10 gives branch metrics 2 0 1 1 0 2 1 1.
    begin
      automatic int unsigned ent[8] = '{'b00, 'b11, 'b01, 'b10, 'b11, 'b00, 'b10, 'b01};
      automatic int exp_bm[8] = '{2, 0, 1, 1, 0, 2, 1, 1};
      hn = 3'd2;
      hsym = 4'b0011;
      for (int e = 0; e < 8; e++) begin
        hcode = NM'(ent[e]);
        #1;
        checks++;
        if (int'(hbm) != exp_bm[e]) begin
          failures++;
          $display("FAIL hard entry %0d got %0d exp %0d", e, hbm, exp_bm[e]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
