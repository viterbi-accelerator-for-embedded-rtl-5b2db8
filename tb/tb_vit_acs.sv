// Self-checking test of the add-compare-select unit: the trellis example's
// four ACS operations, then random metrics around a wrapping base value with
// a spread below half the metric range, checked against integer arithmetic.
module tb_vit_acs;
  localparam int B = 8, DW = 5;

  logic [B-1:0]  pm0, pm1, pm_new;
  logic [DW-1:0] bm0, bm1;
  logic          dec;
  int checks = 0, failures = 0;

  vit_acs #(.B(B), .DIST_W(DW)) dut (.pm0, .pm1, .bm0, .bm1, .pm_new, .dec);

  task automatic check(int a0, int a1, int b0, int b1);
    int s0, s1, e;
    bit ed;
    pm0 = B'(a0); pm1 = B'(a1); bm0 = DW'(b0); bm1 = DW'(b1);
    #1;
    s0 = a0 + b0; s1 = a1 + b1;
    ed = (s1 < s0);
    e  = ed ? s1 : s0;
    checks++;
    if (pm_new != B'(e) || dec != ed) begin
      failures++;
      if (failures < 10) $display("FAIL acs %0d+%0d vs %0d+%0d: got %0d/%0d exp %0d/%0d",
                                  a0, b0, a1, b1, pm_new, dec, e & 255, ed);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Trellis example: next column 3, 1, 2, 1.
    check(2, 3, 2, 0);
    check(0, 3, 1, 1);
    check(2, 3, 0, 2);
    check(0, 3, 1, 1);
    for (int t = 0; t < 5000; t++) begin
      int base;
      base = $urandom_range(0, 100000);
      check(base + $urandom_range(0, 90), base + $urandom_range(0, 90),
            $urandom_range(0, 24), $urandom_range(0, 24));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
