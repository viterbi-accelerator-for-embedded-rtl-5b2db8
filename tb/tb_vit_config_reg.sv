// Self-checking test of the configuration register: reset value, writes of
// every legal {n, k}, and holding while the write enable is low.
module tb_vit_config_reg;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [CFG_W-1:0] din = '0;
  vit_cfg_t cfg;
  int checks = 0, failures = 0;

  vit_config_reg #(.K(6), .N_MAX(4)) dut (.clk, .rst_n, .we, .din, .cfg);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cfg(int k, int n);
    checks++;
    if (int'(cfg.k) != k || int'(cfg.n) != n) begin
      failures++;
      $display("FAIL cfg k=%0d n=%0d exp k=%0d n=%0d", cfg.k, cfg.n, k, n);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 expect_cfg(6, 2);
    rst_n = 1;
    for (int k = 3; k <= 6; k++)
      for (int n = 1; n <= 4; n++) begin
        @(negedge clk);
        we = 1; din = CFG_W'((n << 4) | k);
        @(negedge clk);
        we = 0; din = CFG_W'(7'h7f);
        expect_cfg(k, n);
        repeat (2) @(negedge clk);
        expect_cfg(k, n);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
