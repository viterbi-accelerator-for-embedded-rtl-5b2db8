// Self-checking test of the address pointer incrementer: load of a base
// address, advances by 4 (a full-mode word) and by 1 (a sub-state entry),
// and holding while idle, against a software pointer.
module tb_vit_addr_incr;
  logic clk = 0, rst_n = 0, load = 0, adv = 0;
  logic [31:0] base = '0, addr_out;
  logic [3:0]  step = '0;
  logic [31:0] ptr_m = '0, out_m = '0;
  int checks = 0, failures = 0;

  vit_addr_incr #(.ADDR_W(32), .STEP_W(4)) dut (.clk, .rst_n, .load, .base, .adv, .step, .addr_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, 9);
      load = (r == 0);
      adv  = (r >= 3);
      base = $urandom;
      step = (r >= 6) ? 4'd1 : 4'd4;
      if (load) ptr_m = base;
      else if (adv) begin out_m = ptr_m; ptr_m = ptr_m + 32'(step); end
      @(posedge clk); #1;
      checks++;
      if (addr_out != out_m) begin
        failures++;
        if (failures < 10) $display("FAIL addr_out=%h exp %h", addr_out, out_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
