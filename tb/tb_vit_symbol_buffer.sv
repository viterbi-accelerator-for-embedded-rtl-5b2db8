// Self-checking test of the symbol buffer: cleared by reset, loads in the
// cycle of its write enable, holds otherwise.
module tb_vit_symbol_buffer;
  localparam int S = 8;
  logic clk = 0, rst_n = 0, we = 0;
  logic [S-1:0] din = '1, sym, model = '0;
  int checks = 0, failures = 0;

  vit_symbol_buffer #(.S(S)) dut (.clk, .rst_n, .we, .din, .sym);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (sym != '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = 1'($urandom);
      din = S'($urandom);
      if (we) model = din;
      @(posedge clk); #1;
      checks++;
      if (sym != model) begin
        failures++;
        if (failures < 10) $display("FAIL sym=%h exp %h", sym, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
