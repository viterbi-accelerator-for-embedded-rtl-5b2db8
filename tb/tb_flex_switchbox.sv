// Self-checking test of the switchbox at the size of a switchbox extended
// for the accelerator (ten inputs, four address bits): every address, random
// data, and the unused addresses 10..15 returning zero.
module tb_flex_switchbox;
  localparam int N = 10, W = 32;
  logic [W-1:0] in [N];
  logic [3:0]   sel;
  logic [W-1:0] out;
  int checks = 0, failures = 0;

  flex_switchbox #(.N_IN(N), .W(W)) dut (.in, .sel, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) in[i] = $urandom;
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        checks++;
        if (out !== ((s < N) ? in[s] : '0)) begin
          failures++;
          if (failures < 10) $display("FAIL switchbox sel=%0d out=%h", s, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
