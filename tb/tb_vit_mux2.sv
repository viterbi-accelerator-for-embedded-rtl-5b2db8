// Self-checking test of the two-way multiplexer with random data on both
// inputs and both select values.
module tb_vit_mux2;
  localparam int W = 64;
  logic sel;
  logic [W-1:0] in0, in1, out;
  int checks = 0, failures = 0;

  vit_mux2 #(.W(W)) dut (.sel, .in0, .in1, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      sel = 1'($urandom);
      in0 = {$urandom, $urandom};
      in1 = {$urandom, $urandom};
      #1;
      checks++;
      if (out !== (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL mux sel=%0d out=%h", sel, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
