// Self-checking test of the output table: the table of a K = 6, R = 1/2 code
// is built in software, loaded eight entries per cycle exactly as software
// would, and every read window of 2P entries is compared, including the
// windows that wrap past the end. Loading takes 2**K / 8 = 8 cycles.
module tb_vit_output_table;
  import vit_ref_pkg::*;
  localparam int K = 6, NM = 4, P = 4;
  localparam int NE = 1 << K;

  logic clk = 0, rst_n = 0, we = 0;
  logic [K-1:0] wr_ptr = '0, rd_idx = '0;
  logic [63:0]  wdata = '0;
  logic [2*P*NM-1:0] codes;
  int unsigned table_m[NE];
  int checks = 0, failures = 0;

  vit_output_table #(.K(K), .N_MAX(NM), .P(P)) dut (.clk, .rst_n, .we, .wr_ptr, .wdata, .rd_idx, .codes);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int unsigned gens[MAXN] = '{'o65, 'o57, 0, 0};
    int cycles;
    for (int e = 0; e < NE; e++)
      table_m[e] = enc_out(K, 2, gens, e >> (K - 1), e & ((1 << (K - 1)) - 1));
    repeat (2) @(posedge clk);
    rst_n = 1;
    cycles = 0;
    for (int w = 0; w < NE / 8; w++) begin
      @(negedge clk);
      we = 1; wr_ptr = K'(w * 8);
      for (int e = 0; e < 8; e++) wdata[e*8 +: 8] = 8'(table_m[w*8 + e]) | 8'($urandom_range(0, 15) << 4);
      cycles++;
    end
    @(negedge clk); we = 0;
    checks++;
    if (cycles != 8) failures++;
    for (int i = 0; i < NE; i++) begin
      rd_idx = K'(i);
      #1;
      for (int e = 0; e < 2*P; e++) begin
        checks++;
        if (int'(codes[e*NM +: NM]) != table_m[(i + e) % NE]) begin
          failures++;
          if (failures < 10) $display("FAIL ot[%0d] got %h exp %h", (i+e)%NE, codes[e*NM +: NM], table_m[(i+e)%NE]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
