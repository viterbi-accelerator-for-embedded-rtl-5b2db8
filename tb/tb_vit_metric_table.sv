// Self-checking test of the two-bank metric table: random writes of four
// entries to either bank at any index (wrapping), and random reads of the
// four neighbour pairs, against a software copy of both banks.
module tb_vit_metric_table;
  localparam int K = 6, B = 8, P = 4;
  localparam int NS = 1 << (K - 1);

  logic clk = 0, rst_n = 0, we = 0, wr_bank = 0, rd_bank = 0;
  logic [K-2:0] wr_idx = '0;
  logic [P*B-1:0] wdata = '0;
  logic [K-2:0] rd_addr [P];
  logic [2*P*B-1:0] rd_pairs;
  int m[2][NS];
  int checks = 0, failures = 0;

  vit_metric_table #(.K(K), .B(B), .P(P)) dut (.clk, .rst_n, .we, .wr_bank, .wr_idx, .wdata,
                                               .rd_bank, .rd_addr, .rd_pairs);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int i = 0; i < P; i++) rd_addr[i] = (K-1)'(2 * $urandom_range(0, NS / 2 - 1));
    rd_bank = 1'($urandom);
    #1;
    for (int i = 0; i < P; i++) begin
      checks++;
      if (int'(rd_pairs[2*B*i +: B]) != m[rd_bank][rd_addr[i]] ||
          int'(rd_pairs[2*B*i + B +: B]) != m[rd_bank][rd_addr[i] + 1]) begin
        failures++;
        if (failures < 10) $display("FAIL mt read bank %0d addr %0d", rd_bank, rd_addr[i]);
      end
    end
  endtask

  initial begin
    for (int b = 0; b < 2; b++) for (int i = 0; i < NS; i++) m[b][i] = 0;
    for (int i = 0; i < P; i++) rd_addr[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_reads();
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we = 1'($urandom);
      wr_bank = 1'($urandom);
      wr_idx = (K-1)'($urandom);
      wdata = $urandom;
      if (we) for (int e = 0; e < P; e++) m[wr_bank][(int'(wr_idx) + e) % NS] = int'(wdata[e*B +: B]);
      @(posedge clk); #1;
      we = 0;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
