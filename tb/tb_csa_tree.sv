// tb_csa_tree: checks that the carry-save tree preserves the sum of its rows.
// Two instances: 5 rows of 10 bits (the size used by the multiplier core) and
// 9 rows of 12 bits (several tree levels with left-over rows). For random rows,
// and for all-ones rows, sum + carry must equal the arithmetic sum of the rows
// modulo 2^W.
module tb_csa_tree;
  logic [4:0][9:0]  rows5;
  logic [9:0]       s5, c5;
  logic [8:0][11:0] rows9;
  logic [11:0]      s9, c9;
  int checks = 0, failures = 0;
  logic clk;

  csa_tree                  dut5 (.rows(rows5), .sum(s5), .carry(c5));
  csa_tree #(.N(9), .W(12)) dut9 (.rows(rows9), .sum(s9), .carry(c9));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e5, e9;
    for (int n = 0; n < 50000; n++) begin
      e5 = 0;
      e9 = 0;
      for (int r = 0; r < 5; r++) begin
        rows5[r] = (n == 0) ? '1 : 10'($urandom);
        e5 += 32'(rows5[r]);
      end
      for (int r = 0; r < 9; r++) begin
        rows9[r] = (n == 0) ? '1 : 12'($urandom);
        e9 += 32'(rows9[r]);
      end
      #1;
      checks += 2;
      if (10'(s5 + c5) != 10'(e5)) begin
        failures++;
        if (failures < 10) $display("FAIL N=5: %0d + %0d != %0d", s5, c5, e5 % 1024);
      end
      if (12'(s9 + c9) != 12'(e9)) begin
        failures++;
        if (failures < 10) $display("FAIL N=9: %0d + %0d != %0d", s9, c9, e9 % 4096);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
