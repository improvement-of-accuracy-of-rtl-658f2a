// tb_booth_pp_row: every 8-bit multiplicand against every Booth digit.
// Expected row: (E*X - neg) as an (L+1)-bit two's complement number, i.e. the
// row without its +1 correction, with the MSB inverted.
module tb_booth_pp_row;
  import fwbm_pkg::*;
  localparam int L = 8;
  logic [L-1:0] x;
  booth_code_t  code;
  logic [L:0]   row;
  int checks = 0, failures = 0;
  logic clk;

  booth_pp_row #(.L(L)) dut (.x(x), .code(code), .row(row));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = -2; e <= 2; e++) begin
      for (int xv = -(1 << (L - 1)); xv < (1 << (L - 1)); xv++) begin
        int val;
        logic [L:0] exp_row;
        x = L'(xv);
        code.neg = (e < 0);
        code.one = (e == 1 || e == -1);
        code.two = (e == 2 || e == -2);
        code.nz  = (e != 0);
        #1;
        val = e * xv - int'(code.neg);
        exp_row = (L+1)'(val) ^ (L+1)'(1 << L);
        checks++;
        if (row !== exp_row) begin
          failures++;
          if (failures < 10) $display("FAIL E=%0d X=%0d: row=%b expected %b", e, xv, row, exp_row);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
