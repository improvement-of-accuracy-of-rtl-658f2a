// tb_booth_encoder: all eight multiplier groups against the radix-4 recoding
// table. The expected digit E = -2*y(2i+1) + y(2i) + y(2i-1) is computed
// arithmetically and turned into the expected {neg, one, two, nz}.
module tb_booth_encoder;
  import fwbm_pkg::*;
  logic [2:0]  grp;
  booth_code_t code;
  int checks = 0, failures = 0;
  logic clk;

  booth_encoder dut (.grp(grp), .code(code));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int e;
      booth_code_t exp_code;
      grp = 3'(v);
      #1;
      e = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      exp_code.neg = (e < 0);
      exp_code.one = (e == 1 || e == -1);
      exp_code.two = (e == 2 || e == -2);
      exp_code.nz  = (e != 0);
      checks++;
      if (code !== exp_code) begin
        failures++;
        $display("FAIL grp=%b (E=%0d): code=%b expected %b", grp, e, code, exp_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
