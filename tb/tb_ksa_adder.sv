// tb_ksa_adder: checks the Kogge-Stone adder against integer addition.
// Three instances: the default 16-bit adder (corner cases plus random
// operands), a 10-bit one (the width used inside the multiplier core,
// exhaustive over a, b and cin) and a 5-bit one (not a power of two).
// Sum and carry-out are compared with a + b + cin computed in 64-bit integers.
module tb_ksa_adder;
  logic [15:0] a16, b16, s16;
  logic [9:0]  a10, b10, s10;
  logic [4:0]  a5, b5, s5;
  logic        cin, co16, co10, co5;
  int checks = 0, failures = 0;
  logic clk;

  ksa_adder                dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));
  ksa_adder #(.WIDTH(10))  dut10 (.a(a10), .b(b10), .cin(cin), .sum(s10), .cout(co10));
  ksa_adder #(.WIDTH(5))   dut5  (.a(a5),  .b(b5),  .cin(cin), .sum(s5),  .cout(co5));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint unsigned got, input longint unsigned exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    longint unsigned e;
    // 16-bit: corners (full carry chain) and random
    for (int n = 0; n < 20000; n++) begin
      case (n)
        0: begin a16 = 16'hFFFF; b16 = 16'h0001; cin = 1'b0; end
        1: begin a16 = 16'hFFFF; b16 = 16'h0000; cin = 1'b1; end
        2: begin a16 = 16'hFFFF; b16 = 16'hFFFF; cin = 1'b1; end
        3: begin a16 = 16'h0000; b16 = 16'h0000; cin = 1'b0; end
        4: begin a16 = 16'h5555; b16 = 16'hAAAA; cin = 1'b1; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); cin = 1'($urandom); end
      endcase
      #1;
      e = longint'(a16) + longint'(b16) + longint'(cin);
      check(64'({co16, s16}), e, "16-bit");
    end
    // 10-bit: exhaustive
    for (int va = 0; va < 1024; va++) begin
      for (int vb = 0; vb < 1024; vb++) begin
        for (int vc = 0; vc < 2; vc++) begin
          a10 = 10'(va); b10 = 10'(vb); cin = 1'(vc);
          a5 = 5'(va); b5 = 5'(vb);
          #1;
          e = longint'(va) + longint'(vb) + longint'(vc);
          check(64'({co10, s10}), e, "10-bit");
          if (va < 32 && vb < 32) check(64'({co5, s5}), e, "5-bit");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
