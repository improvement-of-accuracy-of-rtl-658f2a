// tb_ds_in_scaler: all 8-bit multiplicands, for the default one-bit scaler and
// for a three-bit one (DSB = 3). The expected shift is the largest
// k <= DSB with X in [-2^(L-1-k), 2^(L-1-k)) (X then fits in L-k bits), and xd
// must equal X * 2^k, compared as signed integers.
module tb_ds_in_scaler;
  localparam int L = 8;
  logic [L-1:0] x, xd1, xd3;
  logic         sh1;
  logic [1:0]   sh3;
  int checks = 0, failures = 0;
  logic clk;

  ds_in_scaler #(.L(L))           dut1 (.x(x), .xd(xd1), .sh(sh1));
  ds_in_scaler #(.L(L), .DSB(3))  dut3 (.x(x), .xd(xd3), .sh(sh3));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_shift(int xv, int dsb);
    int k = 0;
    while (k < dsb && xv >= -(1 << (L - 2 - k)) && xv < (1 << (L - 2 - k))) k++;
    return k;
  endfunction

  initial begin
    for (int xv = -(1 << (L - 1)); xv < (1 << (L - 1)); xv++) begin
      int e1, e3;
      x = L'(xv);
      #1;
      e1 = exp_shift(xv, 1);
      e3 = exp_shift(xv, 3);
      checks += 2;
      if (int'(sh1) != e1 || int'($signed(xd1)) != xv * (1 << e1)) begin
        failures++;
        $display("FAIL DSB=1 X=%0d: sh=%0d xd=%0d expected sh=%0d", xv, sh1, $signed(xd1), e1);
      end
      if (int'(sh3) != e3 || int'($signed(xd3)) != xv * (1 << e3)) begin
        failures++;
        $display("FAIL DSB=3 X=%0d: sh=%0d xd=%0d expected sh=%0d", xv, sh3, $signed(xd3), e3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
