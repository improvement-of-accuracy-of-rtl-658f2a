// tb_ds_out_scaler: all 8-bit products and every shift, for the default
// one-bit scaler and for DSB = 3. The output must be floor(Pd / 2^sh) of the
// signed value.
module tb_ds_out_scaler;
  localparam int L = 8;
  logic [L-1:0] pd, pq1, pq3;
  logic         sh1;
  logic [1:0]   sh3;
  int checks = 0, failures = 0;
  logic clk;

  ds_out_scaler #(.L(L))          dut1 (.pd(pd), .sh(sh1), .pq(pq1));
  ds_out_scaler #(.L(L), .DSB(3)) dut3 (.pd(pd), .sh(sh3), .pq(pq3));

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

  // floor(v / 2^k), also for negative v
  function automatic int floor_shift(int v, int k);
    int d = 1 << k;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  initial begin
    for (int k = 0; k < 4; k++) begin
      for (int v = -(1 << (L - 1)); v < (1 << (L - 1)); v++) begin
        pd  = L'(v);
        sh1 = 1'(k);
        sh3 = 2'(k);
        #1;
        if (k < 2) begin
          checks++;
          if (int'($signed(pq1)) != floor_shift(v, k)) begin
            failures++;
            $display("FAIL DSB=1 Pd=%0d sh=%0d: Pq=%0d", v, k, $signed(pq1));
          end
        end
        checks++;
        if (int'($signed(pq3)) != floor_shift(v, k)) begin
          failures++;
          $display("FAIL DSB=3 Pd=%0d sh=%0d: Pq=%0d", v, k, $signed(pq3));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
