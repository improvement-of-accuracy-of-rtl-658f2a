// tb_gray_cell: exhaustive check of the gray prefix operator (generate only).
module tb_gray_cell;
  logic gi, pi, gj, go;
  int checks = 0, failures = 0;
  logic clk;

  gray_cell dut (.gi(gi), .pi(pi), .gj(gj), .go(go));

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
      logic exp_go;
      {gi, pi, gj} = 3'(v);
      #1;
      exp_go = (gi == 1'b1) ? 1'b1 : ((pi == 1'b1) ? gj : 1'b0);
      checks++;
      if (go !== exp_go) begin
        failures++;
        $display("FAIL gi=%b pi=%b gj=%b: go=%b", gi, pi, gj, go);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
