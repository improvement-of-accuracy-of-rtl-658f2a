// tb_black_cell: exhaustive check of the black prefix operator.
// All 16 input combinations; expected go = gi | pi & gj and po = pi & pj are
// computed from the truth-table definition of group generate / propagate.
module tb_black_cell;
  logic gi, pi, gj, pj, go, po;
  int checks = 0, failures = 0;
  logic clk;

  black_cell dut (.gi(gi), .pi(pi), .gj(gj), .pj(pj), .go(go), .po(po));

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
    for (int v = 0; v < 16; v++) begin
      logic exp_go, exp_po;
      {gi, pi, gj, pj} = 4'(v);
      #1;
      // A carry leaves the combined group if the upper part generates one, or
      // passes one generated by the lower part.
      exp_go = (gi == 1'b1) ? 1'b1 : ((pi == 1'b1) ? gj : 1'b0);
      exp_po = (pi == 1'b1) && (pj == 1'b1);
      checks++;
      if (go !== exp_go || po !== exp_po) begin
        failures++;
        $display("FAIL gi=%b pi=%b gj=%b pj=%b: go=%b po=%b", gi, pi, gj, pj, go, po);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
