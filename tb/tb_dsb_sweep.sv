// tb_dsb_sweep: accuracy of the DST fixed-width multiplier against the number
// of scaling bits DSb, L = 8, all 65536 operand pairs.
//
// Four multipliers (DSB = 0, 1, 2, 3) see the same operands. Each output is
// compared with an arithmetic model (shift sh = number of redundant sign bits
// of X, capped at DSB; core estimate for X*2^sh with the rounding bit at
// 2^(L-1+sh); result floor-shifted right by sh). For every DSB the
// signal-to-noise ratio against the exact product is computed. The test
// requires the SNR to grow with DSb, the step from DSb = 0 to 1 to be the
// largest one, and every shift amount 0..DSB to occur.
module tb_dsb_sweep;
  localparam int L = 8;
  localparam int Q = L / 2;
  logic [L-1:0] x, y;
  logic [L-1:0] pq [4];
  logic [1:0]   sh [4];
  logic         sh0, sh1;
  logic [1:0]   sh2, sh3;
  int checks = 0, failures = 0;
  logic clk;

  dst_fwbm #(.DSB(0)) dut0 (.x(x), .y(y), .pq(pq[0]), .sh(sh0));
  dst_fwbm #(.DSB(1)) dut1 (.x(x), .y(y), .pq(pq[1]), .sh(sh1));
  dst_fwbm #(.DSB(2)) dut2 (.x(x), .y(y), .pq(pq[2]), .sh(sh2));
  dst_fwbm #(.DSB(3)) dut3 (.x(x), .y(y), .pq(pq[3]), .sh(sh3));

  assign sh[0] = {1'b0, sh0};
  assign sh[1] = {1'b0, sh1};
  assign sh[2] = sh2;
  assign sh[3] = sh3;

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

  function automatic int core_ref(int xv, int yv, int sel);
    longint v = 0;
    longint mod2l = longint'(1) << (2 * L);
    longint sum4 = 0;
    int ybit[L+1];
    for (int k = 0; k < L; k++) ybit[k+1] = (yv >> k) & 1;
    ybit[0] = 0;
    for (int i = 0; i < Q; i++) begin
      longint e = longint'(-2 * ybit[2*i+2]) + longint'(ybit[2*i+1]) + longint'(ybit[2*i]);
      longint neg = (e < 0) ? 1 : 0;
      longint rowv = ((e * longint'(xv) - neg) & ((longint'(1) << (L + 1)) - 1)) ^ (longint'(1) << L);
      longint shifted = rowv << (2 * i);
      v += (shifted >> (L - 1)) << (L - 1);
      if (e != 0) v += longint'(1) << (L - 2);
      sum4 += longint'(1) << (2 * i);
    end
    v += (mod2l - ((sum4 << L) % mod2l)) % mod2l;
    v += longint'(1) << (L - 1 + sel);
    v = (v >> L) & ((longint'(1) << L) - 1);
    return (v >= (longint'(1) << (L - 1))) ? int'(v - (longint'(1) << L)) : int'(v);
  endfunction

  function automatic int exp_shift(int xv, int dsb);
    int k = 0;
    while (k < dsb && xv >= -(1 << (L - 2 - k)) && xv < (1 << (L - 2 - k))) k++;
    return k;
  endfunction

  function automatic int floor_shift(int v, int k);
    int d = 1 << k;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  initial begin
    static real sig = 0.0;
    static real noise [4] = '{0.0, 0.0, 0.0, 0.0};
    static real snr [4];
    static int  seen [4][4];
    for (int d = 0; d < 4; d++) for (int k = 0; k < 4; k++) seen[d][k] = 0;

    for (int xv = -(1 << (L - 1)); xv < (1 << (L - 1)); xv++) begin
      for (int yv = -(1 << (L - 1)); yv < (1 << (L - 1)); yv++) begin
        int p;
        x = L'(xv);
        y = L'(yv);
        #1;
        p = xv * yv;
        sig += real'(p) * real'(p);
        for (int d = 0; d < 4; d++) begin
          int k, exp_q, got;
          k     = exp_shift(xv, d);
          exp_q = floor_shift(core_ref(xv * (1 << k), yv, k), k);
          got   = int'($signed(pq[d]));
          checks++;
          if (got != exp_q || int'(sh[d]) != k) begin
            failures++;
            if (failures < 10)
              $display("FAIL DSB=%0d X=%0d Y=%0d: Pq=%0d sh=%0d expected %0d %0d", d, xv, yv, got, sh[d], exp_q, k);
          end
          seen[d][sh[d]]++;
          noise[d] += (real'(p) - real'(got) * real'(1 << L)) ** 2;
        end
      end
    end

    for (int d = 0; d < 4; d++) begin
      snr[d] = 10.0 * $log10(sig / noise[d]);
      $display("DSb = %0d: SNR %0.2f dB", d, snr[d]);
      for (int k = 0; k <= d; k++) begin
        checks++;
        if (seen[d][k] == 0) begin
          failures++;
          $display("FAIL DSB=%0d never used shift %0d", d, k);
        end
      end
    end
    checks++;
    if (!(snr[0] < snr[1] && snr[1] < snr[2] && snr[2] < snr[3])) begin
      failures++;
      $display("FAIL SNR does not grow with DSb");
    end
    checks++;
    if (!((snr[1] - snr[0]) > (snr[2] - snr[1]) && (snr[1] - snr[0]) > (snr[3] - snr[2]))) begin
      failures++;
      $display("FAIL DSb 0 -> 1 is not the largest step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
