// tb_dst_fwbm: end-to-end, exhaustive test of the DST fixed-width multiplier at
// its default size (L = 8, all 65536 operand pairs).
//
// Expected outputs come from an arithmetic model: scaling is used when X lies
// in [-64, 63]; then the core estimate is taken for 2X with the rounding bit at
// 2^L and halved (floor), otherwise for X with the rounding bit at 2^(L-1).
// The core estimate is formed row by row with integer arithmetic (see
// tb_fwbm_core). The test also
//   - counts both paths (scaled, not scaled) and fails if either never occurs;
//   - checks |Pq*2^L - X*Y| <= 1.5 LSB for every pair;
//   - computes the signal-to-noise ratio of the product against direct
//     truncation, the same core without scaling, and the post-truncated
//     (rounded exact) product, and requires
//     direct truncation < no scaling < with scaling <= post-truncated;
//   - runs the operand pair 63 x 62 (product 3906, 15.26 in output LSBs).
module tb_dst_fwbm;
  localparam int L = 8;
  localparam int Q = L / 2;
  logic [L-1:0] x, y, pq;
  logic         scaled;  // the shift sh; one bit at the default DSB = 1
  int checks = 0, failures = 0;
  logic clk;

  dst_fwbm dut (.x(x), .y(y), .pq(pq), .sh(scaled));

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

  function automatic int floor_div2(int v);
    return (v < 0) ? -((-v + 1) / 2) : v / 2;
  endfunction

  initial begin
    static real sig = 0.0, n_dut = 0.0, n_dt = 0.0, n_ns = 0.0, n_pt = 0.0;
    static real snr_dut, snr_dt, snr_ns, snr_pt;
    static int  n_scaled = 0, n_plain = 0, max_err = 0;

    for (int xv = -(1 << (L - 1)); xv < (1 << (L - 1)); xv++) begin
      for (int yv = -(1 << (L - 1)); yv < (1 << (L - 1)); yv++) begin
        int  exp_q, got, err, p, ns, pt;
        bit  exp_s;
        x = L'(xv);
        y = L'(yv);
        #1;
        p     = xv * yv;
        exp_s = (xv >= -(1 << (L - 2))) && (xv < (1 << (L - 2)));
        exp_q = exp_s ? floor_div2(core_ref(2 * xv, yv, 1)) : core_ref(xv, yv, 0);
        got   = int'($signed(pq));
        checks++;
        if (got != exp_q || scaled != exp_s) begin
          failures++;
          if (failures < 10)
            $display("FAIL X=%0d Y=%0d: Pq=%0d scaled=%b expected %0d %b", xv, yv, got, scaled, exp_q, exp_s);
        end
        if (scaled) n_scaled++;
        else        n_plain++;
        err = got * (1 << L) - p;
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        ns = core_ref(xv, yv, 0);
        pt = (p + (1 << (L - 1))) >>> L;
        sig   += real'(p) * real'(p);
        n_dut += real'(err) * real'(err);
        n_dt  += (real'(p) - real'(p >>> L) * real'(1 << L)) ** 2;
        n_ns  += (real'(p) - real'(ns) * real'(1 << L)) ** 2;
        n_pt  += (real'(p) - real'(pt) * real'(1 << L)) ** 2;
      end
    end

    snr_dut = 10.0 * $log10(sig / n_dut);
    snr_dt  = 10.0 * $log10(sig / n_dt);
    snr_ns  = 10.0 * $log10(sig / n_ns);
    snr_pt  = 10.0 * $log10(sig / n_pt);
    $display("SNR (dB): direct truncation %0.2f, FWBM without scaling %0.2f, DST-FWBM %0.2f, post-truncated %0.2f",
             snr_dt, snr_ns, snr_dut, snr_pt);
    $display("max error %0.3f LSB; scaled path %0d times, plain path %0d times",
             real'(max_err) / real'(1 << L), n_scaled, n_plain);

    checks++;
    if (n_scaled == 0 || n_plain == 0) begin
      failures++;
      $display("FAIL a data-scaling path was never taken");
    end
    checks++;
    if (2 * max_err > 3 * (1 << L)) begin
      failures++;
      $display("FAIL max error above 1.5 LSB");
    end
    checks++;
    if (!(snr_dt < snr_ns && snr_ns < snr_dut && snr_dut <= snr_pt)) begin
      failures++;
      $display("FAIL SNR ordering");
    end

    // Operand pair 63 x 62 = 3906: the fixed-width result must be within the
    // error bound of 3906 / 256 = 15.26 and take the scaled path.
    x = L'(63);
    y = L'(62);
    #1;
    $display("63 x 62: Pq = %0d (exact 3906 / 256 = %0.2f), scaled = %b", $signed(pq), 3906.0 / 256.0, scaled);
    checks++;
    if (!scaled || $signed(pq) < 14 || $signed(pq) > 16) begin
      failures++;
      $display("FAIL 63 x 62");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
