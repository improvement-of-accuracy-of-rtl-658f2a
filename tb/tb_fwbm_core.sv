// tb_fwbm_core: exhaustive check of the fixed-width Booth core, L = 8.
//
// Every (X, Y) pair is run with the scaling shift sh = 0 and sh = 1 on the
// default core, and with sh = 0..3 on a core built for DSB = 3. The
// expected Pd comes from an arithmetic model of the same estimate: each Booth
// row's value (E_i*X minus its +1 correction, MSB inverted) is formed with
// integer arithmetic, shifted to its columns, and only columns L-1 and up are
// kept; nz_i adds 2^(L-2) per nonzero digit; the sign-extension constant and
// the rounding bit are added; Pd is bits 2L-1..L. The testbench also checks
// accuracy against the exact product: |Pd*2^L - X*Y| stays within 1.5 LSB for
// s = 0, and the signal-to-noise ratio beats direct truncation.
module tb_fwbm_core;
  localparam int L = 8;
  localparam int Q = L / 2;
  logic [L-1:0] x, y, pd, pd3;
  logic         s;
  logic [1:0]   s3;
  int checks = 0, failures = 0;
  logic clk;

  fwbm_core #(.L(L))          dut  (.x(x), .y(y), .sh(s),  .pd(pd));
  fwbm_core #(.L(L), .DSB(3)) dut3 (.x(x), .y(y), .sh(s3), .pd(pd3));

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

  function automatic int ref_pd(int xv, int yv, int sel);
    longint v = 0;
    longint mod2l = longint'(1) << (2 * L);
    longint sum4 = 0;
    int ybit[L+1];
    for (int k = 0; k < L; k++) ybit[k+1] = (yv >> k) & 1;
    ybit[0] = 0;  // y(-1)
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

  initial begin
    static real sig = 0.0, noise_dut = 0.0, noise_dt = 0.0, snr_dut, snr_dt;
    static int  max_err = 0;
    for (int sv = 0; sv < 4; sv++) begin
      for (int xv = -(1 << (L - 1)); xv < (1 << (L - 1)); xv++) begin
        for (int yv = -(1 << (L - 1)); yv < (1 << (L - 1)); yv++) begin
          int exp_pd, got, err;
          x = L'(xv);
          y = L'(yv);
          s  = 1'(sv);
          s3 = 2'(sv);
          #1;
          got    = int'($signed(pd));
          exp_pd = ref_pd(xv, yv, sv);
          if (sv < 2) begin
            checks++;
            if (got != exp_pd) begin
              failures++;
              if (failures < 10) $display("FAIL X=%0d Y=%0d sh=%0d: Pd=%0d expected %0d", xv, yv, sv, got, exp_pd);
            end
          end
          checks++;
          if (int'($signed(pd3)) != exp_pd) begin
            failures++;
            if (failures < 10) $display("FAIL DSB=3 X=%0d Y=%0d sh=%0d: Pd=%0d expected %0d", xv, yv, sv, $signed(pd3), exp_pd);
          end
          if (sv == 0) begin
            err = got * (1 << L) - xv * yv;
            if (err < 0) err = -err;
            if (err > max_err) max_err = err;
            sig       += real'(xv * yv) * real'(xv * yv);
            noise_dut += real'(err) * real'(err);
            noise_dt  += (real'(xv * yv) - real'((xv * yv) >>> L) * real'(1 << L)) ** 2;
          end
        end
      end
    end
    snr_dut = 10.0 * $log10(sig / noise_dut);
    snr_dt  = 10.0 * $log10(sig / noise_dt);
    $display("fwbm_core L=%0d: SNR %0.2f dB (direct truncation %0.2f dB), max error %0.3f LSB",
             L, snr_dut, snr_dt, real'(max_err) / real'(1 << L));
    checks++;
    if (2 * max_err > 3 * (1 << L)) begin
      failures++;
      $display("FAIL max error above 1.5 LSB");
    end
    checks++;
    if (!(snr_dut > snr_dt + 2.0)) begin
      failures++;
      $display("FAIL compensation does not beat direct truncation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
