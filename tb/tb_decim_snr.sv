// tb_decim_snr: signal-to-noise test of the decimation filter at its default
// parameters, with modulator streams of four different quality levels.
//
// For each of four sine amplitudes (0.35, 0.2, 0.05 and 0.01 of full scale)
// a 3-bit modulator stream (second-order model, decim_ref_pkg) is fed to the
// filter, one sample per clock. The sine has exactly 41 cycles in 1024 output
// words (about 2 kHz at 50 kS/s), so after 64 settling words its amplitude,
// phase and offset follow from plain correlations with sin and cos over the
// 1024 words; what remains is noise. The same stream also goes through a
// floating-point model of the three stages without truncation. Checked:
//   - the filter's SNR is within 1.6 dB of the floating-point model's,
//   - the passband gain: output amplitude = 32768 * A within 1 %
//     (CIC gain 4096, 4 code steps per full scale, 1 fractional bit),
//   - the SNR falls as the amplitude falls (the four cases differ),
//   - the noise the filter arithmetic itself adds (its output minus the
//     floating-point model's) stays more than 92 dB below a full-scale sine,
//     the modulator SNR the filter is designed to preserve.
module tb_decim_snr;
  import decim_ref_pkg::*;

  localparam int NOUT   = 1024;
  localparam int SETTLE = 64;
  localparam int NCYC   = 41;
  localparam int NIN    = 32 * (NOUT + SETTLE);
  localparam real PI    = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [2:0]  in_data = '0;
  logic out_valid;
  logic signed [16:0] out_data;

  int checks = 0, failures = 0;
  int got [$];
  real amps [4] = '{0.35, 0.2, 0.05, 0.01};
  real snr_rtl [4];

  decimation_filter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && out_valid) got.push_back(int'(out_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Amplitude and noise of a coherent sine in words SETTLE .. SETTLE+NOUT-1.
  function automatic void fit(input real y [], output real amp, output real snr);
    real s, c, m, a, b, r, sig;
    s = 0.0; c = 0.0; m = 0.0;
    for (int i = 0; i < NOUT; i++) begin
      s += y[SETTLE + i] * $sin(2.0 * PI * NCYC * i / NOUT);
      c += y[SETTLE + i] * $cos(2.0 * PI * NCYC * i / NOUT);
      m += y[SETTLE + i];
    end
    a = 2.0 * s / NOUT; b = 2.0 * c / NOUT; m = m / NOUT;
    r = 0.0;
    for (int i = 0; i < NOUT; i++) begin
      real e;
      e = y[SETTLE + i] - m - a * $sin(2.0 * PI * NCYC * i / NOUT)
                            - b * $cos(2.0 * PI * NCYC * i / NOUT);
      r += e * e;
    end
    r = r / NOUT;
    amp = $sqrt(a * a + b * b);
    sig = amp * amp / 2.0;
    snr = 10.0 * $log10(sig / r);
  endfunction

  // Floating-point model: exact CIC, then half-band and FIR with unrounded
  // coefficients and no truncation, scaled like the hardware output.
  function automatic void ideal(input sample_q_t x, output real y []);
    sample_q_t c;
    real hb [$];
    real hbh [11];
    real firh [27];
    c = cic_ref(x);
    foreach (hbh[k]) hbh[k] = HB_H[k] / 4096.0;
    foreach (firh[k]) firh[k] = FIR_H_HALF[(k <= 13) ? k : 26 - k] / 4096.0;
    for (int e = 1; e < c.size(); e += 2) begin
      real acc;
      acc = 0.0;
      for (int k = 0; k < 11; k++) if (e - k >= 0) acc += hbh[k] * c[e - k];
      hb.push_back(acc * 4.0);                 // 2 fractional bits
    end
    y = new[hb.size() / 2];
    for (int m = 0; m < hb.size() / 2; m++) begin
      real acc;
      int e;
      e = 2 * m + 1;
      acc = 0.0;
      for (int k = 0; k < 27; k++) if (e - k >= 0) acc += firh[k] * hb[e - k];
      y[m] = acc / 2.0;                        // 1 fractional bit
    end
  endfunction

  initial begin
    for (int t = 0; t < 4; t++) begin
      sdm3_model mod3;
      sample_q_t xin;
      real yr [], yi [];
      real amp_r, snr_r, amp_i, snr_i, f;
      mod3 = new();
      got.delete();
      xin.delete();
      f = real'(NCYC) / (32.0 * NOUT);           // cycles per input sample
      rst_n = 1'b0;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      for (int n = 0; n < NIN; n++) begin
        int v;
        v = mod3.step(amps[t] * $sin(2.0 * PI * f * n));
        xin.push_back(v);
        in_valid = 1'b1;
        in_data  = 3'(v);
        @(negedge clk);
      end
      in_valid = 1'b0;
      repeat (10) @(negedge clk);
      check(got.size() == NIN / 32, $sformatf("case %0d: %0d words", t, got.size()));
      yr = new[got.size()];
      foreach (got[i]) yr[i] = real'(got[i]);
      ideal(xin, yi);
      fit(yr, amp_r, snr_r);
      fit(yi, amp_i, snr_i);
      snr_rtl[t] = snr_r;
      // Noise the filter itself adds: difference to the floating-point model,
      // offset removed, against a full-scale sine (amplitude 32768).
      begin
        real dm, dp, d;
        dm = 0.0; dp = 0.0;
        for (int i = 0; i < NOUT; i++) dm += yr[SETTLE + i] - yi[SETTLE + i];
        dm = dm / NOUT;
        for (int i = 0; i < NOUT; i++) begin
          d = yr[SETTLE + i] - yi[SETTLE + i] - dm;
          dp += d * d;
        end
        dp = dp / NOUT;
        $display("  filter arithmetic noise: %0.3f LSB^2, %0.1f dB below a full-scale sine", dp,
                 10.0 * $log10(32768.0 * 32768.0 / 2.0 / dp));
        check(10.0 * $log10(32768.0 * 32768.0 / 2.0 / dp) > 92.0,
              $sformatf("case %0d: arithmetic noise %0.3f LSB^2 above the 92 dB target", t, dp));
      end
      $display("amplitude %0.3f: output amplitude %0.1f (expected %0.1f), SNR %0.2f dB, floating-point model %0.2f dB",
               amps[t], amp_r, 32768.0 * amps[t], snr_r, snr_i);
      check(snr_r > snr_i - 1.6, $sformatf("case %0d: SNR loss %0.2f dB", t, snr_i - snr_r));
      check(amp_r > 0.99 * 32768.0 * amps[t] && amp_r < 1.01 * 32768.0 * amps[t],
            $sformatf("case %0d: amplitude %0.1f", t, amp_r));
    end
    for (int t = 1; t < 4; t++)
      check(snr_rtl[t] < snr_rtl[t - 1], $sformatf("SNR not falling at case %0d", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (4 * NIN + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
