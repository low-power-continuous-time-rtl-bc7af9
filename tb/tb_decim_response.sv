// tb_decim_response: frequency response of the decimation filter at its
// default parameters, measured with sine inputs through a 3-bit modulator.
//
// Each tone (amplitude 0.35 of full scale) is chosen so that it, or its alias
// after decimation to 50 kS/s, has a whole number of cycles in 1024 output
// words; amplitude follows from correlations with sin and cos over those words
// after 64 settling words. The expected gain of the chain is computed here from
// the coefficient lists (DTFT of the 29-tap CIC at 1.6 MS/s, the half-band at
// 200 kS/s and the FIR at 100 kS/s). Checked:
//   - passband tones at 2.0, 10.0 and 20.0 kHz: measured gain within 0.05 dB
//     of the computed gain (which is within 0.6 dB of 0 dB there),
//   - stopband tones at 34.0, 40.0, 60.0 and 90.0 kHz, which alias into the
//     signal band: attenuation of at least 60 dB.
module tb_decim_response;
  import decim_ref_pkg::*;

  localparam int  NOUT   = 1024;
  localparam int  SETTLE = 64;
  localparam int  NIN    = 32 * (NOUT + SETTLE);
  localparam real PI     = 3.14159265358979;
  localparam real FOUT   = 50000.0;
  localparam real A      = 0.35;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [2:0]  in_data = '0;
  logic out_valid;
  logic signed [16:0] out_data;

  int checks = 0, failures = 0;
  int got [$];

  // Tone frequency in Hz, cycles of its alias in NOUT words, passband flag.
  real fin  [7] = '{41.0 * FOUT / NOUT, 205.0 * FOUT / NOUT, 410.0 * FOUT / NOUT,
                    FOUT - 327.0 * FOUT / NOUT, FOUT - 205.0 * FOUT / NOUT,
                    FOUT + 205.0 * FOUT / NOUT, 2.0 * FOUT - 205.0 * FOUT / NOUT};
  int  kcyc [7] = '{41, 205, 410, 327, 205, 205, 205};
  bit  pass [7] = '{1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0};

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

  function automatic real mag(input real h [], input real f, input real fs);
    real re, im;
    re = 0.0; im = 0.0;
    foreach (h[k]) begin
      re += h[k] * $cos(2.0 * PI * f / fs * k);
      im -= h[k] * $sin(2.0 * PI * f / fs * k);
    end
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real expected_db(input real f);
    real g [], hb [], fir [];
    real t [];
    g = new[29]; hb = new[11]; fir = new[27];
    foreach (g[i]) g[i] = 0.0;
    g[0] = 1.0;
    for (int r = 0; r < 4; r++) begin
      t = new[29];
      foreach (t[i]) t[i] = 0.0;
      for (int i = 0; i < 29; i++) for (int j = 0; j < 8; j++) if (i + j < 29) t[i + j] += g[i];
      g = t;
    end
    foreach (g[i]) g[i] = g[i] / 4096.0;
    foreach (hb[k]) hb[k] = HB_H[k] / 4096.0;
    foreach (fir[k]) fir[k] = FIR_H_HALF[(k <= 13) ? k : 26 - k] / 4096.0;
    return 20.0 * $log10(mag(g, f, 1.6e6) * mag(hb, f, 2.0e5) * mag(fir, f, 1.0e5));
  endfunction

  initial begin
    for (int t = 0; t < 7; t++) begin
      sdm3_model mod3;
      real s, c, amp, meas_db, exp_db;
      mod3 = new();
      got.delete();
      rst_n = 1'b0;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      for (int n = 0; n < NIN; n++) begin
        int v;
        v = mod3.step(A * $sin(2.0 * PI * fin[t] * n / 1.6e6));
        in_valid = 1'b1;
        in_data  = 3'(v);
        @(negedge clk);
      end
      in_valid = 1'b0;
      repeat (10) @(negedge clk);
      check(got.size() == NIN / 32, $sformatf("tone %0d: %0d words", t, got.size()));
      s = 0.0; c = 0.0;
      for (int i = 0; i < NOUT; i++) begin
        s += got[SETTLE + i] * $sin(2.0 * PI * kcyc[t] * i / NOUT);
        c += got[SETTLE + i] * $cos(2.0 * PI * kcyc[t] * i / NOUT);
      end
      amp = 2.0 * $sqrt(s * s + c * c) / NOUT;
      meas_db = 20.0 * $log10(amp / (32768.0 * A) + 1.0e-12);
      exp_db  = expected_db(fin[t]);
      $display("tone %8.1f Hz: measured %8.2f dB, computed %8.2f dB", fin[t], meas_db, exp_db);
      if (pass[t])
        check(meas_db - exp_db < 0.05 && exp_db - meas_db < 0.05,
              $sformatf("passband tone %0.1f Hz: %0.3f dB vs %0.3f dB", fin[t], meas_db, exp_db));
      else
        check(meas_db < -60.0, $sformatf("stopband tone %0.1f Hz only %0.1f dB down", fin[t], -meas_db));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (8 * NIN + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
