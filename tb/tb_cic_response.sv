// tb_cic_response: pass-band droop and aliasing attenuation of the
// three-section CIC decimator (decimation 8, 1.6 MS/s in, 200 kS/s out) at its
// default widths, measured with sine inputs through a 3-bit modulator.
//
// Each tone (amplitude 0.35 of full scale) has, itself or as its alias at
// 200 kS/s, a whole number of cycles in 2048 output words; its amplitude is
// taken from correlations with sin and cos after 64 settling words and
// compared with 4 * 4096 * 0.35 (the modulator code has 4 steps per unit of
// input, the CIC a DC gain of 4096). The expected gain is the product of the
// three section responses |cos(pi f / fs_k)|^4 at fs_k = 1.6 MHz, 800 kHz and
// 400 kHz. Checked:
//   - droop at 25.0 kHz: within 0.05 dB of the computed -0.88 dB (the
//     section droops 0.04, 0.17 and 0.67 dB), and at 5 kHz within 0.05 dB,
//   - the tone at 175 kHz, which aliases onto 25 kHz, attenuated by at least
//     60 dB, and the tone at 185 kHz, aliasing onto 15 kHz, by at least 75 dB.
module tb_cic_response;
  import decim_ref_pkg::*;

  localparam int  NOUT   = 2048;
  localparam int  SETTLE = 64;
  localparam int  NIN    = 8 * (NOUT + SETTLE);
  localparam real PI     = 3.14159265358979;
  localparam real FOUT   = 200000.0;
  localparam real A      = 0.35;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [2:0]  in_data = '0;
  logic out_valid;
  logic signed [14:0] out_data;

  int checks = 0, failures = 0;
  int got [$];

  // Tone frequency in Hz, cycles of its alias in NOUT words, expected class:
  // 0 = pass band (compare with computed gain), otherwise the minimum
  // attenuation in dB.
  real fin  [4] = '{52.0 * FOUT / NOUT, 256.0 * FOUT / NOUT,
                    FOUT - 256.0 * FOUT / NOUT, FOUT - 154.0 * FOUT / NOUT};
  int  kcyc [4] = '{52, 256, 256, 154};
  real minatt [4] = '{0.0, 0.0, 60.0, 75.0};

  cic_filter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && out_valid) got.push_back(int'(out_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real expected_db(input real f);
    real g;
    g = 1.0;
    for (int k = 0; k < 3; k++) begin
      real c;
      c = $cos(PI * f / (1.6e6 / (1 << k)));
      g = g * c * c * c * c;
    end
    if (g < 0.0) g = -g;
    return 20.0 * $log10(g);
  endfunction

  initial begin
    for (int t = 0; t < 4; t++) begin
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
      check(got.size() == NIN / 8, $sformatf("tone %0d: %0d words", t, got.size()));
      s = 0.0; c = 0.0;
      for (int i = 0; i < NOUT; i++) begin
        s += got[SETTLE + i] * $sin(2.0 * PI * kcyc[t] * i / NOUT);
        c += got[SETTLE + i] * $cos(2.0 * PI * kcyc[t] * i / NOUT);
      end
      amp = 2.0 * $sqrt(s * s + c * c) / NOUT;
      meas_db = 20.0 * $log10(amp / (4.0 * 4096.0 * A) + 1.0e-12);
      exp_db  = expected_db(fin[t]);
      $display("tone %9.1f Hz: measured %8.3f dB, computed %8.3f dB", fin[t], meas_db, exp_db);
      if (minatt[t] == 0.0)
        check(meas_db - exp_db < 0.05 && exp_db - meas_db < 0.05,
              $sformatf("droop at %0.1f Hz: %0.3f dB vs %0.3f dB", fin[t], meas_db, exp_db));
      else
        check(meas_db < -minatt[t],
              $sformatf("alias tone %0.1f Hz only %0.1f dB down", fin[t], -meas_db));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (6 * NIN + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
