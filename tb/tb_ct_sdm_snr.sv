// tb_ct_sdm_snr: in-band signal-to-noise ratio of the continuous-time
// modulator model at its default (circuit) scaling.
//
// A sine of amplitude 0.5 (relative to the DAC reference) with exactly 23
// cycles in N = 65536 clock periods (2.25 kHz at 6.4 MHz) drives the model;
// the +-1 bit stream after 1024 settling periods is recorded. Its discrete
// Fourier transform is evaluated at every bin of the 25 kHz signal band
// (bins 1..256 of N, i.e. oversampling ratio 128), using rotation by a
// fixed twiddle per bin. Signal power is the tone bin, noise the sum of the
// other in-band bins (DC excluded). With no window, the coherent tone does not
// leak. Checked: the tone amplitude is 0.5 within 1 %, and the SNR is at least
// 80 dB (a second-order single-bit loop at OSR 128 is expected near 85 dB).
module tb_ct_sdm_snr;

  localparam int  N      = 65536;
  localparam int  SETTLE = 1024;
  localparam int  KSIG   = 23;
  localparam int  KBAND  = N / 256;   // bin spacing 6.4 MHz / N, so 25 kHz is bin 256
  localparam real PI     = 3.14159265358979;
  localparam real AMP    = 0.5;

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin = 0.0;
  logic dout;
  real  int1, int2;

  int checks = 0, failures = 0;
  bit bits [N];

  ct_sdm_model dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real psig, pnoise, snr, amp;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = -SETTLE; n < N; n++) begin
      vin = AMP * $sin(2.0 * PI * KSIG * n / N);
      @(negedge clk);
      if (n >= 0) bits[n] = dout;
    end
    psig = 0.0; pnoise = 0.0;
    for (int k = 1; k <= KBAND; k++) begin
      real cr, ci, wr, wi, re, im, t;
      wr = $cos(2.0 * PI * k / N);
      wi = -$sin(2.0 * PI * k / N);
      cr = 1.0; ci = 0.0; re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        if (bits[n]) begin re += cr; im += ci; end
        else         begin re -= cr; im -= ci; end
        t  = cr * wr - ci * wi;
        ci = cr * wi + ci * wr;
        cr = t;
      end
      if (k == KSIG) psig = re * re + im * im;
      else pnoise += re * re + im * im;
    end
    amp = 2.0 * $sqrt(psig) / N;
    snr = 10.0 * $log10(psig / pnoise);
    $display("tone amplitude %f, in-band SNR %0.1f dB", amp, snr);
    check(amp > 0.99 * AMP && amp < 1.01 * AMP, $sformatf("tone amplitude %f", amp));
    check(snr >= 80.0, $sformatf("in-band SNR %0.1f dB", snr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    // The transform runs in zero simulated time after the last sample.
    repeat (N + SETTLE + 300) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
