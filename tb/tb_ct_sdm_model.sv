// tb_ct_sdm_model: self-checking test of the second-order CT sigma-delta
// modulator model.
//
// For each of several constant inputs the modulator runs 4096 clock periods
// after reset. The first integrator accumulates input minus feedback, so the
// mean of the +-1 output must equal the input to within a few LSBs of 1/4096
// (the bound used is 8/4096), both for the default (circuit) scaling and for
// the unscaled loop (k1 = 1, k2 = 3/2), and the scaled first integrator must
// swing less than half as far as the unscaled one. The integrator states must stay bounded (a
// stable loop), and the output must change state. A slow sine of amplitude
// 0.5 is then applied and the output, averaged over blocks of 128 periods (the
// oversampling ratio), must follow the block average of the input to within
// 0.02.
module tb_ct_sdm_model;

  localparam int N = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin = 0.0;
  logic dout, dout_u;
  real  int1, int2, int1_u, int2_u;

  int checks = 0, failures = 0;

  // Default parameters: the realised circuit's scaling.
  ct_sdm_model dut (.*);
  // The same loop before integrator scaling: k1 = 1, k2 = 3/2.
  ct_sdm_model #(.C1(1.0), .C2(1.0), .A1(1.0), .A2(1.5)) dut_u (
    .clk, .rst_n, .vin, .dout(dout_u), .int1(int1_u), .int2(int2_u));

  always #78 clk = ~clk;   // the model only counts clock periods

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_dc(input real x);
    int ones, ones_u, toggles;
    real mean, mean_u, peak1, peak2, peak1_u;
    logic last;
    ones = 0; ones_u = 0; toggles = 0; peak1 = 0.0; peak2 = 0.0; peak1_u = 0.0;
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) begin rst_n = 1'b1; vin = x; end
    last = dout;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      ones += int'(dout);
      ones_u += int'(dout_u);
      if (int1_u > peak1_u) peak1_u = int1_u;
      if (-int1_u > peak1_u) peak1_u = -int1_u;
      if (dout != last) toggles++;
      last = dout;
      if (int1 > peak1) peak1 = int1;
      if (-int1 > peak1) peak1 = -int1;
      if (int2 > peak2) peak2 = int2;
      if (-int2 > peak2) peak2 = -int2;
    end
    mean = (2.0 * ones - N) / N;
    mean_u = (2.0 * ones_u - N) / N;
    check(mean_u - x < 8.0 / N && x - mean_u < 8.0 / N,
          $sformatf("dc %f: unscaled loop output mean %f", x, mean_u));
    // Scaling the first integrator by 0.33 shrinks its swing accordingly.
    check(peak1 < 0.5 * peak1_u + 0.05,
          $sformatf("dc %f: first integrator peak %f not below half of %f", x, peak1, peak1_u));
    check(mean - x < 8.0 / N && x - mean < 8.0 / N,
          $sformatf("dc %f: output mean %f", x, mean));
    check(peak1 < 4.0 && peak2 < 8.0,
          $sformatf("dc %f: integrator peaks %f %f", x, peak1, peak2));
    check(toggles > N / 16, $sformatf("dc %f: only %0d output changes", x, toggles));
  endtask

  initial begin
    real xs [5] = '{0.0, 0.25, -0.5, 0.6, -0.125};
    repeat (2) @(posedge clk);
    foreach (xs[i]) run_dc(xs[i]);
    // Sine input, block averages over the oversampling ratio.
    begin
      real sum_in, sum_out, err, worst;
      worst = 0.0;
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      for (int b = 0; b < 48; b++) begin
        sum_in = 0.0; sum_out = 0.0;
        for (int i = 0; i < 128; i++) begin
          vin = 0.5 * $sin(2.0 * 3.14159265358979 * (b * 128 + i) / 6400.0);
          @(negedge clk);
          sum_in  += vin;
          sum_out += dout ? 1.0 : -1.0;
        end
        err = (sum_out - sum_in) / 128.0;
        if (b >= 2) begin
          if (err > worst) worst = err;
          if (-err > worst) worst = -err;
        end
      end
      check(worst < 0.02, $sformatf("sine tracking error %f", worst));
      $display("sine block-average error %f", worst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (6 * N + 8000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
