// tb_cic_filter: self-checking test of the three-section CIC decimator.
//
// The reference is the single-stage CIC written as one 29-tap FIR filter:
// the coefficients of ((1 - z^-8)/(1 - z^-1))^4 = (1 + z^-1 + ... + z^-7)^4
// are computed here by polynomial multiplication and convolved with the
// recorded inputs. Output m must equal that convolution taken at input index
// 8m+7, arrive 3 clocks after that sample is captured, and there must be one
// output per 8 inputs. Inputs are random 3-bit values with runs of full-scale
// values, first on every clock and then on random clocks.
module tb_cic_filter;

  localparam int unsigned IN_W  = 3;
  localparam int unsigned OUT_W = IN_W + 12;
  localparam int          NSAMP = 8000;
  localparam int          NTAP  = 29;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0]  in_data = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;

  int checks = 0, failures = 0;
  int hist [0:NSAMP-1];
  int g [0:NTAP-1];
  int nin = 0, nout = 0, cycle = 0;
  int cap_cycle [0:NSAMP-1];
  int max_abs = 0;

  cic_filter #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // g = (1 + z^-1 + ... + z^-7)^4
  initial begin
    int tmp [0:NTAP-1];
    int len;
    foreach (g[i]) g[i] = 0;
    g[0] = 1; len = 1;
    for (int r = 0; r < 4; r++) begin
      foreach (tmp[i]) tmp[i] = 0;
      for (int i = 0; i < len; i++)
        for (int j = 0; j < 8; j++) tmp[i + j] += g[i];
      len += 7;
      foreach (g[i]) g[i] = tmp[i];
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int exp_v, e;
    exp_v = 0;
    e = 8 * nout + 7;
    for (int k = 0; k < NTAP; k++)
      if (e - k >= 0) exp_v += g[k] * hist[e - k];
    if (exp_v < 0 && -exp_v > max_abs) max_abs = -exp_v;
    if (exp_v > max_abs) max_abs = exp_v;
    check(int'(out_data) == exp_v,
          $sformatf("output %0d: got %0d expected %0d", nout, out_data, exp_v));
    check(cycle == cap_cycle[e] + 3,
          $sformatf("output %0d latency: cycle %0d, sample seen at %0d", nout, cycle, cap_cycle[e]));
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    check(out_valid == 1'b0, "reset state");
    @(negedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // Inputs change on the falling edge; 'cycle' read there names the rising
    // edge before the capture edge, so a latency of L clocks after capture
    // shows as cycle == cap_cycle + L at the checker.
    while (nin < NSAMP) begin
      bit drive;
      drive = (nin < NSAMP / 2) ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (drive) begin
        int v;
        if ((nin / 64) % 4 == 1)      v = -(1 << (IN_W - 1));      // full-scale run
        else if ((nin / 64) % 4 == 3) v = (1 << (IN_W - 1)) - 1;
        else v = $urandom_range(0, (1 << IN_W) - 1) - (1 << (IN_W - 1));
        hist[nin] = v;
        cap_cycle[nin] = cycle;
        in_valid <= 1'b1;
        in_data  <= IN_W'(v);
        nin++;
      end else begin
        in_valid <= 1'b0;
      end
      @(negedge clk);
    end
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
    check(nout == NSAMP / 8, $sformatf("output count %0d, expected %0d", nout, NSAMP / 8));
    // Full-scale runs must have driven the output to its limit -4 * 4096.
    check(max_abs == (1 << (IN_W - 1)) * 4096, $sformatf("full-scale output not reached (%0d)", max_abs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (4 * NSAMP) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
