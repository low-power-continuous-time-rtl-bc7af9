// tb_fir_filter: self-checking test of the 27-tap decimate-by-2 FIR filter.
//
// The reference is the direct-form convolution with the 27 symmetric
// coefficients written as integers of 2^-12 (12, 16, -20, -32, 44, 54, -88,
// -74, 184, 100, -384, -118, 1284, 2168, then mirrored). Each product is
// truncated by 6 bits (floor), the sum is shifted right by 7 (floor) and
// clamped to the 17-bit range. Output m is taken at input index 2m+1 and must
// appear one clock after that sample is captured. Inputs: random 18-bit
// values, and in every fourth block of 64 samples the worst-case pattern
// sign(h[k]) * full scale aimed at one output, which must drive the output
// into saturation.
module tb_fir_filter;

  localparam int unsigned IN_W  = 18;
  localparam int unsigned OUT_W = 17;
  localparam int          NSAMP = 6000;
  localparam int          NTAP  = 27;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0]  in_data = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;

  int checks = 0, failures = 0;
  int hist [0:NSAMP-1];
  int cap_cycle [0:NSAMP-1];
  int hh [0:13] = '{12, 16, -20, -32, 44, 54, -88, -74, 184, 100, -384, -118, 1284, 2168};
  int h [0:NTAP-1];
  int nin = 0, nout = 0, cycle = 0;
  int n_sat = 0;

  fir_filter #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial for (int k = 0; k < NTAP; k++) h[k] = hh[(k <= 13) ? k : 26 - k];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    longint acc, raw;
    int exp_v, e;
    acc = 0;
    e = 2 * nout + 1;
    for (int k = 0; k < NTAP; k++)
      if (e - k >= 0) acc += (longint'(h[k]) * hist[e - k]) >>> 6;
    raw = acc >>> 7;
    if (raw > (1 << (OUT_W - 1)) - 1) begin
      exp_v = (1 << (OUT_W - 1)) - 1; n_sat++;
    end else if (raw < -(1 << (OUT_W - 1))) begin
      exp_v = -(1 << (OUT_W - 1)); n_sat++;
    end else exp_v = int'(raw);
    check(int'(out_data) == exp_v,
          $sformatf("output %0d: got %0d expected %0d", nout, out_data, exp_v));
    check(cycle == cap_cycle[e] + 1,
          $sformatf("output %0d latency: cycle %0d, sample seen at %0d", nout, cycle, cap_cycle[e]));
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    check(out_valid == 1'b0, "reset state");
    @(negedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    while (nin < NSAMP) begin
      bit drive;
      drive = (nin < NSAMP / 2) ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (drive) begin
        int v, k, sgn;
        k = (nin / 64) * 64 + 63 - nin;       // tap that meets the block's last output
        if ((nin / 64) % 4 == 3 && k < NTAP) begin
          sgn = ((nin / 256) % 2 == 0) ? 1 : -1;   // alternate positive / negative overload
          v = ((h[k] >= 0) == (sgn > 0)) ? (1 << (IN_W - 1)) - 1 : -(1 << (IN_W - 1));
        end else begin
          v = $urandom_range(0, (1 << IN_W) - 1) - (1 << (IN_W - 1));
        end
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
    repeat (4) @(posedge clk);
    check(nout == NSAMP / 2, $sformatf("output count %0d, expected %0d", nout, NSAMP / 2));
    check(n_sat > 0, "output saturation never exercised");
    $display("saturated outputs: %0d", n_sat);
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
