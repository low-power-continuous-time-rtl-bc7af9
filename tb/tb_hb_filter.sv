// tb_hb_filter: self-checking test of the 11-tap half-band decimator.
//
// The reference is the direct-form convolution with the 11 coefficients of
// the half-band filter, written here as integers of 2^-12 (53, 0, -262, 0,
// 1235, 2048, 1235, 0, -262, 0, 53). Each product h_k * x is truncated by 6
// bits (floor) as in the filter, the truncated products are summed and the
// sum is shifted right by 4 (floor) to the 18-bit output. Output m is taken at
// input index 2m+1 and must appear one clock after that sample is captured.
// Inputs: random 15-bit values, full-scale runs of both signs, and a
// worst-case pattern (sign of each tap times full scale) that drives the
// output to its largest magnitude.
module tb_hb_filter;

  localparam int unsigned IN_W  = 15;
  localparam int unsigned OUT_W = 18;
  localparam int          NSAMP = 6000;
  localparam int          NTAP  = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0]  in_data = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;

  int checks = 0, failures = 0;
  int hist [0:NSAMP-1];
  int cap_cycle [0:NSAMP-1];
  int h [0:NTAP-1] = '{53, 0, -262, 0, 1235, 2048, 1235, 0, -262, 0, 53};
  int nin = 0, nout = 0, cycle = 0;
  int max_out = 0;

  hb_filter #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int floor_shift(longint v, int n);
    return int'(v >>> n);
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    longint acc;
    int exp_v, e;
    acc = 0;
    e = 2 * nout + 1;
    for (int k = 0; k < NTAP; k++)
      if (e - k >= 0) acc += floor_shift(longint'(h[k]) * hist[e - k], 6);
    exp_v = floor_shift(acc, 4);
    if (exp_v > max_out) max_out = exp_v;
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
        int v, seg;

        seg = (nin / 200) % 4;
        if (seg == 1)      v = ((nin % 200) < 100) ? -(1 << (IN_W - 1)) : (1 << (IN_W - 1)) - 1;
        else if (seg == 3) begin
          // x[e-k] = sign(h[k]) * full scale for every output index e = 2m+1:
          // the negative taps k = 2 and 8 land on n mod 12 = 3 and 9.
          v = ((nin % 12) == 3 || (nin % 12) == 9) ? -(1 << (IN_W - 1)) : (1 << (IN_W - 1)) - 1;
        end
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
    repeat (4) @(posedge clk);
    check(nout == NSAMP / 2, $sformatf("output count %0d, expected %0d", nout, NSAMP / 2));
    $display("largest output %0d", max_out);
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
