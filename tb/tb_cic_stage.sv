// tb_cic_stage: self-checking test of one (1+z^-1)^4, decimate-by-2 section.
//
// Random two's complement samples (including the extreme values) are fed with
// in_valid high on every clock in the first half and on random clocks in the
// second. Every output is compared with the direct-form convolution of the
// recorded inputs with the binomial taps 1 4 6 4 1, and must appear exactly
// one clock after the even sample that completes its pair. The number of
// outputs must be half the number of inputs.
module tb_cic_stage;

  localparam int unsigned IN_W  = 3;
  localparam int unsigned OUT_W = IN_W + 4;
  localparam int          NSAMP = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0]  in_data = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;

  int checks = 0, failures = 0;
  int hist [0:NSAMP-1];
  int nin = 0, nout = 0;
  int last_even_cycle = -10, cycle = 0;
  int taps [0:4] = '{1, 4, 6, 4, 1};

  cic_stage #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Output checker.
  always @(posedge clk) if (rst_n && out_valid) begin
    int exp_v, e;
    exp_v = 0;
    e = 2 * nout + 1;   // index of the even sample closing this pair
    for (int k = 0; k < 5; k++)
      if (e - k >= 0) exp_v += taps[k] * hist[e - k];
    check(int'(out_data) == exp_v,
          $sformatf("output %0d: got %0d expected %0d", nout, out_data, exp_v));
    check(cycle == last_even_cycle + 1,
          $sformatf("output %0d latency: cycle %0d, even sample at %0d", nout, cycle, last_even_cycle));
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    check(out_valid == 1'b0 && out_data == '0, "reset state");
    @(negedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // Inputs change on the falling edge; the block captures them on the next
    // rising edge, so the checker's reading of 'cycle' is last_even_cycle + 1
    // exactly one clock after the capture edge.
    while (nin < NSAMP) begin
      bit drive;
      drive = (nin < NSAMP / 2) ? 1'b1 : ($urandom_range(0, 2) != 0);
      if (drive) begin
        int v;
        case ($urandom_range(0, 7))
          0: v = -(1 << (IN_W - 1));
          1: v = (1 << (IN_W - 1)) - 1;
          default: v = $urandom_range(0, (1 << IN_W) - 1) - (1 << (IN_W - 1));
        endcase
        hist[nin] = v;
        in_valid <= 1'b1;
        in_data  <= IN_W'(v);
        if (nin % 2 == 1) last_even_cycle = cycle;
        nin++;
      end else begin
        in_valid <= 1'b0;
      end
      @(negedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    check(nout == NSAMP / 2, $sformatf("output count %0d, expected %0d", nout, NSAMP / 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20 * NSAMP) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
