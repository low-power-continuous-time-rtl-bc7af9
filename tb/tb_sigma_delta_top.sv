// tb_sigma_delta_top: end-to-end test of the whole design at its default
// parameters: the decimation filter and, beside it, the continuous-time
// modulator model.
//
// Decimation filter part:
// Input: a 3-bit modulator stream (second-order model from decim_ref_pkg) for
// a sine of 0.3 full scale, then random codes with random gaps in in_valid,
// then full-scale runs of both signs. The whole stream is recorded and passed
// through the bit-exact direct-form references of the CIC, half-band and FIR
// stages. Checked: every CIC, half-band and final output against the
// reference, the number of words at each rate (1/8, 1/16 and 1/32 of the
// input count), and a latency of 5 clocks from the capture of sample 32m+31
// to final output m. Mechanisms counted, each of which must occur: odd
// samples parked in the input delay of each of the five decimate-by-2
// sections, product truncations with non-zero dropped bits in the half-band
// and FIR filters, gaps in the input stream, and the CIC reaching full scale.
//
// Modulator part, run at the same time on its own clock: a sine of 0.5 full
// scale with a period of 6400 modulator clocks (1 kHz at 6.4 MHz). The
// bit stream averaged over blocks of 128 clocks (the oversampling ratio) must
// follow the block average of the input within 0.02; both comparator
// decisions must occur and the integrators must stay bounded.
module tb_sigma_delta_top;
  import decim_ref_pkg::*;

  localparam int unsigned IN_W  = 3;
  localparam int unsigned OUT_W = 17;
  localparam int          NSAMP = 32 * 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0]  in_data = '0;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;

  int checks = 0, failures = 0;
  int cycle = 0;
  sample_q_t xin, cic_out, hb_out, dec_out;
  int cap_cycle [$];
  int out_cycle [$];
  int n_gaps = 0, n_park [5] = '{0, 0, 0, 0, 0}, n_cic_fs = 0;

  logic sdm_clk = 1'b0, sdm_rst_n = 1'b0, sdm_dout;
  real  sdm_vin = 0.0, sdm_int1, sdm_int2;
  int   n_ones = 0, n_zeros = 0, n_blocks = 0;
  real  worst_err = 0.0, peak_int = 0.0;
  bit   sdm_done = 1'b0;

  sigma_delta_top dut (
    .dec_clk(clk), .dec_rst_n(rst_n), .dec_in_valid(in_valid), .dec_in_data(in_data),
    .dec_out_valid(out_valid), .dec_out_data(out_data),
    .sdm_clk, .sdm_rst_n, .sdm_vin, .sdm_dout, .sdm_int1, .sdm_int2);

  always #4 sdm_clk = ~sdm_clk;

  initial begin : sdm_stimulus
    real sum_in, sum_out, err;
    repeat (2) @(negedge sdm_clk);
    sdm_rst_n = 1'b1;
    for (int b = 0; b < 100; b++) begin
      sum_in = 0.0; sum_out = 0.0;
      for (int i = 0; i < 128; i++) begin
        sdm_vin = 0.5 * $sin(2.0 * 3.14159265358979 * (b * 128 + i) / 6400.0);
        @(negedge sdm_clk);
        sum_in  += sdm_vin;
        sum_out += sdm_dout ? 1.0 : -1.0;
        if (sdm_dout) n_ones++; else n_zeros++;
        if (sdm_int2 > peak_int) peak_int = sdm_int2;
        if (-sdm_int2 > peak_int) peak_int = -sdm_int2;
      end
      err = (sum_out - sum_in) / 128.0;
      if (b >= 2) begin
        if (err > worst_err) worst_err = err;
        if (-err > worst_err) worst_err = -err;
      end
      n_blocks++;
    end
    sdm_done = 1'b1;
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Collect the words at every rate and count odd-sample parking.
  always @(posedge clk) if (rst_n) begin
    if (dut.u_decim.u_cic.u_stage1.in_valid && !dut.u_decim.u_cic.u_stage1.phase) n_park[0]++;
    if (dut.u_decim.u_cic.u_stage2.in_valid && !dut.u_decim.u_cic.u_stage2.phase) n_park[1]++;
    if (dut.u_decim.u_cic.u_stage3.in_valid && !dut.u_decim.u_cic.u_stage3.phase) n_park[2]++;
    if (dut.u_decim.u_hb.in_valid && !dut.u_decim.u_hb.phase)                     n_park[3]++;
    if (dut.u_decim.u_fir.in_valid && !dut.u_decim.u_fir.phase)                   n_park[4]++;
    if (dut.u_decim.cic_valid) begin
      cic_out.push_back(int'(dut.u_decim.cic_data));
      if (dut.u_decim.cic_data == -16384) n_cic_fs++;
    end
    if (dut.u_decim.hb_valid) hb_out.push_back(int'(dut.u_decim.hb_data));
    if (out_valid) begin
      dec_out.push_back(int'(out_data));
      out_cycle.push_back(cycle);
    end
  end

  initial begin
    sdm3_model mod3;
    sample_q_t r_cic, r_hb, r_dec;
    int nin;
    mod3 = new();
    nin = 0;
    repeat (3) @(posedge clk);
    check(out_valid == 1'b0, "reset state");
    @(negedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // Inputs change on the falling edge; 'cycle' read there names the rising
    // edge before the capture edge, so a latency of L clocks after capture
    // shows as out_cycle == cap_cycle + L.
    while (nin < NSAMP) begin
      int v;
      bit drive;
      drive = 1'b1;
      if (nin < NSAMP / 2) begin
        v = mod3.step(0.3 * $sin(2.0 * 3.14159265358979 * nin / 1600.0));
      end else if (nin < 3 * NSAMP / 4) begin
        drive = ($urandom_range(0, 3) != 0);
        v = $urandom_range(0, 7) - 4;
      end else begin
        v = ((nin / 256) % 2 == 0) ? -4 : 3;
      end
      if (drive) begin
        xin.push_back(v);
        cap_cycle.push_back(cycle);
        in_valid <= 1'b1;
        in_data  <= IN_W'(v);
        nin++;
      end else begin
        in_valid <= 1'b0;
        n_gaps++;
      end
      @(negedge clk);
    end
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);

    r_cic = cic_ref(xin);
    r_hb  = hb_ref(r_cic);
    r_dec = fir_ref(r_hb);
    check(cic_out.size() == NSAMP / 8,  $sformatf("CIC words %0d", cic_out.size()));
    check(hb_out.size()  == NSAMP / 16, $sformatf("half-band words %0d", hb_out.size()));
    check(dec_out.size() == NSAMP / 32, $sformatf("output words %0d", dec_out.size()));
    foreach (cic_out[i]) if (i < r_cic.size())
      check(cic_out[i] == r_cic[i], $sformatf("CIC %0d: got %0d expected %0d", i, cic_out[i], r_cic[i]));
    foreach (hb_out[i]) if (i < r_hb.size())
      check(hb_out[i] == r_hb[i], $sformatf("HB %0d: got %0d expected %0d", i, hb_out[i], r_hb[i]));
    foreach (dec_out[i]) if (i < r_dec.size()) begin
      check(dec_out[i] == r_dec[i], $sformatf("out %0d: got %0d expected %0d", i, dec_out[i], r_dec[i]));
      check(out_cycle[i] == cap_cycle[32 * i + 31] + 5,
            $sformatf("out %0d latency %0d", i, out_cycle[i] - cap_cycle[32 * i + 31]));
    end

    foreach (n_park[s]) check(n_park[s] > 0, $sformatf("section %0d never parked an odd sample", s));
    check(hb_trunc_events > 0,  "half-band truncation never dropped non-zero bits");
    check(fir_trunc_events > 0, "FIR truncation never dropped non-zero bits");
    check(n_gaps > 0,           "no input gaps");
    check(n_cic_fs > 0,         "CIC never reached full scale");
    wait (sdm_done);
    check(worst_err < 0.02, $sformatf("modulator block-average error %f", worst_err));
    check(n_ones > 0 && n_zeros > 0, "modulator output never changed");
    check(peak_int < 8.0, $sformatf("modulator integrator peak %f", peak_int));
    $display("modulator: %0d blocks, worst block error %f, ones %0d zeros %0d",
             n_blocks, worst_err, n_ones, n_zeros);
    $display("parked odd samples per section: %0d %0d %0d %0d %0d",
             n_park[0], n_park[1], n_park[2], n_park[3], n_park[4]);
    $display("truncations hb=%0d fir=%0d, fir saturations=%0d, input gaps=%0d, cic full scale=%0d",
             hb_trunc_events, fir_trunc_events, fir_sat_events, n_gaps, n_cic_fs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3 * NSAMP + 3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
