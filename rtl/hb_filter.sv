// hb_filter: 11-tap half-band low-pass filter with decimation by two, in
// polyphase transposed direct form with multiplierless CSD coefficients.
//
// Coefficients (12 fractional bits, CSD):
//   h0 = h10 =  2^-6 - 2^-8 + 2^-10 + 2^-12          =  0.012939453125
//   h2 = h8  = -2^-4 - 2^-9 + 2^-11                  = -0.06396484375
//   h4 = h6  =  2^-2 + 2^-4 - 2^-6 + 2^-8 + 2^-10 - 2^-12 = 0.301513671875
//   h5       =  2^-1,  all odd taps other than h5 are zero.
// The even-phase products share three sub-expressions of the even input x0:
//   a1 = x0 + x0>>2,  a2 = x0 - x0>>2,  a3 = x0 + a2>>2
//   h0*x0 = a2>>6 + a1>>10,  h2*x0 = -(x0>>4) - a2>>9,  h4*x0 = a3>>2 + a3>>8
// and the odd phase is a single shift, h5*x1 = x1>>1. Each product is computed
// exactly (input scaled by 2^12, 27 bits for a 15-bit input), then its 6 LSBs
// are dropped before the delay line. Symmetric taps reuse the same product.
// The delay line holds five registers at the output rate:
//   y[m] = sum_k h_2k * x0[m-k] (k = 0..5) + h5 * x1[m-2]
// with x0[m] = x[2m], x1[m] = x[2m-1]. The sum carries 6 fractional bits; the
// 18-bit output keeps 2 of them (shift right by 4, floor). The half-band gain
// (at most 1.257 for any input) leaves one spare integer bit, so the output
// cannot overflow for any 15-bit input.
//
// Interface and timing as cic_stage: samples alternate odd/even starting with
// an odd one after reset; out_valid pulses one clock after each even sample.
// The coefficient values, the sub-expressions, the 6-bit product truncation
// and the 15/18-bit word lengths follow the design description; the position
// of the output binary point is this design's choice.
module hb_filter #(
  parameter int unsigned IN_W  = decim_pkg::HB_IN_W,
  parameter int unsigned OUT_W = decim_pkg::HB_OUT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned FRAC  = decim_pkg::COEF_FRAC;    // 12
  localparam int unsigned TRUNC = decim_pkg::PROD_TRUNC;   // 6
  localparam int unsigned PW    = IN_W + FRAC + 1;         // exact products
  localparam int unsigned TW    = PW - TRUNC;              // truncated products
  localparam int unsigned AW    = TW + 2;                  // delay-line sums
  // Output keeps 2 fractional bits of the 6 left after truncation.
  localparam int unsigned OSHIFT = FRAC - TRUNC - 2;

  logic                 phase;
  logic signed [IN_W-1:0] x1_q;
  logic signed [AW-1:0]  s1_q, s2_q, s3_q, s4_q, s5_q;

  logic signed [PW-1:0] xs0, xs1, a1, a2, a3;
  logic signed [PW-1:0] p0, p2, p4, p5;
  logic signed [AW-1:0] t0, t2, t4, t5;
  logic signed [AW-1:0] y_w;

  always_comb begin
    xs0 = PW'(in_data) <<< FRAC;
    xs1 = PW'(x1_q)    <<< FRAC;
    // Shared sub-expressions.
    a1  = xs0 + (xs0 >>> 2);
    a2  = xs0 - (xs0 >>> 2);
    a3  = xs0 + (a2 >>> 2);
    // Coefficient products (exact).
    p0  = (a2 >>> 6) + (a1 >>> 10);
    p2  = -(xs0 >>> 4) - (a2 >>> 9);
    p4  = (a3 >>> 2) + (a3 >>> 8);
    p5  = xs1 >>> 1;
    // Drop 6 LSBs ahead of the delay line.
    t0  = AW'(p0 >>> TRUNC);
    t2  = AW'(p2 >>> TRUNC);
    t4  = AW'(p4 >>> TRUNC);
    t5  = AW'(p5 >>> TRUNC);
    y_w = t0 + s1_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      x1_q      <= '0;
      {s1_q, s2_q, s3_q, s4_q, s5_q} <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          x1_q <= in_data;
        end else begin
          s5_q      <= t0;               // h10
          s4_q      <= t2 + s5_q;        // h8
          s3_q      <= t4 + s4_q;        // h6
          s2_q      <= t4 + t5 + s3_q;   // h4 and the centre tap h5
          s1_q      <= t2 + s2_q;        // h2
          out_data  <= OUT_W'(y_w >>> OSHIFT);
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
