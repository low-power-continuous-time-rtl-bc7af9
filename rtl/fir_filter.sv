// fir_filter: 27-tap linear-phase low-pass FIR filter with decimation by two,
// the last stage of the decimation filter (100 kS/s in, 50 kS/s out).
//
// The symmetric coefficients (h_k = h_26-k, 12 fractional bits) are sums of
// few signed powers of two:
//   h0  =  2^-8 - 2^-10           h1  =  2^-8
//   h2  = -2^-8 - 2^-10           h3  = -2^-7
//   h4  =  2^-6 - 2^-8 - 2^-10    h5  =  2^-6 - 2^-9 - 2^-11
//   h6  = -2^-5 + 2^-7 + 2^-9     h7  = -2^-6 - 2^-9 - 2^-11
//   h8  =  2^-4 - 2^-6 - 2^-9     h9  =  2^-5 - 2^-7 + 2^-10
//   h10 = -2^-3 + 2^-5            h11 = -2^-5 + 2^-9 + 2^-11
//   h12 =  2^-2 + 2^-4 + 2^-10    h13 =  2^-1 + 2^-5 - 2^-9
// In polyphase form the even coefficients act on the even samples x0 and the
// odd ones on the odd samples x1; sub-expressions are shared within each phase:
//   a1 = x0 - x0>>2   a2 = x0 + x0>>2   a3 = x0 - a2>>2
//   a4 = a1 - x0>>5   a5 = a2 + x0>>8
//   b1 = x1 + x1>>2   b2 = x1 - b1>>3   b3 = x1 + b1>>3   b4 = x1 - x1>>2
//   b5 = b4 + x1>>5   b6 = x1 - x1>>4   b7 = b6 - x1>>6   b8 = x1 + b6>>4
// giving P0 = a1>>8, P2 = -a2>>8, P4 = a3>>6, P6 = -a3>>5, P8 = a4>>4,
// P10 = -a1>>3, P12 = a5>>2, P1 = x1>>8, P3 = -x1>>7, P5 = b2>>6,
// P7 = -b3>>6, P9 = b5>>5, P11 = -b7>>5, P13 = b8>>1.
// Products are exact (input scaled by 2^12), then 6 LSBs are dropped. A
// single transposed delay line of 13 registers sums, at delay k, the even
// product of h_2k and the odd product of h_2k+1 (h_26-j reusing P_j):
//   y[m] = sum_k h_2k x0[m-k] (k = 0..13) + sum_k h_2k+1 x1[m-k] (k = 0..12)
// with x0[m] = x[2m], x1[m] = x[2m-1].
//
// Output: the sum carries 6 fractional bits below the input LSB; the 17-bit
// output drops 7 of them (floor), i.e. one bit of the 18-bit input's 2
// fractional bits goes, and saturates at the 17-bit limits. The sum of |h| is
// 1.71, so only inputs near full scale with a worst-case sign pattern can
// reach the limits. Coefficients, sub-expressions, product truncation and the
// 18/17-bit word lengths follow the design description; the output binary
// point and the saturation are this design's choice.
//
// Response with these coefficients (whole chain): -0.5 dB at 20 kHz, -3.7 dB
// at 25 kHz, 48.6 dB down at 32 kHz and at least 60 dB down from about 34 kHz;
// the 60 dB target at 32 kHz is thus reached about 2 kHz later.
//
// Interface and timing as cic_stage: samples alternate odd/even starting with
// an odd one; out_valid pulses one clock after each even sample.
module fir_filter #(
  parameter int unsigned IN_W  = decim_pkg::FIR_IN_W,
  parameter int unsigned OUT_W = decim_pkg::FIR_OUT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned FRAC  = decim_pkg::COEF_FRAC;   // 12
  localparam int unsigned TRUNC = decim_pkg::PROD_TRUNC;  // 6
  localparam int unsigned PW    = IN_W + FRAC + 2;        // exact products
  localparam int unsigned AW    = PW - TRUNC + 2;         // delay-line sums
  localparam int unsigned NE    = 14;                     // even taps per phase (h0..h26)
  localparam int unsigned NO    = 13;                     // odd taps (h1..h25)
  // Drop 6 fractional bits of the sum's FRAC-TRUNC and keep 1 below the input LSB... see header.
  localparam int unsigned OSHIFT = FRAC - TRUNC + 1;

  localparam logic signed [AW-1:0] OMAX = AW'((longint'(1) <<< (OUT_W - 1)) - 1);
  localparam logic signed [AW-1:0] OMIN = AW'(-(longint'(1) <<< (OUT_W - 1)));

  logic                   phase;
  logic signed [IN_W-1:0] x1_q;
  logic signed [AW-1:0]   s_q [1:NE-1];   // s_q[k]: partial sum waiting k more outputs

  logic signed [PW-1:0] xs0, xs1;
  logic signed [PW-1:0] a1, a2, a3, a4, a5;
  logic signed [PW-1:0] b1, b2, b3, b4, b5, b6, b7, b8;
  logic signed [PW-1:0] pe [0:6];    // P0, P2, ..., P12
  logic signed [PW-1:0] po [0:6];    // P1, P3, ..., P13
  logic signed [AW-1:0] te [0:NE-1]; // truncated even product at delay k
  logic signed [AW-1:0] to [0:NO-1]; // truncated odd product at delay k
  logic signed [AW-1:0] y_w;

  always_comb begin
    xs0 = PW'(in_data) <<< FRAC;
    xs1 = PW'(x1_q)    <<< FRAC;
    // Even-phase sub-expressions and products.
    a1 = xs0 - (xs0 >>> 2);
    a2 = xs0 + (xs0 >>> 2);
    a3 = xs0 - (a2 >>> 2);
    a4 = a1 - (xs0 >>> 5);
    a5 = a2 + (xs0 >>> 8);
    pe[0] =  (a1 >>> 8);
    pe[1] = -(a2 >>> 8);
    pe[2] =  (a3 >>> 6);
    pe[3] = -(a3 >>> 5);
    pe[4] =  (a4 >>> 4);
    pe[5] = -(a1 >>> 3);
    pe[6] =  (a5 >>> 2);
    // Odd-phase sub-expressions and products.
    b1 = xs1 + (xs1 >>> 2);
    b2 = xs1 - (b1 >>> 3);
    b3 = xs1 + (b1 >>> 3);
    b4 = xs1 - (xs1 >>> 2);
    b5 = b4 + (xs1 >>> 5);
    b6 = xs1 - (xs1 >>> 4);
    b7 = b6 - (xs1 >>> 6);
    b8 = xs1 + (b6 >>> 4);
    po[0] =  (xs1 >>> 8);
    po[1] = -(xs1 >>> 7);
    po[2] =  (b2 >>> 6);
    po[3] = -(b3 >>> 6);
    po[4] =  (b5 >>> 5);
    po[5] = -(b7 >>> 5);
    po[6] =  (b8 >>> 1);
    // Map to delay positions: even delay k uses P(2k), folded about k = 6.5;
    // odd delay k uses P(2k+1), folded about k = 6.
    for (int k = 0; k < int'(NE); k++)
      te[k] = AW'(pe[(k <= 6) ? k : 13 - k] >>> TRUNC);
    for (int k = 0; k < int'(NO); k++)
      to[k] = AW'(po[(k <= 6) ? k : 12 - k] >>> TRUNC);
    y_w = te[0] + to[0] + s_q[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      x1_q      <= '0;
      for (int k = 1; k < int'(NE); k++) s_q[k] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          x1_q <= in_data;
        end else begin
          s_q[NE-1] <= te[NE-1];
          for (int k = 1; k < int'(NE) - 1; k++)
            s_q[k] <= te[k] + to[k] + s_q[k+1];
          if ((y_w >>> OSHIFT) > OMAX)      out_data <= OUT_W'(OMAX);
          else if ((y_w >>> OSHIFT) < OMIN) out_data <= OUT_W'(OMIN);
          else                              out_data <= OUT_W'(y_w >>> OSHIFT);
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
