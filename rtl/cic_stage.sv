// cic_stage: one non-recursive CIC section, H(z) = (1 + z^-1)^4, followed by
// decimation by two, built in polyphase transposed direct form.
//
// The fourth-order comb-integrator pair with R = 2, M = 1 is rewritten as the
// FIR polynomial 1 + 4z^-1 + 6z^-2 + 4z^-3 + z^-4 and split into its even and
// odd phases, E0(z) = 1 + 6z^-1 + z^-2 and E1(z) = 4 + 4z^-1. Even input
// samples x0 feed E0, odd samples x1 feed E1, so every adder and every delay
// runs at the output rate. The product 4*x1 is formed once and used by both
// taps of E1; 6*x0 is built as 2*x0 + 4*x0. With no integrators there is no
// wrap-around: every node is exact at its minimum width, OUT_W = IN_W + 4.
//
// Interface: one input sample per cycle with in_valid high (in_valid may also
// be sparse). Samples alternate phase, the first after reset being an odd one:
// it is parked in the one-sample input delay. The next (even) sample completes
// a pair, the delay line advances and out_data is registered one clock later
// with out_valid high for one cycle. Output: y[m] = x[2m] + 4x[2m-1] +
// 6x[2m-2] + 4x[2m-3] + x[2m-4], in two's complement.
//
// The description clocks the input delay on the falling edge of a clock at
// half the input rate; here one rising-edge clock is used and the registers
// are enabled on alternate samples instead, which gives the same half-rate
// activity for every register in a single clock domain.
module cic_stage #(
  parameter int unsigned IN_W  = 3,
  parameter int unsigned OUT_W = IN_W + 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  if (OUT_W < IN_W + 4) begin : g_width_check
    $error("cic_stage: OUT_W must be at least IN_W + 4");
  end

  logic                    phase;   // 0: next sample is odd, 1: next is even
  logic signed [IN_W-1:0]  x1_q;    // one-sample input delay (odd phase)
  logic signed [IN_W-1:0]  r1_q;    // E0 delay line, tap z^-2 (coefficient 1)
  logic signed [OUT_W-1:0] r2_q;    // transposed delay, taps 6x0 + 4x1 + r1

  logic signed [OUT_W-1:0] x0_w, x1x4_w, x0x6_w, mid_w, out_w;

  always_comb begin
    x0_w   = OUT_W'(in_data);
    x1x4_w = OUT_W'(x1_q) <<< 2;                        // 4*x1, shared
    x0x6_w = (x0_w <<< 1) + (x0_w <<< 2);               // 6*x0 = 2*x0 + 4*x0
    mid_w  = x0x6_w + x1x4_w + OUT_W'(r1_q);            // into z^-1 of E
    out_w  = x0_w + x1x4_w + r2_q;                      // output adder
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      x1_q      <= '0;
      r1_q      <= '0;
      r2_q      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          x1_q <= in_data;
        end else begin
          r1_q      <= in_data;
          r2_q      <= mid_w;
          out_data  <= out_w;
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
