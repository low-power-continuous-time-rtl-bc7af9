// ct_sdm_model: behavioural model (not synthesizable) of the second-order,
// single-bit continuous-time sigma-delta modulator with distributed NRZ
// feedback, for audio signals (25 kHz band, OSR 128, fs = 6.4 MHz).
//
// The loop has two integrators, each C_k * fs/s. The first integrates the
// input minus A1 times the DAC output, the second integrates the first
// integrator's output minus A2 times the DAC output. A clocked comparator
// samples the second integrator on each rising clock edge and its decision
// drives a non-return-to-zero DAC (+1 or -1 for the whole next period).
// With C1 = C2 = 1, A1 = 1 and A2 = 3/2 this is the loop as first designed
// (feedback coefficients k1 = 1, k2 = 3/2, the impulse-invariant equivalents
// of a discrete-time loop with two delaying integrators). The defaults are
// the values of the realised circuit: integrator coefficients 0.33 and 1 and
// feedback currents I and 0.5 I, which keep the ratio A2 / C1 near 3/2 and
// so the same noise shaping, while the first integrator swings only a third
// as far.
//
// The analog circuit (gm-C integrators with source-degenerated telescopic
// OTAs, common-mode feedback, a latched comparator and a switched current
// DAC) is not modelled at transistor level. Between clock edges the input is
// held constant (it is read once per period), and with the NRZ feedback also
// constant the two integrators are solved exactly over one period T = 1/fs:
//   u = C1 * (x - A1 * y)
//   v1(t+T) = v1 + u
//   v2(t+T) = v2 + C2 * (v1 + u/2 - A2 * y)
// with x the input, y the DAC level, both normalised to the DAC reference.
// Inputs with |x| below about 0.7 keep the loop stable.
//
// Ports: clk is the sampling clock; rst_n low clears both integrators and the
// output; vin is the input voltage normalised to the DAC reference (a real);
// dout is the comparator output, 1 for +1 and 0 for -1, updated on each
// rising edge of clk. int1/int2 expose the integrator states for observation.
module ct_sdm_model #(
  parameter real C1 = 0.33,  // first integrator coefficient
  parameter real C2 = 1.0,   // second integrator coefficient
  parameter real A1 = 1.0,   // DAC feedback into the first integrator
  parameter real A2 = 0.5    // DAC feedback into the second integrator
) (
  input  logic clk,
  input  logic rst_n,
  input  real  vin,
  output logic dout,
  output real  int1,
  output real  int2
);

  real v1, v2;              // integrator outputs at the last clock edge
  real y, u, v1_next, v2_next;

  assign int1 = v1;
  assign int2 = v2;

  always_comb begin
    // DAC level held during the period that ends at the next edge.
    y       = dout ? 1.0 : -1.0;
    u       = C1 * (vin - A1 * y);
    v1_next = v1 + u;
    v2_next = v2 + C2 * (v1 + 0.5 * u - A2 * y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 0.0;
      v2   <= 0.0;
      dout <= 1'b0;
    end else begin
      v1   <= v1_next;
      v2   <= v2_next;
      // Comparator decision at the sampling instant.
      dout <= (v2_next >= 0.0);
    end
  end

endmodule
