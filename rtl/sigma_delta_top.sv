// sigma_delta_top: the two parts of this low-power sigma-delta work, side by
// side. They are separate designs and are not connected to each other:
//
//   u_decim  decimation_filter: synthesizable decimate-by-32 filter for the
//            3-bit, 1.6 MS/s output of a third-order discrete-time audio
//            modulator (that modulator is not part of this RTL; its samples
//            arrive on dec_in_valid/dec_in_data).
//   u_sdm    ct_sdm_model: behavioural model of the second-order, 1-bit,
//            6.4 MS/s continuous-time modulator (OSR 128), an analog circuit.
//
// The two have their own clocks and resets. The filter is described for the
// 32x oversampled modulator; a filter for the 128x continuous-time modulator
// would need a different decimation ratio and is not part of this design.
//
// Timing: see decimation_filter (one 17-bit word per 32 samples, 5 clocks of
// latency) and ct_sdm_model (one bit per rising edge of sdm_clk).
module sigma_delta_top #(
  parameter int unsigned DEC_IN_W  = decim_pkg::IN_W,
  parameter int unsigned DEC_OUT_W = decim_pkg::FIR_OUT_W
) (
  // Decimation filter
  input  logic                        dec_clk,
  input  logic                        dec_rst_n,
  input  logic                        dec_in_valid,
  input  logic signed [DEC_IN_W-1:0]  dec_in_data,
  output logic                        dec_out_valid,
  output logic signed [DEC_OUT_W-1:0] dec_out_data,
  // Continuous-time modulator model
  input  logic                        sdm_clk,
  input  logic                        sdm_rst_n,
  input  real                         sdm_vin,
  output logic                        sdm_dout,
  output real                         sdm_int1,
  output real                         sdm_int2
);

  decimation_filter #(.IN_W(DEC_IN_W), .OUT_W(DEC_OUT_W)) u_decim (
    .clk(dec_clk), .rst_n(dec_rst_n),
    .in_valid(dec_in_valid), .in_data(dec_in_data),
    .out_valid(dec_out_valid), .out_data(dec_out_data));

  ct_sdm_model u_sdm (
    .clk(sdm_clk), .rst_n(sdm_rst_n), .vin(sdm_vin),
    .dout(sdm_dout), .int1(sdm_int1), .int2(sdm_int2));

endmodule
