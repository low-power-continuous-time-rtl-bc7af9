// decimation_filter: decimate-by-32 low-pass filter for the 3-bit output of
// an audio sigma-delta modulator (1.6 MS/s in, 50 kS/s out, 25 kHz band).
//
// Three stages, each running at the rate of its own output:
//   cic_filter  order-4 CIC, decimation 8, as three non-recursive
//               (1+z^-1)^4 sections     3 bits -> 15 bits, 1.6 MS/s -> 200 kS/s
//   hb_filter   11-tap half-band, decimation 2   15 -> 18 bits, -> 100 kS/s
//   fir_filter  27-tap FIR, decimation 2         18 -> 17 bits, -> 50 kS/s
// All three are multiplierless (CSD coefficients with shared sub-expressions),
// in polyphase transposed direct form. The stage structure, ratios, word
// lengths and coefficients follow the design description.
//
// Interface: in_valid marks a modulator sample on in_data (two's complement,
// -4..+3); it may be high on every clock or on any subset of clocks. The
// filter outputs one 17-bit word (out_valid high for one clock) per 32 input
// samples; the word is in units of the CIC output LSB (DC gain of the chain
// 4096 * 1.001 * 1.007) with one fractional bit. Latency: out_valid rises 5
// clocks after the input sample that completes a group of 32 is captured
// (one register in each of the five decimate-by-2 sections). Registers reset
// asynchronously with rst_n low; the first sample after reset is the first of
// a group of 32.
module decimation_filter #(
  parameter int unsigned IN_W  = decim_pkg::IN_W,
  parameter int unsigned OUT_W = decim_pkg::FIR_OUT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned CIC_W = IN_W + 12;            // 15
  localparam int unsigned HB_W  = decim_pkg::HB_OUT_W;  // 18

  logic                    cic_valid, hb_valid;
  logic signed [CIC_W-1:0] cic_data;
  logic signed [HB_W-1:0]  hb_data;

  cic_filter #(.IN_W(IN_W), .OUT_W(CIC_W)) u_cic (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(cic_valid), .out_data(cic_data));

  hb_filter #(.IN_W(CIC_W), .OUT_W(HB_W)) u_hb (
    .clk, .rst_n, .in_valid(cic_valid), .in_data(cic_data),
    .out_valid(hb_valid), .out_data(hb_data));

  fir_filter #(.IN_W(HB_W), .OUT_W(OUT_W)) u_fir (
    .clk, .rst_n, .in_valid(hb_valid), .in_data(hb_data),
    .out_valid, .out_data);

endmodule
