// cic_filter: fourth-order CIC decimator with an overall ratio of 8, built as
// three cascaded decimate-by-2 sections (cic_stage), each (1 + z^-1)^4.
//
// Splitting the ratio-8 CIC (1 - z^-8)^4 / (1 - z^-1)^4 into three ratio-2
// sections keeps it non-recursive: each section is a 5-tap FIR filter in
// polyphase form, so there are no integrators running at the input rate and
// no wrap-around arithmetic. Word lengths grow by 4 bits per section
// (3 -> 7 -> 11 -> 15 by default), the minimum for exact results. The
// overall response is (1+z^-1)^4 (1+z^-2)^4 (1+z^-4)^4 = ((1 - z^-8)/(1 - z^-1))^4,
// identical to the single-stage CIC, with a DC gain of 8^4 = 4096.
//
// Interface: in_valid/in_data at the modulator rate (up to one sample per
// clock); out_valid pulses once per 8 input samples. Latency: out_data is
// valid 3 clocks after the input sample that completes the 8-sample group
// (one register per section).
module cic_filter #(
  parameter int unsigned IN_W  = decim_pkg::IN_W,
  parameter int unsigned OUT_W = IN_W + 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned W1 = IN_W + 4;
  localparam int unsigned W2 = IN_W + 8;

  logic                 v1, v2, v3;
  logic signed [W1-1:0] d1;
  logic signed [W2-1:0] d2;
  logic signed [OUT_W-1:0] d3;

  cic_stage #(.IN_W(IN_W), .OUT_W(W1)) u_stage1 (
    .clk, .rst_n, .in_valid(in_valid), .in_data(in_data),
    .out_valid(v1), .out_data(d1));

  cic_stage #(.IN_W(W1), .OUT_W(W2)) u_stage2 (
    .clk, .rst_n, .in_valid(v1), .in_data(d1),
    .out_valid(v2), .out_data(d2));

  cic_stage #(.IN_W(W2), .OUT_W(OUT_W)) u_stage3 (
    .clk, .rst_n, .in_valid(v2), .in_data(d2),
    .out_valid(v3), .out_data(d3));

  assign out_valid = v3;
  assign out_data  = d3;

endmodule
