// filter: second-order (biquad) IIR filter with a coefficient generator.
//
// Chains filter_coefficients (b and a from frequency, type and q, using the
// shared divider once per frame for w0), filter_scale (divides by a0 in its
// own pipelined divider) and filter_accumulator (the five-term recurrence on
// one multiplier). Coefficients are regenerated every frame and switch over
// all at once. On ready the input sample is filtered; out updates 7 clocks
// later. Several filters can be chained through the audio ring for higher
// orders. Structure follows the document; formats and timing are described in
// the three sub-blocks.
module filter
  import synth_pkg::*;
#(
  parameter int unsigned FS = 48000,
  parameter int unsigned DW = 48
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ready,
  input  logic signed [15:0] in,
  input  logic [15:0]        frequency,
  input  filt_e              ftype,
  input  logic [3:0]         q,
  input  logic               div_level,
  input  logic [DW-1:0]      div_quotient,
  input  logic               div_q_valid,
  output logic [DW-1:0]      div_dividend,
  output logic [15:0]        div_divisor,
  output logic signed [15:0] out,
  output logic               out_valid
);

  logic signed [17:0] b0, b1, b2, a0, a1, a2;
  logic signed [17:0] sb0, sb1, sb2, sa1, sa2;
  logic               coef_valid, scaled_valid;

  filter_coefficients #(.FS(FS), .DW(DW)) u_coef (
    .clk, .rst, .frequency, .ftype, .q,
    .div_level, .div_quotient, .div_q_valid, .div_dividend, .div_divisor,
    .b0, .b1, .b2, .a0, .a1, .a2, .coef_valid
  );

  filter_scale u_scale (
    .clk, .rst, .coef_valid, .b0, .b1, .b2, .a0, .a1, .a2,
    .sb0, .sb1, .sb2, .sa1, .sa2, .scaled_valid
  );

  filter_accumulator u_acc (
    .clk, .rst, .ready, .in, .sb0, .sb1, .sb2, .sa1, .sa2, .out, .out_valid
  );

endmodule
