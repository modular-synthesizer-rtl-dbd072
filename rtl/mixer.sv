// mixer: 2-to-1 audio mixer with fractional signed levels and clipping.
//
//   out = clip((in1 * level1 + in2 * level2) >>> DECIMAL)
//
// Levels are signed 16-bit numbers with DECIMAL fractional bits (DECIMAL = 0:
// integer gain; DECIMAL = 15: a fraction below one; levels of 1 with DECIMAL
// = 1 average the inputs). To share hardware, only one product is formed per
// clock: the clock of ready multiplies in1 by level1 into a 34-bit
// accumulator, the next adds in2 * level2, the one after shifts
// out the fractional bits and checks the bits above the 16-bit result. If
// they are all copies of the sign the result is kept; otherwise the sum has
// clipped and the output saturates to +32767 or -32768 by its sign. out and
// out_valid update three clocks after ready. Inputs must hold during those
// three clocks. Mixers chain for N-to-1 mixing.
//
// Following the document: the 2-to-1 form, the level/decimal format, the
// 34-bit accumulator, one product per clock and the sign-copy clip test.
// Saturating towards the sign (the document says only "a clipped maximum")
// is this design's choice.
module mixer #(
  parameter int unsigned DECIMAL = 15
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ready,
  input  logic signed [15:0] in1,
  input  logic signed [15:0] in2,
  input  logic signed [15:0] level1,
  input  logic signed [15:0] level2,
  output logic signed [15:0] out,
  output logic               out_valid
);

  logic signed [33:0] acc_q, shifted;
  logic [1:0]         step_q;
  logic signed [31:0] prod;

  assign prod    = (step_q == 2'd0) ? in1 * level1 : in2 * level2;
  assign shifted = acc_q >>> DECIMAL;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q     <= '0;
      step_q    <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (step_q)
        2'd0: if (ready) begin acc_q <= 34'(prod); step_q <= 2'd2; end
        2'd2: begin acc_q <= acc_q + 34'(prod); step_q <= 2'd3; end
        default: begin
          if (shifted[33:15] == '0 || shifted[33:15] == '1) out <= shifted[15:0];
          else out <= shifted[33] ? -16'sd32768 : 16'sd32767;
          out_valid <= 1'b1;
          step_q    <= 2'd0;
        end
      endcase
    end
  end

endmodule
