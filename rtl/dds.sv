// dds: generic direct digital synthesis engine.
//
// A PW-bit fixed-point phase accumulator advances by `increment` on every
// ready pulse. Its top AW bits address an external dataset (a table or a
// computed waveform); on the same ready pulse the dataset's value at the
// current address is registered as `sample`. The fractional phase bits let
// the increment be less than one table step, so any frequency down to
// f_ready / 2**PW can be produced: f_out = increment * f_ready / 2**PW.
//
// The accumulator and the split between engine and dataset follow the
// document; the 32-bit phase width is this design's choice.
//
// Timing: sample holds the dataset value at the phase before the step, one
// clock after ready.
module dds #(
  parameter int unsigned PW = 32,
  parameter int unsigned AW = 11
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ready,
  input  logic [PW-1:0]      increment,
  output logic [AW-1:0]      addr,
  input  logic signed [15:0] data,
  output logic signed [15:0] sample
);

  logic [PW-1:0] phase_q;

  assign addr = phase_q[PW-1 -: AW];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_q <= '0;
      sample  <= '0;
    end else if (ready) begin
      phase_q <= phase_q + increment;
      sample  <= data;
    end
  end

endmodule
