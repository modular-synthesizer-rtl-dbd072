// oscillator: six-waveform audio oscillator.
//
// Two dds engines share one phase increment: one reads the sine table
// (sine_rom), the other the computed ramp (ramp_source). The other waves are
// derived from these two: square is the sign bit of the sine, pulse is the
// square forced low once `width` ready pulses have passed since it went high,
// saw is the negated ramp, and triangle is twice the absolute value of the
// ramp shifted down by the peak. Every wave peaks near +-23170 (-3 dB).
//
// Frequency is in Hz. The phase increment, frequency * 2**32 / 48000, comes
// from the shared divider: while div_level is high the oscillator drives its
// dividend and divisor (zero otherwise) and takes the quotient on q_valid.
// A new frequency therefore reaches the output within one or two frames.
//
// Interface: ready is the per-sample pulse (48 kHz); out changes two clocks
// after ready. wave selects the output (synth_pkg::wave_e).
//
// Following the document: DDS with sine table and computed ramp, the derived
// waves, the width in ready cycles, the shared divider. This design's
// choices: the wave encoding, one divide per frame (the document's version
// used four whose purpose it does not give), the 32-bit phase and the sine
// scaling by 23170/32768.
module oscillator
  import synth_pkg::*;
#(
  parameter int unsigned FS = 48000,
  parameter int unsigned DW = 48
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ready,
  input  logic [15:0]        frequency,
  input  wave_e              wave,
  input  logic [15:0]        width,
  // shared divider client port
  input  logic               div_level,
  input  logic [DW-1:0]      div_quotient,
  input  logic               div_q_valid,
  output logic [DW-1:0]      div_dividend,
  output logic [15:0]        div_divisor,
  output logic signed [15:0] out
);

  logic [31:0]        inc_q;
  logic [10:0]        sine_addr, ramp_addr;
  logic signed [15:0] sine_data, ramp_data, sine_s, ramp_s;
  logic               ready_d;
  logic               square_hi, square_hi_d;
  logic [15:0]        pulse_cnt_q;

  assign div_dividend = div_level ? {frequency, 32'd0} : '0;
  assign div_divisor  = div_level ? 16'(FS) : '0;

  always_ff @(posedge clk) begin
    if (rst) inc_q <= '0;
    else if (div_level && div_q_valid) inc_q <= div_quotient[31:0];
  end

  dds #(.PW(32), .AW(11)) u_dds_sine (
    .clk, .rst, .ready, .increment(inc_q), .addr(sine_addr), .data(sine_data), .sample(sine_s)
  );
  sine_rom u_sine (.addr(sine_addr), .data(sine_data));

  dds #(.PW(32), .AW(11)) u_dds_ramp (
    .clk, .rst, .ready, .increment(inc_q), .addr(ramp_addr), .data(ramp_data), .sample(ramp_s)
  );
  ramp_source u_ramp (.addr(ramp_addr), .data(ramp_data));

  // Pulse: count ready pulses since the square wave last went high.
  assign square_hi = !sine_s[15];

  always_ff @(posedge clk) begin
    if (rst) begin
      ready_d     <= 1'b0;
      square_hi_d <= 1'b0;
      pulse_cnt_q <= '0;
    end else begin
      ready_d <= ready;
      if (ready_d) begin
        square_hi_d <= square_hi;
        if (square_hi && !square_hi_d) pulse_cnt_q <= 16'd1;
        else if (pulse_cnt_q != '1)    pulse_cnt_q <= pulse_cnt_q + 1'b1;
      end
    end
  end

  logic signed [31:0] sine_scaled;
  logic signed [16:0] ramp_abs, tri_v;
  logic               pulse_hi;

  assign sine_scaled = sine_s * 32'sd23170;
  assign ramp_abs    = ramp_s[15] ? -17'(ramp_s) : 17'(ramp_s);
  assign tri_v       = (ramp_abs <<< 1) - 17'sd23040;
  assign pulse_hi    = square_hi && ((square_hi && !square_hi_d) ? (width > 16'd0)
                                                                 : (pulse_cnt_q < width));

  always_ff @(posedge clk) begin
    if (rst) out <= '0;
    else if (ready_d) begin
      unique case (wave)
        WAVE_SINE:     out <= 16'(sine_scaled >>> 15);
        WAVE_SQUARE:   out <= square_hi ? 16'(OSC_PEAK) : -16'(OSC_PEAK);
        WAVE_PULSE:    out <= pulse_hi  ? 16'(OSC_PEAK) : -16'(OSC_PEAK);
        WAVE_RAMP:     out <= ramp_s;
        WAVE_SAW:      out <= -ramp_s;
        WAVE_TRIANGLE: out <= 16'(tri_v);
        default:       out <= '0;
      endcase
    end
  end

endmodule
