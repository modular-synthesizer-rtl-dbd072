// filter_coefficients: biquad coefficient generator.
//
// From a cutoff/centre frequency in Hz, a filter type and a quality shift q,
// computes the six biquad coefficients b0, b1, b2, a0, a1, a2 as 18-bit
// signed numbers with 16 fractional bits (range -2 .. +2). The one divide,
// w0 = frequency * 65536 / 48000 (w0 as a 16-bit fraction of a turn), is done
// by the shared divider: while div_level is high this block drives its
// dividend and divisor and zero otherwise. sin and cos of 2*pi*w0 come from
// two reads of the sine table (cos reads a quarter turn ahead). Then, with
// c = cos, s = sin and alpha = s / 2**q:
//   low-pass : b0 = b2 = (1-c)/2, b1 = 1-c
//   high-pass: b0 = b2 = (1+c)/2, b1 = -(1+c)
//   band-pass: b0 = alpha, b1 = 0, b2 = -alpha
//   notch    : b0 = b2 = 1, b1 = -2c
//   all      : a0 = 1+alpha, a1 = -2c, a2 = 1-alpha
// Values that would reach +2 are saturated to the largest 18-bit number.
// coef_valid pulses for one clock, two clocks after the quotient arrives.
//
// Following the document: the single divide for w0, table lookups for sine
// and cosine, the low-pass equations and the 18-bit coefficients with 16
// fractional bits (the verification script's format). This design's choices:
// alpha = sin / 2**q (so q = 2 gives Q = 2, as in the document's test), q = 0
// treated as 1 to keep a0 below 2, and the high-pass, band-pass and notch
// equations, which are the standard audio-cookbook forms.
module filter_coefficients
  import synth_pkg::*;
#(
  parameter int unsigned FS = 48000,
  parameter int unsigned DW = 48
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [15:0]        frequency,
  input  filt_e              ftype,
  input  logic [3:0]         q,
  input  logic               div_level,
  input  logic [DW-1:0]      div_quotient,
  input  logic               div_q_valid,
  output logic [DW-1:0]      div_dividend,
  output logic [15:0]        div_divisor,
  output logic signed [17:0] b0, b1, b2, a0, a1, a2,
  output logic               coef_valid
);

  localparam logic signed [19:0] ONE  = 20'sd65536;
  localparam logic signed [19:0] MAXC = 20'sd131071;
  localparam logic signed [19:0] MINC = -20'sd131072;

  logic [15:0]        w0_q;
  logic               w0_valid_q;
  logic signed [15:0] sin_t, cos_t;
  logic signed [19:0] s, c, alpha, nb0, nb1, nb2, na0, na1, na2;
  logic [3:0]         qs;

  assign div_dividend = div_level ? DW'({frequency, 16'd0}) : '0;
  assign div_divisor  = div_level ? 16'(FS) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      w0_q       <= '0;
      w0_valid_q <= 1'b0;
    end else begin
      w0_valid_q <= div_level && div_q_valid;
      if (div_level && div_q_valid) w0_q <= div_quotient[15:0];
    end
  end

  sine_rom u_sin (.addr(w0_q[15:5]),           .data(sin_t));
  sine_rom u_cos (.addr(w0_q[15:5] + 11'd512), .data(cos_t));

  function automatic logic signed [17:0] sat18(input logic signed [19:0] v);
    if (v > MAXC)      return 18'(MAXC);
    else if (v < MINC) return 18'(MINC);
    else               return 18'(v);
  endfunction

  always_comb begin
    qs    = (q == 0) ? 4'd1 : q;
    s     = 20'(sin_t) <<< 1;           // Q15 -> 16 fractional bits
    c     = 20'(cos_t) <<< 1;
    alpha = s >>> qs;
    na0   = ONE + alpha;
    na1   = -(c <<< 1);
    na2   = ONE - alpha;
    unique case (ftype)
      FILT_LOWPASS: begin
        nb0 = (ONE - c) >>> 1; nb1 = ONE - c;    nb2 = (ONE - c) >>> 1;
      end
      FILT_HIGHPASS: begin
        nb0 = (ONE + c) >>> 1; nb1 = -(ONE + c); nb2 = (ONE + c) >>> 1;
      end
      FILT_BANDPASS: begin
        nb0 = alpha;           nb1 = '0;         nb2 = -alpha;
      end
      default: begin
        nb0 = ONE;             nb1 = -(c <<< 1); nb2 = ONE;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {b0, b1, b2, a1, a2} <= '0;
      a0         <= 18'(ONE);
      coef_valid <= 1'b0;
    end else begin
      coef_valid <= w0_valid_q;
      if (w0_valid_q) begin
        b0 <= sat18(nb0); b1 <= sat18(nb1); b2 <= sat18(nb2);
        a0 <= sat18(na0); a1 <= sat18(na1); a2 <= sat18(na2);
      end
    end
  end

endmodule
