// delay: echo effect with feedback, built from two mixers and a sample memory.
//
// Every ready pulse (one audio sample):
//   stored  = (1 - feedback) * in + feedback * out_prev      (feedback mixer)
//   delayed = memory[write_pointer - delay]                   (delay samples old)
//   wet     = wetdry * delayed
//   out     = gain * wet + (1 - gain) * stored                (output mixer)
// and `stored` is written at the write pointer, which then advances. Levels
// (feedback, wetdry, gain) are signed fractions with 15 fractional bits; "1 -
// x" is 32767 - x, so gain and feedback are meant to be 0 .. 32767 (wetdry may be
// negative, which inverts the echo). delay is the echo length in samples, 1 .. MAX_DELAY - 1
// (larger values are clamped, 0 counts as 1). The memory is a simple
// dual-port array (one write address, one read address) with a registered
// read, as block RAM; until `delay` samples have been
// written, the delayed sample reads as 0, so no stale memory is heard after
// reset. out updates 6 clocks after
// ready; inputs must hold for that long.
//
// Following the document: two mixers, the feedback mixer's levels, the delay
// in ready cycles, a memory of input samples and the wet/dry, gain and
// feedback inputs. The document leaves the exact wiring unclear and did not
// finish the block; this wiring (and MAX_DELAY = 8192 samples, 171 ms) is
// this design's reading of it.
module delay #(
  parameter int unsigned MAX_DELAY = 8192,
  localparam int unsigned AW = $clog2(MAX_DELAY)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ready,
  input  logic signed [15:0] in,
  input  logic [15:0]        delay_len,
  input  logic signed [15:0] wetdry,
  input  logic signed [15:0] gain,
  input  logic signed [15:0] feedback,
  output logic signed [15:0] out,
  output logic               out_valid
);

  logic signed [15:0] mem_q [MAX_DELAY];
  logic [AW-1:0]      wr_q, rd_addr_q, d_eff;
  logic signed [15:0] rd_q, wet_q, fb_out;
  logic signed [31:0] wet_prod;
  logic [2:0]         ph_q;
  logic               fb_valid;
  logic [AW:0]        filled_q;            // samples written, saturating

  assign d_eff = (delay_len == 0) ? AW'(1)
               : (delay_len >= 16'(MAX_DELAY)) ? AW'(MAX_DELAY - 1) : AW'(delay_len);

  mixer #(.DECIMAL(15)) u_fbmix (
    .clk, .rst, .ready,
    .in1(in), .level1(16'sd32767 - feedback),
    .in2(out), .level2(feedback),
    .out(fb_out), .out_valid(fb_valid)
  );

  mixer #(.DECIMAL(15)) u_outmix (
    .clk, .rst, .ready(fb_valid),
    .in1(wet_q), .level1(gain),
    .in2(fb_out), .level2(16'sd32767 - gain),
    .out, .out_valid
  );

  assign wet_prod = rd_q * wetdry;

  always_ff @(posedge clk) begin
    rd_q <= mem_q[rd_addr_q];
    if (fb_valid) mem_q[wr_q] <= fb_out;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_q      <= '0;
      rd_addr_q <= '0;
      wet_q     <= '0;
      ph_q      <= '0;
      filled_q  <= '0;
    end else begin
      if (ready) begin
        rd_addr_q <= wr_q - d_eff;
        ph_q      <= 3'd1;
      end else if (ph_q == 3'd1) begin
        ph_q <= 3'd2;                     // rd_q valid after this clock
      end else if (ph_q == 3'd2) begin
        wet_q <= ((AW+1)'(d_eff) <= filled_q) ? 16'(wet_prod >>> 15) : '0;
        ph_q  <= 3'd0;
      end
      if (fb_valid) begin
        wr_q <= wr_q + 1'b1;
        if (filled_q != (AW+1)'(MAX_DELAY)) filled_q <= filled_q + 1'b1;
      end
    end
  end

endmodule
