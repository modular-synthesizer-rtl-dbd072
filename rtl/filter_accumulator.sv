// filter_accumulator: the biquad's sum of products.
//
//   y[n] = b0*x[n] + b1*x[n-1] + b2*x[n-2] - a1*y[n-1] - a2*y[n-2]
//
// with coefficients already divided by a0 (18-bit, 16 fractional bits).
// Samples are held as 18-bit numbers with 2 fractional bits (the 16-bit input
// shifted left by 2). One 18x18 signed multiplier is used for all five
// products, one per clock: on ready the new input is latched, the next five
// clocks each add or subtract one product into a 40-bit accumulator, and the
// clock after that the result (accumulator >> 16, saturated to 18 bits)
// becomes y[n], the sample histories shift, and out (y[n] >> 2) updates.
// Latency from ready to out: 7 clocks.
//
// Following the document: five terms, three inputs and two outputs of
// history, a single 18x18 multiplier used sequentially, 2 fractional bits on
// the samples. This design's choices: accumulator width, saturation, and the
// term order.
module filter_accumulator (
  input  logic               clk,
  input  logic               rst,
  input  logic               ready,
  input  logic signed [15:0] in,
  input  logic signed [17:0] sb0, sb1, sb2, sa1, sa2,
  output logic signed [15:0] out,
  output logic               out_valid
);

  logic signed [17:0] x0_q, x1_q, x2_q, y1_q, y2_q;
  logic signed [39:0] acc_q;
  logic [2:0]         step_q;                 // 0 idle, 1..5 MAC, 6 finish
  logic signed [17:0] coef, samp;
  logic signed [35:0] prod;
  logic signed [23:0] y_wide;
  logic signed [17:0] y_new;

  always_comb begin
    unique case (step_q)
      3'd1:    begin coef = sb0; samp = x0_q; end
      3'd2:    begin coef = sb1; samp = x1_q; end
      3'd3:    begin coef = sb2; samp = x2_q; end
      3'd4:    begin coef = sa1; samp = y1_q; end
      default: begin coef = sa2; samp = y2_q; end
    endcase
  end

  assign prod   = coef * samp;
  assign y_wide = 24'(acc_q >>> 16);
  assign y_new  = (y_wide > 24'sd131071)  ? 18'sd131071 :
                  (y_wide < -24'sd131072) ? -18'sd131072 : 18'(y_wide);

  always_ff @(posedge clk) begin
    if (rst) begin
      {x0_q, x1_q, x2_q, y1_q, y2_q} <= '0;
      acc_q     <= '0;
      step_q    <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (step_q == 3'd0) begin
        if (ready) begin
          x2_q   <= x1_q;
          x1_q   <= x0_q;
          x0_q   <= {in, 2'b00};
          acc_q  <= '0;
          step_q <= 3'd1;
        end
      end else if (step_q == 3'd6) begin
        y2_q      <= y1_q;
        y1_q      <= y_new;
        out       <= y_new[17:2];
        out_valid <= 1'b1;
        step_q    <= 3'd0;
      end else begin
        if (step_q >= 3'd4) acc_q <= acc_q - 40'(prod);
        else                acc_q <= acc_q + 40'(prod);
        step_q <= step_q + 1'b1;
      end
    end
  end

endmodule
