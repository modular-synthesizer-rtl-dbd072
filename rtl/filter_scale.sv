// filter_scale: normalises the biquad coefficients by a0.
//
// Produces b0/a0, b1/a0, b2/a0, a1/a0 and a2/a0 in the same 18-bit format as
// its inputs (16 fractional bits). The divisions go through one fully
// pipelined divider of QB stages, one quotient bit per stage: on coef_valid
// the five numerators enter on five consecutive clocks, and the quotients
// leave QB clocks later in the same order. Each numerator's magnitude is
// shifted left by 16 and divided by a0 (which is at least 1.0, so the
// quotient stays below 2**17); the sign is restored at the output and a
// result beyond the 18-bit range saturates. All five outputs change together
// and scaled_valid pulses once, QB + 5 clocks after coef_valid.
//
// Following the document: a divider separate from the shared one, built for
// 18-bit divisions and fully pipelined. This design's choices: the
// restoring-division pipeline, saturation, and the all-at-once update so the
// accumulator never sees a mix of old and new coefficients.
module filter_scale #(
  parameter int unsigned QB = 18
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               coef_valid,
  input  logic signed [17:0] b0, b1, b2, a0, a1, a2,
  output logic signed [17:0] sb0, sb1, sb2, sa1, sa2,
  output logic               scaled_valid
);

  localparam int unsigned NW = 18 + 16;      // numerator magnitude width

  // Issue: load five numerators and feed one per clock.
  logic signed [17:0] num_q [5];
  logic [17:0]        den_q;
  logic [2:0]         issue_q;               // 0..4 issuing, 5 idle
  logic signed [17:0] num_now;

  always_ff @(posedge clk) begin
    if (rst) begin
      issue_q <= 3'd5;
      den_q   <= 18'd65536;
      for (int i = 0; i < 5; i++) num_q[i] <= '0;
    end else if (coef_valid) begin
      num_q[0] <= b0; num_q[1] <= b1; num_q[2] <= b2; num_q[3] <= a1; num_q[4] <= a2;
      den_q    <= a0;
      issue_q  <= 3'd0;
    end else if (issue_q != 3'd5) begin
      issue_q <= issue_q + 1'b1;
    end
  end

  assign num_now = num_q[issue_q[2] ? 3'd4 : issue_q];

  // Pipeline stage registers.
  logic [NW-1:0] rem_p [QB+1];
  logic [QB-1:0] quo_p [QB+1];
  logic [17:0]   den_p [QB+1];
  logic          neg_p [QB+1];
  logic          vld_p [QB+1];
  logic [2:0]    tag_p [QB+1];

  always_comb begin
    rem_p[0] = (num_now[17] ? -NW'(num_now) : NW'(num_now)) << 16;
    quo_p[0] = '0;
    den_p[0] = den_q;
    neg_p[0] = num_now[17];
    vld_p[0] = (issue_q != 3'd5);
    tag_p[0] = issue_q;
  end

  for (genvar k = 0; k < QB; k++) begin : g_stage
    localparam int unsigned SH = QB - 1 - k;
    logic [NW+QB-1:0] trial_d;
    assign trial_d = (NW+QB)'(den_p[k]) << SH;
    always_ff @(posedge clk) begin
      if (rst) begin
        vld_p[k+1] <= 1'b0;
        rem_p[k+1] <= '0;
        quo_p[k+1] <= '0;
        den_p[k+1] <= '0;
        neg_p[k+1] <= 1'b0;
        tag_p[k+1] <= '0;
      end else begin
        vld_p[k+1] <= vld_p[k];
        den_p[k+1] <= den_p[k];
        neg_p[k+1] <= neg_p[k];
        tag_p[k+1] <= tag_p[k];
        if ((NW+QB)'(rem_p[k]) >= trial_d) begin
          rem_p[k+1] <= rem_p[k] - NW'(trial_d);
          quo_p[k+1] <= quo_p[k] | (QB'(1) << SH);
        end else begin
          rem_p[k+1] <= rem_p[k];
          quo_p[k+1] <= quo_p[k];
        end
      end
    end
  end

  // Collect, saturate, restore sign, publish together.
  logic signed [17:0] res_q [5];
  logic signed [17:0] res_now;
  logic [QB-1:0]      qmag;

  assign qmag    = quo_p[QB];
  assign res_now = (qmag > QB'(131071)) ? (neg_p[QB] ? -18'sd131071 : 18'sd131071)
                                        : (neg_p[QB] ? -signed'(18'(qmag)) : signed'(18'(qmag)));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 5; i++) res_q[i] <= '0;
      {sb0, sb1, sb2, sa1, sa2} <= '0;
      scaled_valid <= 1'b0;
    end else begin
      scaled_valid <= 1'b0;
      if (vld_p[QB]) begin
        res_q[tag_p[QB]] <= res_now;
        if (tag_p[QB] == 3'd4) begin
          sb0 <= res_q[0]; sb1 <= res_q[1]; sb2 <= res_q[2]; sa1 <= res_q[3];
          sa2 <= res_now;
          scaled_valid <= 1'b1;
        end
      end
    end
  end

endmodule
