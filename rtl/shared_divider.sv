// shared_divider: one global divider time-shared by several modules.
//
// Division is expensive, so a single sequential divider serves every module
// that needs one. The sharing works by ready levels: LEVEL_OFFSET clocks
// after each SYNC the divider raises level[0] for SLOT clocks, then level[1]
// for SLOT clocks, and so on for NUM_CLIENTS clients. A client may drive its
// dividend and divisor only while its level is high and must drive zero
// otherwise; the divider ORs all clients' arguments together, so the one
// whose level is high is the one it sees. On the first clock of a level the
// divider latches the combined arguments; DW + 1 clocks later it raises q_valid
// for one clock with the unsigned quotient, still inside the same level, and
// the client takes it then. A zero divisor gives an all-ones quotient.
//
// Following the document: one global instance, levels of a fixed duration
// set by a parameter, and the zero-outside-level / bitwise-OR contract. This
// design's choices: the radix-2 restoring algorithm (one quotient bit per
// clock), the widths and the offset after SYNC, which leaves time for the
// clients' parameter registers to read the ring first.
module shared_divider #(
  parameter int unsigned NUM_CLIENTS  = 2,
  parameter int unsigned DW           = 48,   // dividend / quotient width
  parameter int unsigned VW           = 16,   // divisor width
  parameter int unsigned LEVEL_OFFSET = 64,
  parameter int unsigned SLOT         = DW + 2
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   sync,
  input  logic [DW-1:0]          dividend [NUM_CLIENTS],
  input  logic [VW-1:0]          divisor  [NUM_CLIENTS],
  output logic [NUM_CLIENTS-1:0] level,
  output logic [DW-1:0]          quotient,
  output logic                   q_valid
);

  localparam int unsigned TOTAL = LEVEL_OFFSET + NUM_CLIENTS * SLOT;
  localparam int unsigned TW    = $clog2(TOTAL + 1);

  logic [TW-1:0]  t_q;          // clocks since SYNC, saturating at TOTAL
  logic [DW-1:0]  or_dividend;
  logic [VW-1:0]  or_divisor;
  logic           level_start;

  always_ff @(posedge clk) begin
    if (rst)                  t_q <= TW'(TOTAL);
    else if (sync)            t_q <= '0;
    else if (t_q != TW'(TOTAL)) t_q <= t_q + 1'b1;
  end

  always_comb begin
    level       = '0;
    level_start = 1'b0;
    for (int i = 0; i < NUM_CLIENTS; i++) begin
      if (t_q >= TW'(LEVEL_OFFSET + i * SLOT) && t_q < TW'(LEVEL_OFFSET + (i + 1) * SLOT))
        level[i] = 1'b1;
      if (t_q == TW'(LEVEL_OFFSET + i * SLOT))
        level_start = 1'b1;
    end
  end

  always_comb begin
    or_dividend = '0;
    or_divisor  = '0;
    for (int i = 0; i < NUM_CLIENTS; i++) begin
      or_dividend |= dividend[i];
      or_divisor  |= divisor[i];
    end
  end

  // Radix-2 restoring division, one quotient bit per clock.
  logic [VW:0]            rem_q;
  logic [DW-1:0]          quo_q;
  logic [VW-1:0]          dvs_q;
  logic [$clog2(DW+1)-1:0] steps_q;
  logic                   busy_q;
  logic [VW+1:0]          trial;

  assign trial = {rem_q, quo_q[DW-1]} - {2'b00, dvs_q};

  always_ff @(posedge clk) begin
    if (rst) begin
      rem_q    <= '0;
      quo_q    <= '0;
      dvs_q    <= '0;
      steps_q  <= '0;
      busy_q   <= 1'b0;
      quotient <= '0;
      q_valid  <= 1'b0;
    end else begin
      q_valid <= 1'b0;
      if (level_start) begin
        rem_q   <= '0;
        quo_q   <= or_dividend;
        dvs_q   <= or_divisor;
        steps_q <= ($clog2(DW+1))'(DW);
        busy_q  <= 1'b1;
      end else if (busy_q) begin
        if (!trial[VW+1]) begin
          rem_q <= trial[VW:0];
          quo_q <= {quo_q[DW-2:0], 1'b1};
        end else begin
          rem_q <= {rem_q[VW-1:0], quo_q[DW-1]};
          quo_q <= {quo_q[DW-2:0], 1'b0};
        end
        steps_q <= steps_q - 1'b1;
        if (steps_q == 1) begin
          busy_q <= 1'b0;
          q_valid <= 1'b1;
          quotient <= (dvs_q == '0) ? '1 : (!trial[VW+1]) ? {quo_q[DW-2:0], 1'b1} : {quo_q[DW-2:0], 1'b0};
        end
      end
    end
  end

endmodule
