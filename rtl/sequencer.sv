// sequencer: programmable step sequencer (sequential-read, random-write memory).
//
// Holds DEPTH words of N bits in a register array. A write (write high, any
// clock) stores write_data at write_addr. Reading is sequential: every
// speed + 1 ready pulses the sequencer outputs the word at its current index
// and moves the index one step. Values 0..last are played; what happens after
// `last` is chosen by end_mode: stop (keep outputting the last word), loop
// (start again at 0) or reverse (walk back down to 0, then up again, without
// repeating the end words). Values are typically pitches in Hz for an
// oscillator's frequency input.
//
// Following the document: the register array, output on ready, the three end
// behaviours, the speed control and the compile-time size. This design's
// choices: DEPTH = 16 by default, speed counted in ready pulses, and that a
// step happens on the first ready after reset.
//
// Timing: value changes on the clock after a stepping ready pulse.
module sequencer
  import synth_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = N,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ready,
  input  logic          write,
  input  logic [IW-1:0] write_addr,
  input  logic [W-1:0]  write_data,
  input  seq_end_e      end_mode,
  input  logic [IW-1:0] last,
  input  logic [7:0]    speed,
  output logic [W-1:0]  value
);

  logic [W-1:0]  mem_q [DEPTH];
  logic [IW-1:0] idx_q;
  logic          down_q;
  logic [7:0]    div_q;
  logic          step;

  assign step = ready && (div_q == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else if (write) begin
      mem_q[write_addr] <= write_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx_q  <= '0;
      down_q <= 1'b0;
      div_q  <= '0;
      value  <= '0;
    end else if (ready) begin
      div_q <= step ? speed : div_q - 1'b1;
      if (step) begin
        value <= mem_q[idx_q];
        if (!down_q) begin
          if (idx_q >= last) begin
            unique case (end_mode)
              END_LOOP:    idx_q <= '0;
              END_REVERSE: if (last != 0) begin
                             idx_q  <= last - 1'b1;
                             down_q <= 1'b1;
                           end
              default:     idx_q <= last;
            endcase
          end else begin
            idx_q <= idx_q + 1'b1;
          end
        end else begin
          if (idx_q == '0) begin
            down_q <= 1'b0;
            idx_q  <= (last != 0) ? IW'(1) : '0;
          end else begin
            idx_q <= idx_q - 1'b1;
          end
        end
      end
    end
  end

endmodule
