// tb_oscillator: the oscillator with its own shared divider. Frames are
// 150 clocks; ready comes 100 clocks after SYNC, after the divider level.
// Checks, against values the testbench computes itself:
//  - the phase increment equals floor(f * 2**32 / 48000);
//  - for every wave type, each output sample matches the wave's formula
//    applied to the DDS phase of that sample (sine within 2 LSB via $sin;
//    pulse high for exactly `width` samples after each rising square edge);
//  - at 1000 Hz the sine has 50 +-1 rising zero crossings in 2400 samples
//    (50 ms), i.e. the output frequency is right.
module tb_oscillator;
  import synth_pkg::*;
  localparam int DW = 48;
  logic clk = 1'b0, rst, sync, ready;
  logic [15:0] frequency, width;
  wave_e wave;
  logic [DW-1:0] dividend [1], quotient;
  logic [15:0]   divisor [1];
  logic [0:0]    level;
  logic          q_valid;
  logic signed [15:0] out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shared_divider #(.NUM_CLIENTS(1), .DW(DW), .VW(16), .LEVEL_OFFSET(8)) u_div (
    .clk, .rst, .sync, .dividend, .divisor, .level, .quotient, .q_valid
  );

  oscillator #(.DW(DW)) dut (
    .clk, .rst, .ready, .frequency, .wave, .width,
    .div_level(level[0]), .div_quotient(quotient), .div_q_valid(q_valid),
    .div_dividend(dividend[0]), .div_divisor(divisor[0]), .out
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // One frame; returns the DDS address used for the sample produced.
  task automatic frame(output logic [10:0] a);
    sync <= 1'b1;
    @(posedge clk);
    sync <= 1'b0;
    repeat (99) @(posedge clk);
    a = dut.u_dds_sine.phase_q[31:21];
    ready <= 1'b1;
    @(posedge clk);
    ready <= 1'b0;
    repeat (49) @(posedge clk);
  endtask

  function automatic int ramp_of(input logic [10:0] a);
    return ((int'(a) - 1024) * 45) >>> 1;
  endfunction

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0] a;
    rst = 1'b1; sync = 1'b0; ready = 1'b0; frequency = 16'd440; width = 16'd20; wave = WAVE_SINE;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) frame(a);
    check(dut.inc_q == 32'((64'd440 << 32) / 64'd48000), $sformatf("increment %0d", dut.inc_q));
    for (int w = 0; w < 6; w++) begin
      bit prev_sq;
      int n;
      wave = wave_e'(w);
      prev_sq = 1'b0; n = 0;
      for (int k = 0; k < 300; k++) begin
        int exp, tol, r, ai;
        real ph;
        bit sq;
        frame(a);
        sq = (a < 11'd1024);
        if (sq && !prev_sq) n = 1; else n++;
        prev_sq = sq;
        r = ramp_of(a);
        ai = int'(a);
        ph = 2.0 * 3.14159265358979 * (ai + 0.5) / 2048.0;
        tol = 0;
        case (wave_e'(w))
          WAVE_SINE: begin
            exp = $rtoi(23170.0 * $sin(ph) * 32767.0 / 32768.0);
            tol = 2;
          end
          WAVE_SQUARE:   exp = sq ? 23170 : -23170;
          WAVE_PULSE:    exp = (sq && n <= int'(width)) ? 23170 : -23170;
          WAVE_RAMP:     exp = r;
          WAVE_SAW:      exp = -r;
          default:       exp = 2 * (r < 0 ? -r : r) - 23040;
        endcase
        if (k > 0) check(int'(out) - exp <= tol && exp - int'(out) <= tol,
                         $sformatf("wave %0d sample %0d addr %0d: %0d want %0d", w, k, a, out, exp));
      end
    end
    // Frequency by zero crossings.
    frequency = 16'd1000;
    wave = WAVE_SINE;
    repeat (3) frame(a);
    begin
      int crossings;
      logic signed [15:0] prev;
      crossings = 0;
      prev = out;
      for (int k = 0; k < 2400; k++) begin
        frame(a);
        if (prev < 0 && out >= 0) crossings++;
        prev = out;
      end
      check(crossings >= 49 && crossings <= 51, $sformatf("1000 Hz: %0d crossings in 50 ms", crossings));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
