// tb_modular_synth_full: the synthesizer at its full size and speed.
//
// No parameter is overridden: 64.8 MHz clock, a 9600-baud serial port (6750
// clocks per bit), a 1350-clock audio frame (48 kHz), the full-size
// sequencer, delay line, sampler and display memories. The testbench types
// three control words into the serial port (about 540,000 clocks each):
// oscillator frequency 440 Hz (sine is the reset wave), then codec output
// register 0 reads ring address 0x01 (the oscillator). It then plays
// codec for 1100 frames and checks:
//  - the output is a 440 Hz tone: 10 rising zero crossings (+-1) in 1091
//    frames (10 periods of 109.1 frames);
//  - its peak is the -3 dB level 23170 within 0.5 %;
//  - consecutive samples never differ by more than the sine's largest step
//    (2 pi 440/48000 * 23170 ~ 1335, plus up to one step of the 2048-point table, ~71);
//  - every APU's core is started exactly once per 1350-clock frame.
// Then it types six more words to patch the oscillator (now a square) into
// the filter (low-pass, 4800 Hz, q = 1) and the filter into the codec, and
// checks 330 output samples against an ideal biquad computed with real
// numbers from the filter's recorded input: within 700 (3 % of the peak).
// q = 1 (alpha = sin/2) keeps the ringing of a full-scale square, which
// peaks at 31183, inside 16 bits; with q = 2 it would reach 43425 and clip.
module tb_modular_synth_full;
  import synth_pkg::*;
  localparam int FRAME = 1350;
  localparam int BIT   = 6750;

  logic clk = 1'b0, button_reset, sync = 1'b0, uart_rxd = 1'b1, uart_txd;
  logic signed [15:0] ac97_in = '0, ac97_out;
  logic [10:0] hcount = '0;
  logic [9:0]  vcount = '0;
  logic [7:0]  pixel;
  logic [23:0] rgb;
  int checks = 0, failures = 0;
  int frame = 0, cyc = 0, starts = 0;
  bit measure = 1'b0;
  shortint out_h [1200], fin_h [1200];

  always #5 clk = ~clk;

  modular_synth dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) begin
    if (cyc == FRAME - 1) begin
      cyc = 0;
      sync <= 1'b1;
      if (measure) begin
        if (frame < 1200) begin
          out_h[frame] = ac97_out;
          fin_h[frame] = dut.regs[2][0];
        end
        check(starts == 8, $sformatf("frame %0d: %0d core starts", frame, starts));
        frame++;
      end
      starts = 0;
      ac97_in <= 16'($urandom);
    end else begin
      cyc++;
      sync <= 1'b0;
    end
    for (int a = 0; a < 8; a++) if (dut.core_ready[a]) starts++;
  end

  task automatic send(input logic [7:0] b);
    logic [9:0] fr = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd <= fr[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  task automatic cmd(input loc_sel_e loc, input int ra, input int ma, input int data);
    ctrl_bus_t w;
    string s;
    w = '{loc_sel: loc, reg_addr: 8'(ra), mod_addr: 5'(ma), data: 16'(data)};
    s = $sformatf("%08X", {1'b0, w});
    for (int i = 0; i < 8; i++) send(s[i]);
    repeat (BIT) @(posedge clk);
    check(dut.ctrl == w, $sformatf("control word %s", s));
  endtask

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pk, zc, step;
    button_reset = 1'b1;
    repeat (5) @(posedge clk);
    button_reset = 1'b0;
    cmd(LOC_EXTERNAL,   0, 5'h01, 440);
    cmd(LOC_VALID_ADDR, 0, 5'h00, 5'h01);
    cmd(LOC_INPUT_SEL,  0, 5'h00, 0);
    repeat (3 * FRAME) @(posedge clk);
    measure = 1'b1;
    wait (frame == 1091);
    pk = 0; zc = 0; step = 0;
    for (int k = 1; k < 1091; k++) begin
      int d;
      if (int'(out_h[k]) > pk) pk = int'(out_h[k]);
      if (out_h[k - 1] < 0 && out_h[k] >= 0) zc++;
      d = int'(out_h[k]) - int'(out_h[k - 1]);
      if (d < 0) d = -d;
      if (d > step) step = d;
    end
    $display("440 Hz: %0d rising crossings, peak %0d, largest step %0d", zc, pk, step);
    check(zc >= 9 && zc <= 11, "tone frequency");
    check(pk >= 23054 && pk <= 23170, "tone level");
    check(step <= 1410 && step >= 1250, "tone smoothness");

    // Second patch: oscillator square -> low-pass filter -> codec.
    measure = 1'b0;
    cmd(LOC_EXTERNAL,   1, 5'h01, WAVE_SQUARE);
    cmd(LOC_VALID_ADDR, 0, 5'h02, 5'h01);
    cmd(LOC_INPUT_SEL,  0, 5'h02, 0);
    cmd(LOC_EXTERNAL,   1, 5'h02, 4800);
    cmd(LOC_EXTERNAL,   3, 5'h02, 1);
    cmd(LOC_VALID_ADDR, 0, 5'h00, 5'h02);
    repeat (3 * FRAME) @(posedge clk);
    frame = 0;
    measure = 1'b1;
    wait (frame == 440);
    begin
      real c, sn, al, b [3], a [3], yv [440];
      int lag, worst, e;
      c = $cos(2.0 * 3.14159265358979 * 0.1); sn = $sin(2.0 * 3.14159265358979 * 0.1); al = sn / 2.0;
      b[0] = (1 - c) / 2; b[1] = 1 - c; b[2] = (1 - c) / 2;
      a[0] = 1 + al; a[1] = -2 * c; a[2] = 1 - al;
      yv[0] = 0.0; yv[1] = 0.0;
      for (int k = 2; k < 440; k++)
        yv[k] = (b[0] * fin_h[k] + b[1] * fin_h[k - 1] + b[2] * fin_h[k - 2]
                 - a[1] * yv[k - 1] - a[2] * yv[k - 2]) / a[0];
      lag = -1;
      for (int l = 0; l <= 3 && lag < 0; l++) begin
        worst = 0;
        for (int k = 100; k < 430; k++) begin
          e = $rtoi(yv[k]) - int'(out_h[k + l]);
          if (e < 0) e = -e;
          if (e > worst) worst = e;
        end
        if (worst <= 700) lag = l;
      end
      $display("440 Hz square through the 4800 Hz low-pass: %0d frames later, within %0d of the ideal filter", lag, worst);
      check(lag >= 0, "low-pass output follows the ideal biquad");
      check(fin_h[200] == 16'sd23170 || fin_h[200] == -16'sd23170, "square input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
