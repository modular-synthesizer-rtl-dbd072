// tb_modular_synth: end-to-end test of the whole synthesizer.
//
// The top is built with a fast serial port (1 MHz clock, 100 kbaud, so 10
// clocks per bit) and small memories; an audio frame (SYNC period) is 400
// clocks instead of 1350, which still leaves room for the ring, the shared
// divider levels and the slowest core. Everything is programmed the way a
// user would: eight hexadecimal characters per control-bus word, typed into
// the serial input. The testbench plays the codec: it drives a new input
// sample at each SYNC and records the output sample of each frame.
//
// Patches and what is checked:
//  1. codec in -> mixer (in1, level 1.0) -> codec out: the output equals the
//     input a fixed number of frames earlier, exactly, for random input.
//  2. the same with level 2.0 and loud input: every output equals the
//     doubled input saturated to +32767 / -32768 (clipping).
//  3. an input selector written while audio runs takes effect only at the
//     next SYNC.
//  4. oscillator at 4800 Hz (sine) -> codec out: 20 periods in 200 frames,
//     peak near the -3 dB level 23170.
//  5. sequencer -> oscillator frequency: four notes at speed 2 (a step every
//     third frame) in loop, reverse and stop end modes.
//  6. filter with a constant input: low-pass passes it, high-pass removes it.
//  7. codec in -> delay of 5 samples, fully wet: the output is the input a
//     fixed number of frames later within a few LSB.
//  8. codec in -> sampler: record a ramp, play it back looped, then silence.
//  9. codec in -> display: a constant sample draws bars of the right length.
// Mechanisms counted (each must happen at least once): ring reload at SYNC,
// control writes to each of the three register locations, selector switch
// at SYNC, both shared-divider levels, mixer clipping, sequencer loop wrap,
// reverse turn and stop, sampler record, playback loop and silence, display
// bars drawn, serial echo.
module tb_modular_synth;
  import synth_pkg::*;
  localparam int FRAME = 400;
  localparam int MAXF  = 8000;

  logic clk = 1'b0, button_reset, sync = 1'b0, uart_rxd = 1'b1, uart_txd;
  logic signed [15:0] ac97_in = '0, ac97_out;
  logic [10:0] hcount = '0;
  logic [9:0]  vcount = '0;
  logic [7:0]  pixel;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  modular_synth #(
    .CLK_HZ(1_000_000), .BAUD(100_000), .SEQ_DEPTH(16), .DELAY_MAX(64),
    .SAMPLER_DEPTH(256), .SAMPLER_WIDTH(8), .DISPLAY_ROWS(8)
  ) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", msg); end
  endtask

  // ---------------------------------------------------------------- codec
  int src = 0;            // 0 random small, 1 random loud, 2 ramp, 3 constant
  int const_val = 0;
  int frame = 0;
  int cyc = 0;
  longint now = 0;
  shortint in_h [MAXF], out_h [MAXF], dly_h [MAXF], smp_h [MAXF], frq_h [MAXF];

  always @(posedge clk) begin
    now++;
    if (cyc == FRAME - 1) begin
      cyc = 0;
      sync <= 1'b1;
      if (frame < MAXF) begin
        out_h[frame] = ac97_out;
        dly_h[frame] = dut.dsp_out[5];
        smp_h[frame] = dut.dsp_out[6];
        frq_h[frame] = dut.regs[1][0];
      end
      frame++;
      case (src)
        0: ac97_in <= 16'(int'($urandom_range(0, 32000)) - 16000);
        1: ac97_in <= 16'(int'($urandom_range(0, 60000)) - 30000);
        2: ac97_in <= 16'((frame % 256) * 256);
        default: ac97_in <= 16'(const_val);
      endcase
    end else begin
      cyc++;
      sync <= 1'b0;
    end
    if (sync && frame < MAXF) in_h[frame] = ac97_in;
  end

  task automatic frames(input int n);
    int f0 = frame;
    while (frame < f0 + n) @(posedge clk);
  endtask

  // ---------------------------------------------------------------- serial
  int n_loc [4] = '{0, 0, 0, 0};
  int n_chars = 0, n_starts = 0;

  always @(posedge clk) if (!dut.rst && dut.u_control.echo_valid) n_starts++;

  task automatic send(input logic [7:0] b);
    logic [9:0] fr = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd <= fr[i];
      repeat (10) @(posedge clk);
    end
    repeat (2) @(posedge clk);
    n_chars++;
  endtask

  task automatic cmd(input loc_sel_e loc, input int ra, input int ma, input int data);
    ctrl_bus_t w;
    logic [31:0] v;
    string s;
    w = '{loc_sel: loc, reg_addr: 8'(ra), mod_addr: 5'(ma), data: 16'(data)};
    v = {1'b0, w};
    s = $sformatf("%08X", v);
    // A stray non-hex character must be ignored by the parser.
    send("g");
    for (int i = 0; i < 8; i++) send(s[i]);
    repeat (4) @(posedge clk);
    check(dut.u_control.ctrl == w, $sformatf("control word %s", s));
    n_loc[loc]++;
  endtask

  // Route register (ma, ra) to read the ring word of address from.
  task automatic patch(input int ma, input int ra, input int from);
    cmd(LOC_VALID_ADDR, ra, ma, from);
    cmd(LOC_INPUT_SEL,  ra, ma, 0);
  endtask

  task automatic set(input int ma, input int ra, input int value);
    cmd(LOC_EXTERNAL,   ra, ma, value);
    cmd(LOC_INPUT_SEL,  ra, ma, 1);
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_reload = 0, n_lvl0 = 0, n_lvl1 = 0, n_clip = 0, n_selsw = 0;
  int n_wrap = 0, n_turn = 0, n_stop = 0, n_speed = 0;
  int n_rec = 0, n_loop = 0, n_silent = 0, n_bars = 0;

  always @(posedge clk) begin
    if (sync) begin
      #1;
      check(dut.ring_addr[1] == 5'h01 && dut.ring_addr[7] == 5'h1F &&
            dut.ring_data[0] == dut.dsp_out[0], "ring reload at SYNC");
      n_reload++;
    end
  end
  always @(posedge clk) if (dut.div_q_valid && dut.div_level[0]) n_lvl0++;
  always @(posedge clk) if (dut.div_q_valid && dut.div_level[1]) n_lvl1++;

  // Finds the lag L (lo..hi) for which out[k] == f(in[k - L]) within tol over
  // frames a..b; returns -1 if none.
  function automatic int find_lag(input int a, input int b, input int lo, input int hi,
                                  input int gain2, input int tol, input bit dly);
    for (int l = lo; l <= hi; l++) begin
      bit ok = 1'b1;
      for (int k = a; k < b; k++) begin
        int want, got;
        want = int'(in_h[k - l]);
        if (gain2 != 0) begin
          want = (want * 32767) >>> 14;
          if (want > 32767) want = 32767;
          if (want < -32768) want = -32768;
        end
        got = dly ? int'(dly_h[k]) : int'(out_h[k]);
        if (got - want > tol || want - got > tol) ok = 1'b0;
      end
      if (ok) return l;
    end
    return -1;
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f0, lag, pk, zc, prev;
    button_reset = 1'b1;
    repeat (5) @(posedge clk);
    button_reset = 1'b0;
    repeat (40) @(posedge clk);

    // 1. codec -> mixer -> codec
    patch(5'h04, 0, 5'h00);
    set(5'h04, 2, 16384);
    set(5'h04, 1, 0);
    set(5'h04, 3, 0);
    patch(5'h00, 0, 5'h04);
    frames(4);
    f0 = frame;
    frames(60);
    lag = find_lag(f0 + 8, frame - 1, 0, 8, 0, 0, 0);
    check(lag >= 0, "mixer loopback: output is the input delayed");
    $display("loopback lag %0d frames", lag);

    // 2. clipping at level 2.0
    src = 1;
    set(5'h04, 2, 32767);
    frames(4);
    f0 = frame;
    frames(60);
    check(lag >= 0 && find_lag(f0 + 8, frame - 1, lag, lag, 1, 0, 0) == lag, "mixer clipping");
    for (int k = f0 + 8; k < frame - 1; k++)
      if (((int'(in_h[k - lag]) * 32767) >>> 14) > 32767 ||
          ((int'(in_h[k - lag]) * 32767) >>> 14) < -32768) n_clip++;

    // 3. selector switch at SYNC: mixer in1 external 1234 -> ring (codec)
    src = 3; const_val = 777;
    set(5'h04, 0, 1234);
    frames(2);
    check(dut.regs[4][0] == 16'd1234, "external value selected");
    begin
      longint t_ctrl, t_sync, t_sw;
      bit seen;
      t_ctrl = 0; t_sync = 0; t_sw = 0; seen = 1'b0;
      fork
        cmd(LOC_INPUT_SEL, 0, 5'h04, 0);
        begin
          ctrl_bus_t c0;
          c0 = dut.ctrl;
          while (!seen) begin
            @(posedge clk); #1;
            if (dut.ctrl != c0 && t_ctrl == 0) t_ctrl = now;
            if (sync && t_ctrl != 0 && t_sync == 0) t_sync = now;
            if (dut.regs[4][0] != 16'd1234) begin t_sw = now; seen = 1; end
          end
        end
      join
      check(t_sync != 0 && t_sw >= t_sync, "selector changes only at SYNC");
      if (t_sync != 0 && t_sw >= t_sync) n_selsw++;
      frames(2);
      check(dut.regs[4][0] == 16'd777, "ring value selected");
    end

    // 4. oscillator 4800 Hz sine -> codec
    set(5'h01, 0, 4800);
    set(5'h01, 1, WAVE_SINE);
    patch(5'h00, 0, 5'h01);
    frames(4);
    f0 = frame;
    frames(200);
    pk = 0; zc = 0;
    for (int k = f0; k < frame - 1; k++) begin
      if (int'(out_h[k]) > pk) pk = int'(out_h[k]);
      if (k > f0 && out_h[k - 1] < 0 && out_h[k] >= 0) zc++;
    end
    check(zc >= 19 && zc <= 21, $sformatf("4800 Hz: %0d rising crossings in 200 frames", zc));
    check(pk >= 21900 && pk <= 23170, $sformatf("sine peak %0d", pk));

    // 5. sequencer -> oscillator frequency
    set(5'h03, 2, 2);
    for (int i = 0; i < 4; i++) begin
      set(5'h03, 0, PITCH_A3_A6[12 + 2 * i]);
      set(5'h03, 1, (1 << 15) | (END_LOOP << 13) | (3 << 4) | i);
      set(5'h03, 1, (END_LOOP << 13) | (3 << 4) | i);
    end
    set(5'h03, 1, (END_LOOP << 13) | (3 << 4));
    patch(5'h01, 0, 5'h03);
    for (int m = 0; m < 3; m++) begin
      int run, last, v, d, pos [int];
      seq_end_e em;
      run = 0; last = -1;
      em = (m == 0) ? END_LOOP : ((m == 1) ? END_REVERSE : END_STOP);
      if (m > 0) set(5'h03, 1, (em << 13) | (3 << 4));
      f0 = frame;
      frames(80);
      for (int i = 0; i < 4; i++) pos[PITCH_A3_A6[12 + 2 * i]] = i;
      for (int k = f0 + 4; k < frame - 1; k++) begin
        v = int'(frq_h[k]);
        check(pos.exists(v), $sformatf("sequencer value %0d", v));
        if (last >= 0 && v != last && pos.exists(v) && pos.exists(last)) begin
          d = pos[v] - pos[last];
          if (run == 3) n_speed++;
          if (em == END_LOOP) begin
            check(d == 1 || (d == -3), "loop order");
            if (d == -3) n_wrap++;
          end else if (em == END_REVERSE) begin
            check(d == 1 || d == -1, "reverse order");
          end
          run = 0;
        end
        if (em == END_REVERSE && k > f0 + 5 && v != last && last >= 0 && pos.exists(v)
            && (pos[v] == 2 && int'(frq_h[k - 1]) == PITCH_A3_A6[18])) n_turn++;
        run++;
        last = v;
      end
      if (em == END_STOP) begin
        for (int k = frame - 30; k < frame - 1; k++)
          check(int'(frq_h[k]) == PITCH_A3_A6[18], "stop holds the last step");
        n_stop++;
      end
    end

    // 6. filter, constant input
    set(5'h02, 0, 16000);
    set(5'h02, 1, 4800);
    set(5'h02, 3, 2);
    set(5'h02, 2, FILT_LOWPASS);
    frames(100);
    check(int'(dut.dsp_out[2]) >= 15840 && int'(dut.dsp_out[2]) <= 16160,
          $sformatf("low-pass DC %0d", $signed(dut.dsp_out[2])));
    set(5'h02, 2, FILT_HIGHPASS);
    frames(100);
    check($signed(dut.dsp_out[2]) < 160 && $signed(dut.dsp_out[2]) > -160,
          $sformatf("high-pass DC %0d", $signed(dut.dsp_out[2])));

    // 7. delay 5 samples, fully wet
    src = 0;
    set(5'h05, 1, 5);
    set(5'h05, 2, 32767);
    set(5'h05, 3, 32767);
    set(5'h05, 4, 0);
    patch(5'h05, 0, 5'h00);
    frames(10);
    f0 = frame;
    frames(60);
    lag = find_lag(f0, frame - 1, 5, 10, 0, 8, 1);
    check(lag >= 0, "delay output is the delayed input");
    $display("delay lag %0d frames", lag);

    // 8. sampler: record a ramp, play it back, silence
    src = 2;
    patch(5'h06, 0, 5'h00);
    set(5'h06, 1, SMP_RECORD);
    n_rec++;
    frames(40);
    set(5'h06, 1, SMP_PLAYBACK);
    f0 = frame;
    frames(200);
    begin
      int up, jumps, d;
      up = 0; jumps = 0;
      for (int k = f0 + 4; k < frame - 1; k++) begin
        d = (int'(smp_h[k]) - int'(smp_h[k - 1])) & 32'hFFFF;
        check((smp_h[k] & 16'h00FF) == 0, "sampler keeps 8 bits");
        if (d == 256) up++; else jumps++;
      end
      check(up > 150, $sformatf("playback follows the recording (%0d steps)", up));
      check(jumps >= 3 && jumps <= 6, $sformatf("playback loops (%0d jumps)", jumps));
      n_loop += jumps;
    end
    set(5'h06, 1, SMP_SILENCE);
    frames(3);
    check(dut.dsp_out[6] == '0, "sampler silent");
    n_silent++;

    // 9. display: constant 0x4000 -> bar from 512 to 768 on every line
    src = 3; const_val = 16'h4000;
    patch(5'h1F, 0, 5'h00);
    frames(8 * 32 + 40);
    for (int r = 0; r < 8; r++) begin
      int hs [4];
      hs = '{600, 768, 900, 400};
      for (int h = 0; h < 4; h++) begin
        vcount <= 10'(r); hcount <= 11'(hs[h]);
        repeat (3) @(posedge clk);
        #1;
        if (h < 2) begin
          check(pixel == 8'hC0 && rgb == 24'hDB0000, $sformatf("row %0d h %0d lit: %h %h", r, hs[h], pixel, rgb));
          n_bars++;
        end else check(pixel == 8'h00, $sformatf("row %0d h %0d dark", r, hs[h]));
      end
    end

    // ------------------------------------------------------ mechanism tally
    begin
      string nm [16];
      int ct [16];
      nm = '{"ring reload", "external writes", "address writes", "selector writes",
                         "selector switch at SYNC", "divider level 0", "divider level 1",
                         "mixer clipping", "sequencer loop wrap", "sequencer reverse turn",
                         "sequencer stop", "sequencer speed", "sampler record",
                         "sampler loop", "sampler silence", "display bars"};
      ct = '{n_reload, n_loc[0], n_loc[1], n_loc[2], n_selsw, n_lvl0, n_lvl1, n_clip,
             n_wrap, n_turn, n_stop, n_speed, n_rec, n_loop, n_silent, n_bars};
      foreach (nm[i]) begin
        $display("mechanism %-24s %0d", nm[i], ct[i]);
        check(ct[i] > 0, {"mechanism never happened: ", nm[i]});
      end
      $display("mechanism %-24s %0d of %0d", "serial echo", n_starts, n_chars);
      check(n_starts * 9 == n_chars * 8, "every hex character echoed, the stray one not");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
