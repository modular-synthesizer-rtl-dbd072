// tb_filter_square: the filter on a 440 Hz square wave with a 4800 Hz
// cutoff and q = 2, high-pass and then low-pass: the classic test of a
// biquad on a square wave. The square is +-11585 (half the oscillator's -3 dB
// level, so the high-pass edges, which nearly double, stay inside 16 bits),
// high while a 32-bit phase advanced by 440 * 2^32 / 48000 per sample is in
// its first half. One sample per 200-clock frame; the filter shares a divider
// as in the full design.
// Each output sample is compared with two models computed in the testbench
// with real numbers:
//  - the same recurrence with the filter's own scaled coefficients and
//    output history (read from the design, so this checks the arithmetic of
//    one step): within 4 LSB;
//  - the ideal filter (coefficients from $sin/$cos at exactly 4800 Hz,
//    alpha = sin/4): within 3 % of the square's peak (348 LSB), which bounds
//    the effect of the coefficient quantization. Observed: about 50 LSB.
// Also checks the settled plateaus: the low-pass passes them at gain 1, the
// high-pass decays to 0 on them; and one result per ready.
module tb_filter_square;
  import synth_pkg::*;
  localparam int DW = 48;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst, sync, ready;
  logic signed [15:0] in, out;
  logic [15:0] frequency;
  filt_e ftype;
  logic [3:0] q;
  logic [DW-1:0] dividend [1], quotient;
  logic [15:0]   divisor [1];
  logic [0:0]    level;
  logic          q_valid, out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shared_divider #(.NUM_CLIENTS(1), .DW(DW), .VW(16), .LEVEL_OFFSET(8)) u_div (
    .clk, .rst, .sync, .dividend, .divisor, .level, .quotient, .q_valid
  );

  filter #(.DW(DW)) dut (
    .clk, .rst, .ready, .in, .frequency, .ftype, .q,
    .div_level(level[0]), .div_quotient(quotient), .div_q_valid(q_valid),
    .div_dividend(dividend[0]), .div_divisor(divisor[0]), .out, .out_valid
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; sync = 1'b0; ready = 1'b0; in = '0;
    frequency = 16'd4800; q = 4'd2;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 1; t >= 0; t--) begin
      real w, c, s, al, ib [3], ia [3];
      real mx1, mx2, my1, my2, ix1, ix2, iy1, iy2;
      int  worst_m, worst_i, plateau;
      logic [31:0] phase;
      ftype = filt_e'(t);
      w = 2.0 * PI * 4800.0 / 48000.0;
      c = $cos(w); s = $sin(w); al = s / 4.0;
      if (t == 0) begin ib[0] = (1 - c) / 2; ib[1] = 1 - c;    ib[2] = (1 - c) / 2; end
      else        begin ib[0] = (1 + c) / 2; ib[1] = -(1 + c); ib[2] = (1 + c) / 2; end
      ia[0] = 1 + al; ia[1] = -2 * c; ia[2] = 1 - al;
      // Let the coefficients settle with a silent input.
      for (int k = 0; k < 4; k++) begin
        sync <= 1'b1; @(posedge clk); sync <= 1'b0;
        repeat (199) @(posedge clk);
      end
      rst <= 1'b1; @(posedge clk); rst <= 1'b0;      // clear the filter state
      for (int k = 0; k < 4; k++) begin
        sync <= 1'b1; @(posedge clk); sync <= 1'b0;
        repeat (199) @(posedge clk);
      end
      mx1 = 0.0; mx2 = 0.0; my1 = 0.0; my2 = 0.0; ix1 = 0.0; ix2 = 0.0; iy1 = 0.0; iy2 = 0.0;
      worst_m = 0; worst_i = 0; plateau = 0;
      phase = '0;
      for (int k = 0; k < 600; k++) begin
        real x, ym, yi;
        int  em, ei;
        x = phase[31] ? -11585.0 : 11585.0;
        phase = phase + 32'd39370533;
        sync <= 1'b1; @(posedge clk); sync <= 1'b0;
        repeat (119) @(posedge clk);
        in <= 16'($rtoi(x));
        ready <= 1'b1; @(posedge clk); ready <= 1'b0;
        repeat (10) @(posedge clk);
        check(out_valid == 1'b0, "one result per ready");
        ym = ($itor(dut.sb0) * x + $itor(dut.sb1) * mx1 + $itor(dut.sb2) * mx2
              - $itor(dut.sa1) * my1 - $itor(dut.sa2) * my2) / 65536.0;
        yi = (ib[0] * x + ib[1] * ix1 + ib[2] * ix2 - ia[1] * iy1 - ia[2] * iy2) / ia[0];
        em = $rtoi(ym) - int'(out); if (em < 0) em = -em;
        ei = $rtoi(yi) - int'(out); if (ei < 0) ei = -ei;
        if (em > worst_m) worst_m = em;
        if (ei > worst_i) worst_i = ei;
        check(em <= 4, $sformatf("type %0d sample %0d: %0d, datapath model %0d", t, k, out, $rtoi(ym)));
        check(ei <= 348, $sformatf("type %0d sample %0d: %0d, ideal filter %0d", t, k, out, $rtoi(yi)));
        // Plateau 40 samples into a half period (period 109.1 samples).
        if (k > 300 && (phase[31] == 1'b0) && (phase[30:0] > 31'd1_500_000_000)) begin
          plateau++;
          if (t == 0) check(int'(out) >= 11400 && int'(out) <= 11770, $sformatf("low-pass plateau %0d", out));
          else check(int'(out) > -400 && int'(out) < 400, $sformatf("high-pass plateau %0d", out));
        end
        mx2 = mx1; mx1 = x; my1 = $itor(dut.u_acc.y1_q) / 4.0; my2 = $itor(dut.u_acc.y2_q) / 4.0;
        ix2 = ix1; ix1 = x; iy2 = iy1; iy1 = yi;
      end
      $display("%s: worst error against datapath model %0d, against ideal filter %0d LSB, %0d plateau samples",
               t ? "high-pass" : "low-pass", worst_m, worst_i, plateau);
      check(plateau > 20, "plateaus seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
