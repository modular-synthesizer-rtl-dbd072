// tb_filter: the whole filter with a shared divider, frames of 200 clocks
// with ready 120 clocks after SYNC. Cutoff 4800 Hz, q = 2 as in the
// document's tests. Checks against the expected behaviour of each type:
//  - low-pass: a constant input settles to the same value (DC gain 1,
//    within 1 %) and a full-rate alternating input (24 kHz) is reduced
//    below 5 %;
//  - high-pass: constant input settles to 0 (within 1 %), 24 kHz passes
//    (above 80 %);
//  - notch at 12 kHz: a 12 kHz input (period 4 samples) is removed (below 5 %)
//    while DC passes;
//  - out_valid once per ready, on the seventh clock edge counting the ready edge.
module tb_filter;
  import synth_pkg::*;
  localparam int DW = 48;
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

  // Runs n frames of a periodic input; returns the largest |out| over the
  // last 16 frames.
  task automatic run(input int n, input int period, input int amp, output int peak);
    peak = 0;
    for (int k = 0; k < n; k++) begin
      int lat, v;
      sync <= 1'b1; @(posedge clk); sync <= 1'b0;
      repeat (119) @(posedge clk);
      if (period == 0) v = amp;
      else if (period == 2) v = (k % 2) ? -amp : amp;
      else v = (k % 4 == 0) ? amp : ((k % 4 == 2) ? -amp : 0);
      in <= 16'(v);
      ready <= 1'b1; @(posedge clk); ready <= 1'b0;
      lat = 0;
      do begin @(posedge clk); lat++; #1; end while (!out_valid && lat < 30);
      check(lat == 6, $sformatf("latency %0d (edges counting ready)", lat + 1));
      if (k >= n - 16) peak = (int'(out) < 0 && -int'(out) > peak) ? -int'(out)
                            : (int'(out) > peak ? int'(out) : peak);
      repeat (200 - 121 - lat) @(posedge clk);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pk;
    rst = 1'b1; sync = 1'b0; ready = 1'b0; in = '0;
    frequency = 16'd4800; q = 4'd2; ftype = FILT_LOWPASS;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(200, 0, 16000, pk);
    check(pk >= 15840 && pk <= 16160, $sformatf("low-pass DC: %0d", pk));
    check(int'(out) >= 15840, $sformatf("low-pass DC sign: %0d", out));
    run(200, 2, 16000, pk);
    check(pk < 800, $sformatf("low-pass 24 kHz: %0d", pk));
    ftype = FILT_HIGHPASS;
    run(200, 0, 16000, pk);
    check(pk < 160, $sformatf("high-pass DC: %0d", pk));
    run(200, 2, 16000, pk);
    check(pk > 12800, $sformatf("high-pass 24 kHz: %0d", pk));
    ftype = FILT_NOTCH; frequency = 16'd12000;
    run(300, 4, 16000, pk);
    check(pk < 800, $sformatf("notch 12 kHz: %0d", pk));
    run(200, 0, 16000, pk);
    check(pk > 15000, $sformatf("notch DC: %0d", pk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
