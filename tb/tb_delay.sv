// tb_delay: random audio through the delay with several settings (short and
// long delays, delay 0 treated as 1, an over-long delay clamped), compared
// sample by sample with a testbench model of the same signal flow:
//   stored = mix(in, 1-fb, out_prev, fb); delayed = stored from d samples
//   ago (0 before that); wet = delayed*wetdry; out = mix(wet, gain, stored,
//   1-gain), mix = (a*la + b*lb) >> 15 saturated to 16 bits.
// Also checks that out_valid comes 6 clocks after ready.
module tb_delay;
  localparam int MAXD = 64;
  logic clk = 1'b0, rst, ready;
  logic signed [15:0] in, wetdry, gain, feedback, out;
  logic [15:0] delay_len;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay #(.MAX_DELAY(MAXD)) dut (.clk, .rst, .ready, .in, .delay_len, .wetdry, .gain,
                                 .feedback, .out, .out_valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  function automatic int mix(input int a, input int la, input int b, input int lb);
    longint s;
    s = (longint'(a) * la + longint'(b) * lb) >>> 15;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int settings [5][4] = '{'{5, 16384, 20000, 0}, '{17, 30000, 16384, 12000},
                           '{0, 32767, 32767, 0}, '{200, 20000, 10000, 20000}, '{63, -16384, 8000, 9000}};
    rst = 1'b1; ready = 1'b0; in = '0; delay_len = '0; wetdry = '0; gain = '0; feedback = '0;
    for (int s = 0; s < 5; s++) begin
      int stored [$];
      int out_prev, d;
      rst <= 1'b1;
      repeat (3) @(posedge clk);
      rst <= 1'b0;
      delay_len <= 16'(settings[s][0]); wetdry <= 16'(settings[s][1]);
      gain <= 16'(settings[s][2]);      feedback <= 16'(settings[s][3]);
      d = settings[s][0] == 0 ? 1 : (settings[s][0] >= MAXD ? MAXD - 1 : settings[s][0]);
      out_prev = 0;
      stored.delete();
      @(posedge clk);
      for (int n = 0; n < 150; n++) begin
        int x, st, dl, wet, e, lat;
        x = (n % 23 == 0) ? 30000 : int'($urandom_range(0, 20000)) - 10000;
        in <= 16'(x);
        st = mix(x, 32767 - settings[s][3], out_prev, settings[s][3]);
        dl = (n >= d) ? stored[n - d] : 0;
        wet = int'(16'((longint'(dl) * settings[s][1]) >>> 15));
        e = mix(wet, settings[s][2], st, 32767 - settings[s][2]);
        stored.push_back(st);
        out_prev = e;
        ready <= 1'b1;
        @(posedge clk);
        ready <= 1'b0;
        lat = 0;
        do begin @(posedge clk); lat++; #1; end while (!out_valid && lat < 20);
        check(lat == 5, $sformatf("latency %0d", lat + 1));
        check(int'(out) == e, $sformatf("setting %0d sample %0d: %0d want %0d", s, n, out, e));
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
