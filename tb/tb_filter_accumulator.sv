// tb_filter_accumulator: fixed scaled coefficients (the low-pass set for
// 4800 Hz, Q = 2, and random sets), random input. The testbench runs the
// recurrence y = b0 x0 + b1 x1 + b2 x2 - a1 y1 - a2 y2 itself in 64-bit
// integers with the same formats (samples x4, coefficients x65536, result
// >> 16 saturated to 18 bits) and compares every output; out_valid must
// come 7 clocks after ready.
module tb_filter_accumulator;
  logic clk = 1'b0, rst, ready, out_valid;
  logic signed [15:0] in, out;
  logic signed [17:0] sb0, sb1, sb2, sa1, sa2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  filter_accumulator dut (.clk, .rst, .ready, .in, .sb0, .sb1, .sb2, .sa1, .sa2, .out, .out_valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ready = 1'b0; in = '0;
    for (int set = 0; set < 4; set++) begin
      longint x1, x2, y1, y2;
      if (set == 0) begin
        sb0 = 18'sd4842; sb1 = 18'sd9684; sb2 = 18'sd4842; sa1 = -18'sd92196; sa2 = 18'sd46028;
      end else begin
        sb0 = 18'($urandom_range(0, 40000)); sb1 = 18'(int'($urandom_range(0, 80000)) - 40000);
        sb2 = 18'($urandom_range(0, 40000)); sa1 = 18'(int'($urandom_range(0, 60000)) - 30000);
        sa2 = 18'($urandom_range(0, 30000));
      end
      rst <= 1'b1; repeat (2) @(posedge clk); rst <= 1'b0;
      x1 = 0; x2 = 0; y1 = 0; y2 = 0;
      for (int n = 0; n < 400; n++) begin
        longint x0, acc, y;
        int lat;
        x0 = (n % 50 < 25) ? 4 * 20000 : -4 * 20000;
        if (set > 1) x0 = 4 * (longint'($urandom_range(0, 65535)) - 32768);
        acc = sb0 * x0 + sb1 * x1 + sb2 * x2 - sa1 * y1 - sa2 * y2;
        y = acc >>> 16;
        if (y > 131071) y = 131071;
        if (y < -131072) y = -131072;
        in <= 16'(x0 / 4);
        ready <= 1'b1;
        @(posedge clk);
        ready <= 1'b0;
        lat = 0;
        do begin @(posedge clk); lat++; #1; end while (!out_valid && lat < 20);
        check(lat == 6, $sformatf("latency %0d", lat + 1));
        check(out == 16'(y >>> 2), $sformatf("set %0d n %0d: %0d want %0d", set, n, out, y >>> 2));
        x2 = x1; x1 = x0; y2 = y1; y1 = y;
        repeat (2) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
