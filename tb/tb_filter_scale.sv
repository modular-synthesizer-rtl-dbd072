// tb_filter_scale: random coefficient sets (a0 between 1.0 and 1.5, others
// anywhere in -2..2) pushed back to back. Each output must equal
// trunc(x * 65536 / a0) with x's sign, saturated to +-131071, computed in the
// testbench with 64-bit integers; scaled_valid must come QB + 5 = 23 clocks
// after coef_valid, once per set, and outputs must not change before it.
module tb_filter_scale;
  logic clk = 1'b0, rst, coef_valid, scaled_valid;
  logic signed [17:0] b0, b1, b2, a0, a1, a2, sb0, sb1, sb2, sa1, sa2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  filter_scale dut (.clk, .rst, .coef_valid, .b0, .b1, .b2, .a0, .a1, .a2,
                    .sb0, .sb1, .sb2, .sa1, .sa2, .scaled_valid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  function automatic int sdiv(input int x, input int d);
    longint m, qv;
    m = (x < 0) ? -longint'(x) : longint'(x);
    qv = (m * 65536) / d;
    if (qv > 131071) qv = 131071;
    return (x < 0) ? -int'(qv) : int'(qv);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; coef_valid = 1'b0; {b0, b1, b2, a0, a1, a2} = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 300; n++) begin
      int x [5], d, lat;
      logic signed [17:0] prev0;
      d = $urandom_range(65536, 98304);
      foreach (x[i]) x[i] = (n % 10 == 3) ? ((i % 2) ? -131072 : 131071)
                                          : int'($urandom_range(0, 262143)) - 131072;
      b0 <= 18'(x[0]); b1 <= 18'(x[1]); b2 <= 18'(x[2]); a1 <= 18'(x[3]); a2 <= 18'(x[4]);
      a0 <= 18'(d);
      coef_valid <= 1'b1;
      @(posedge clk);
      coef_valid <= 1'b0;
      prev0 = sb0;
      lat = 0;
      do begin
        @(posedge clk); lat++; #1;
        if (!scaled_valid) check(sb0 == prev0, "outputs hold until the new set is complete");
      end while (!scaled_valid && lat < 40);
      check(lat == 23, $sformatf("latency %0d", lat));
      check(sb0 == 18'(sdiv(x[0], d)), $sformatf("b0 %0d/%0d: %0d want %0d", x[0], d, sb0, sdiv(x[0], d)));
      check(sb1 == 18'(sdiv(x[1], d)), "b1");
      check(sb2 == 18'(sdiv(x[2], d)), "b2");
      check(sa1 == 18'(sdiv(x[3], d)), "a1");
      check(sa2 == 18'(sdiv(x[4], d)), "a2");
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
