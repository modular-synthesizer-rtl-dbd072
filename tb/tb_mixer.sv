// tb_mixer: random inputs and levels at DECIMAL = 15 and DECIMAL = 1 (two
// instances), checked against (in1*level1 + in2*level2) >> DECIMAL computed
// in the testbench with 64-bit integers and saturated to 16 bits. Large
// levels force clipping in both directions. out_valid must come exactly 3
// clocks after ready. Includes the document's averaging case (DECIMAL = 1,
// both levels 1).
module tb_mixer;
  logic clk = 1'b0, rst, ready;
  logic signed [15:0] in1, in2, l1, l2, out15, out1;
  logic v15, v1;
  int checks = 0, failures = 0, clipped = 0;

  always #5 clk = ~clk;

  mixer #(.DECIMAL(15)) dut15 (.clk, .rst, .ready, .in1, .in2, .level1(l1), .level2(l2), .out(out15), .out_valid(v15));
  mixer #(.DECIMAL(1))  dut1  (.clk, .rst, .ready, .in1, .in2, .level1(l1), .level2(l2), .out(out1),  .out_valid(v1));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  function automatic int model(input int d);
    longint s;
    s = (longint'(in1) * l1 + longint'(in2) * l2) >>> d;
    if (s > 32767) begin clipped++; return 32767; end
    if (s < -32768) begin clipped++; return -32768; end
    return int'(s);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ready = 1'b0; in1 = '0; in2 = '0; l1 = '0; l2 = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 2000; n++) begin
      int e15, e1;
      in1 = 16'($urandom); in2 = 16'($urandom);
      if (n == 0) begin l1 = 16'sd1; l2 = 16'sd1; end
      else if (n % 3 == 0) begin l1 = 16'($urandom_range(0, 3)); l2 = -16'($urandom_range(0, 3)); end
      else begin l1 = 16'($urandom); l2 = 16'($urandom); end
      e15 = model(15); e1 = model(1);
      @(posedge clk);
      ready <= 1'b1;
      @(posedge clk);
      ready <= 1'b0;
      repeat (2) begin #1 check(!v15, "no early valid"); @(posedge clk); end
      #1;
      check(v15 && v1, "valid 3 clocks after ready");
      check(out15 == 16'(e15), $sformatf("D15 %0d*%0d+%0d*%0d: %0d want %0d", in1, l1, in2, l2, out15, e15));
      check(out1 == 16'(e1),  $sformatf("D1 %0d*%0d+%0d*%0d: %0d want %0d", in1, l1, in2, l2, out1, e1));
    end
    check(clipped > 100, $sformatf("clipping exercised %0d times", clipped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
