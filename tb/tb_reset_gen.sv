// tb_reset_gen: reset must be high from power-up for 2**CW clocks (plus
// the two-flip-flop synchroniser), then low; a button press must raise it
// within 3 clocks and hold it for 2**CW clocks after release.
module tb_reset_gen;
  logic clk = 1'b0, button, rst;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reset_gen #(.CW(4)) dut (.clk, .button, .rst);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    button = 1'b0;
    for (int press = 0; press < 4; press++) begin
      n = 0;
      #1;
      while (rst && n < 100) begin @(posedge clk); #1; n++; end
      check(n >= 16 && n <= 19, $sformatf("reset lasted %0d clocks", n));
      repeat (10) begin @(posedge clk); #1 check(!rst, "stays low"); end
      button <= 1'b1;
      repeat (3) @(posedge clk);
      #1 check(rst, "button raises reset");
      repeat ($urandom_range(1, 20)) @(posedge clk);
      #1 check(rst, "held while pressed");
      button <= 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
