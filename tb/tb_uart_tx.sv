// tb_uart_tx: sends random bytes at 10 clocks per bit and decodes the line
// in the testbench by sampling mid-bit. Checks the byte, the start and stop
// bits, the total frame length (busy for 10 bit times) and that a start
// pulse while busy is ignored.
module tb_uart_tx;
  logic clk = 1'b0, rst, start, txd, busy;
  logic [7:0] data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_tx #(.CLK_HZ(1000), .BAUD(100)) dut (.clk, .rst, .start, .data, .txd, .busy);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; start = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    check(txd == 1'b1 && !busy, "idle high");
    for (int n = 0; n < 50; n++) begin
      logic [7:0] b, rx;
      int busy_clks;
      b = 8'($urandom);
      data <= b; start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      data <= ~b;
      // wait for the start bit edge
      while (txd) @(posedge clk);
      repeat (5) @(posedge clk);
      check(txd == 1'b0, "start bit");
      start <= 1'b1;                        // ignored while busy
      @(posedge clk);
      start <= 1'b0;
      repeat (4) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (5) @(posedge clk);
        rx[i] = txd;
        repeat (5) @(posedge clk);
      end
      repeat (5) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      check(rx == b, $sformatf("byte %h got %h", b, rx));
      busy_clks = 0;
      while (busy) begin @(posedge clk); busy_clks++; end
      check(busy_clks <= 6, $sformatf("frame length, busy %0d clocks after stop centre", busy_clks));
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
