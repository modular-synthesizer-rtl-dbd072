// tb_sine_rom: every one of the 2048 addresses against
// round(32767 * sin(2*pi*(a + 0.5)/2048)) within 1 LSB, computed with $sin.
module tb_sine_rom;
  logic clk = 1'b0;
  logic [10:0] addr;
  logic signed [15:0] data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sine_rom dut (.addr, .data);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2048; a++) begin
      real r;
      int e;
      addr = 11'(a);
      #1;
      r = 32767.0 * $sin(2.0 * 3.14159265358979 * (a + 0.5) / 2048.0);
      e = $rtoi(r >= 0 ? $floor(r + 0.5) : -$floor(-r + 0.5));
      checks++;
      if (int'(data) - e > 1 || e - int'(data) > 1) begin
        failures++;
        $display("FAIL addr %0d: %0d want %0d", a, data, e);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
