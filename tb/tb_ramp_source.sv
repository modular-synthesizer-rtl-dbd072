// tb_ramp_source: all 2048 addresses against the straight line
// floor((a - 1024) * 45 / 2), and monotonic rise across the whole table.
module tb_ramp_source;
  logic clk = 1'b0;
  logic [10:0] addr;
  logic signed [15:0] data, prev;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ramp_source dut (.addr, .data);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = -16'sd32768;
    for (int a = 0; a < 2048; a++) begin
      int e;
      addr = 11'(a);
      #1;
      e = $rtoi($floor((a - 1024) * 45.0 / 2.0));
      checks += 2;
      if (int'(data) != e) begin failures++; $display("FAIL addr %0d: %0d want %0d", a, data, e); end
      if (data <= prev) begin failures++; $display("FAIL not rising at %0d", a); end
      prev = data;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
