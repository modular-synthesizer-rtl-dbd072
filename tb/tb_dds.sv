// tb_dds: a DDS engine reading a testbench dataset (data = address * 3).
// With random increments (including ones below one table step) the
// testbench keeps its own 32-bit phase: after each ready pulse the address
// must be the top 11 bits of that phase and the sample the dataset value of
// the previous phase. Between ready pulses nothing may change.
module tb_dds;
  logic clk = 1'b0, rst, ready;
  logic [31:0] increment, phase;
  logic [10:0] addr;
  logic signed [15:0] data, sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dds #(.PW(32), .AW(11)) dut (.clk, .rst, .ready, .increment, .addr, .data, .sample);
  assign data = 16'(addr * 3);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ready = 1'b0; increment = '0; phase = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] old;
      if (n % 200 == 0) increment <= (n % 400 == 0) ? $urandom >> 12 : $urandom >> 4;
      @(posedge clk);
      ready <= 1'b1;
      @(posedge clk);
      ready <= 1'b0;
      old = phase;
      phase = phase + increment;
      #1;
      check(addr == phase[31:21], $sformatf("addr %0d want %0d", addr, phase[31:21]));
      check(sample == 16'(old[31:21] * 3), "sample of previous phase");
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1 check(addr == phase[31:21], "holds between ready pulses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
