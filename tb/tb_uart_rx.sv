// tb_uart_rx: sends random bytes as 8N1 frames at 10 clocks per bit
// (CLK_HZ = 1000, BAUD = 100), with random idle gaps, plus frames with a bad
// stop bit that must be dropped. Each good byte must come out exactly once.
module tb_uart_rx;
  logic clk = 1'b0, rst, rxd;
  logic [7:0] data;
  logic data_valid;
  int checks = 0, failures = 0, got;
  logic [7:0] last;

  always #5 clk = ~clk;

  uart_rx #(.CLK_HZ(1000), .BAUD(100)) dut (.clk, .rst, .rxd, .data, .data_valid);

  always @(posedge clk) if (data_valid) begin got++; last = data; end

  task automatic send(input logic [7:0] b, input bit stop);
    logic [9:0] fr;
    fr = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd <= fr[i];
      repeat (10) @(posedge clk);
    end
    rxd <= 1'b1;
    repeat (10 + $urandom_range(0, 7)) @(posedge clk);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; rxd = 1'b1; got = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 100; n++) begin
      logic [7:0] b;
      bit good;
      b = 8'($urandom);
      good = (n % 10) != 7;
      got = 0;
      send(b, good);
      checks++;
      if (good ? (got != 1 || last != b) : (got != 0)) begin
        failures++;
        $display("FAIL byte %h good=%0d got=%0d last=%h", b, good, got, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
