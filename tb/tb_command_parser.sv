// tb_command_parser: feeds characters as one-clock strobes. Random 8-digit
// hex commands (upper and lower case) mixed with non-hex characters must
// each load exactly the low 31 bits of the typed value onto the control
// bus, only after the eighth digit; the bus must not change prev_bus that.
module tb_command_parser;
  import synth_pkg::*;
  logic clk = 1'b0, rst, rx_valid, echo_valid;
  logic [7:0] rx_data, echo_data;
  ctrl_bus_t ctrl;
  int checks = 0, failures = 0, echoes;

  always #5 clk = ~clk;

  command_parser dut (.clk, .rst, .rx_data, .rx_valid, .ctrl, .echo_valid, .echo_data);

  always @(posedge clk) if (echo_valid) echoes++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic put(input logic [7:0] c);
    rx_data <= c; rx_valid <= 1'b1;
    @(posedge clk);
    rx_valid <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  function automatic logic [7:0] hexchar(input logic [3:0] n, input bit lower);
    if (n < 10) return 8'h30 + 8'(n);
    return (lower ? 8'h61 : 8'h41) + 8'(n) - 8'd10;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static string junk = "GgZz :-\n\r@/";
    rst = 1'b1; rx_valid = 1'b0; rx_data = '0; echoes = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(ctrl.reg_addr == REG_ADDR_IDLE, "idle bus after reset");
    for (int n = 0; n < 60; n++) begin
      logic [31:0] v;
      logic [30:0] prev_bus;
      v = $urandom;
      prev_bus = ctrl;
      echoes = 0;
      for (int d = 7; d >= 0; d--) begin
        if ($urandom_range(0, 3) == 0) put(junk[$urandom_range(0, junk.len() - 1)]);
        put(hexchar(v[d*4 +: 4], $urandom_range(0, 1) == 1));
        if (d > 0) check(ctrl == prev_bus, "bus unchanged until eighth digit");
      end
      check(ctrl == v[30:0], $sformatf("command %h gave %h", v, ctrl));
      check(echoes == 8, $sformatf("echoed %0d hex characters", echoes));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
