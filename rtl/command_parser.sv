// command_parser: turns typed hexadecimal text into control-bus words.
//
// The user types eight hexadecimal characters (0-9, A-F, a-f) for one 32-bit
// value, most significant digit first. A counter starts at 8; each valid
// character shifts its nibble into an assembly register and counts down. When
// the count reaches 0 the low 31 bits of the assembled value are loaded onto
// the control bus and the counter returns to 8. Any other character is
// ignored and leaves the count unchanged. The control bus holds the last
// command until the next one is complete; each accepted character is also
// offered back (echo_valid/echo_data) so a terminal can show it.
//
// Following the document: the 8-to-0 counter, hex-only input and the load of
// the bus only after all eight characters. This design's choices: lower-case
// digits are accepted, the 32nd bit is dropped, the echo, and the reset value
// of the bus (register address REG_ADDR_IDLE, which no register answers to).
//
// Timing: rx_valid is a one-clock strobe; ctrl changes on the clock after the
// strobe of the eighth character.
module command_parser
  import synth_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output ctrl_bus_t  ctrl,
  output logic       echo_valid,
  output logic [7:0] echo_data
);

  logic [3:0]  count_q;
  logic [31:0] value_q;
  logic [3:0]  nibble;
  logic        is_hex;

  always_comb begin
    is_hex = 1'b1;
    nibble = '0;
    if (rx_data >= "0" && rx_data <= "9")      nibble = 4'(rx_data - 8'h30);
    else if (rx_data >= "A" && rx_data <= "F") nibble = 4'(rx_data - 8'h37);
    else if (rx_data >= "a" && rx_data <= "f") nibble = 4'(rx_data - 8'h57);
    else is_hex = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count_q       <= 4'd8;
      value_q       <= '0;
      ctrl          <= '0;
      ctrl.reg_addr <= REG_ADDR_IDLE;
      echo_valid    <= 1'b0;
      echo_data     <= '0;
    end else begin
      echo_valid <= 1'b0;
      if (rx_valid && is_hex) begin
        echo_valid <= 1'b1;
        echo_data  <= rx_data;
        if (count_q == 4'd1) begin
          ctrl    <= ctrl_bus_t'({value_q[26:0], nibble});
          count_q <= 4'd8;
        end else begin
          value_q <= {value_q[27:0], nibble};
          count_q <= count_q - 1'b1;
        end
      end
    end
  end

endmodule
