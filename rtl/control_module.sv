// control_module: the synthesizer's single control interface.
//
// A serial receiver, the hexadecimal command parser and a serial transmitter,
// wired together: characters arriving on rxd are parsed into 31-bit control
// bus words, and each accepted character is echoed on txd. The control bus is
// the only master bus in the system; every control_register listens to it.
// A one-character holding register sits between parser and transmitter: a
// sender typing back to back at the same baud rate delivers a character
// every ten bit times, while the transmitter needs ten bit times plus a clock
// or two per echo, so an echo may have to wait a few clocks. The lag grows by
// those few clocks per character and resets at any pause.
// Structure follows the document (UART plus parser, nothing else); the echo
// and its holding register are this design's choice.
module control_module
  import synth_pkg::*;
#(
  parameter int unsigned CLK_HZ = 64_800_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      rxd,
  output logic      txd,
  output ctrl_bus_t ctrl
);

  logic [7:0] rx_data, echo_data;
  logic       rx_valid, echo_valid, tx_busy;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst, .rxd, .data(rx_data), .data_valid(rx_valid)
  );

  command_parser u_parser (
    .clk, .rst, .rx_data, .rx_valid, .ctrl, .echo_valid, .echo_data
  );

  logic       pend_q;
  logic [7:0] pend_data_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_q      <= 1'b0;
      pend_data_q <= '0;
    end else if (echo_valid) begin
      pend_q      <= 1'b1;
      pend_data_q <= echo_data;
    end else if (!tx_busy) begin
      pend_q      <= 1'b0;
    end
  end

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst, .start(pend_q && !tx_busy), .data(pend_data_q), .txd, .busy(tx_busy)
  );

endmodule
