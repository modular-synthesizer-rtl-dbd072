// uart_tx: RS-232 serializer, 8 data bits, no parity, 1 stop bit (8N1).
//
// A one-clock pulse on start with busy low latches data and sends a start bit
// (low), eight data bits LSB first and a stop bit (high), each CLKS_PER_BIT =
// CLK_HZ / BAUD clocks long. busy is high from the clock after start until the
// stop bit has been sent; start pulses while busy are ignored. The line idles
// high and is high during reset.
//
// The document takes its serial port from a public library and states only
// 9600 baud 8N1 at a 64.8 MHz clock; the implementation is this design's own.
module uart_tx #(
  parameter int unsigned CLK_HZ = 64_800_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       txd,
  output logic       busy
);

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] cnt_q;
  logic [3:0]    bits_left_q;
  logic [9:0]    frame_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q       <= '0;
      bits_left_q <= '0;
      frame_q     <= '1;
      busy        <= 1'b0;
      txd         <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        frame_q     <= {1'b1, data, 1'b0};
        bits_left_q <= 4'd10;
        cnt_q       <= '0;
        busy        <= 1'b1;
      end
    end else if (cnt_q != 0) begin
      cnt_q <= cnt_q - 1'b1;
    end else if (bits_left_q != 0) begin
      txd         <= frame_q[0];
      frame_q     <= {1'b1, frame_q[9:1]};
      bits_left_q <= bits_left_q - 1'b1;
      cnt_q       <= CW'(CLKS_PER_BIT - 1);
    end else begin
      busy <= 1'b0;
    end
  end

endmodule
