// uart_rx: RS-232 de-serializer, 8 data bits, no parity, 1 stop bit (8N1).
//
// The serial line is first synchronised by two flip-flops. A falling edge on
// the idle-high line starts a frame; the receiver waits half a bit to reach
// the middle of the start bit, checks it is still low, then samples eight data
// bits (LSB first) one bit period (CLKS_PER_BIT = CLK_HZ / BAUD clocks) apart
// and finally the stop bit. A frame whose stop bit is high raises data_valid
// for one clock with the byte on data; a frame with a low stop bit is dropped.
//
// The document takes its serial port from a public library and states only
// 9600 baud 8N1 at a 64.8 MHz clock; the oversampling scheme here is this
// design's own.
module uart_rx #(
  parameter int unsigned CLK_HZ = 64_800_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       data_valid
);

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  state_e         state_q;
  logic [CW-1:0]  cnt_q;
  logic [2:0]     bit_q;
  logic [7:0]     shift_q;
  logic [1:0]     sync_q;
  logic           rx;

  assign rx = sync_q[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q     <= 2'b11;
      state_q    <= S_IDLE;
      cnt_q      <= '0;
      bit_q      <= '0;
      shift_q    <= '0;
      data       <= '0;
      data_valid <= 1'b0;
    end else begin
      sync_q     <= {sync_q[0], rxd};
      data_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (!rx) begin
          state_q <= S_START;
          cnt_q   <= CW'(CLKS_PER_BIT / 2);
        end
        S_START: if (cnt_q != 0) cnt_q <= cnt_q - 1'b1;
          else if (!rx) begin
            state_q <= S_DATA;
            cnt_q   <= CW'(CLKS_PER_BIT - 1);
            bit_q   <= '0;
          end else state_q <= S_IDLE;
        S_DATA: if (cnt_q != 0) cnt_q <= cnt_q - 1'b1;
          else begin
            shift_q <= {rx, shift_q[7:1]};
            cnt_q   <= CW'(CLKS_PER_BIT - 1);
            if (bit_q == 3'd7) state_q <= S_STOP;
            bit_q <= bit_q + 1'b1;
          end
        S_STOP: if (cnt_q != 0) cnt_q <= cnt_q - 1'b1;
          else begin
            state_q <= S_IDLE;
            if (rx) begin
              data       <= shift_q;
              data_valid <= 1'b1;
            end
          end
      endcase
    end
  end

endmodule
