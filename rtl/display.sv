// display: scrolling waveform display for a rotated 1024x768 monitor.
//
// Every SAMPLE_EVERY ready pulses the top 10 bits of the input sample are
// written into a ROWS-entry array, one entry after another, wrapping around.
// The monitor is turned on its side, so each scan line (vcount) is one time
// step and the beam position along the line (hcount, 0..1023) is amplitude.
// For scan line r the stored value v (signed, -512..511) is shifted to
// v + 512; pixels whose hcount lies between 512 and v + 512 are lit, drawing a
// bar from the centre line out to the sample. The bar's colour is also taken
// from the sample: the top 8 bits of v + 512 as 3-bit red, 3-bit green, 2-bit
// blue (pixel), each field repeated to 8 bits for a 24-bit output (rgb).
// hcount/vcount come from an external video timing generator; outputs lag
// them by two clocks.
//
// Following the document: 10 bits per sample, one sample per 32 ready
// pulses, 768 entries, the 512 offset, the bar between 512 and the shifted
// value and the 3-3-2 colour repeated to 8 bits. This design's choices: which
// 8 of the 10 bits set the colour, and that row r shows array entry r.
module display #(
  parameter int unsigned ROWS         = 768,
  parameter int unsigned SAMPLE_EVERY = 32,
  localparam int unsigned RW          = $clog2(ROWS)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ready,
  input  logic signed [15:0] in,
  input  logic [10:0]        hcount,
  input  logic [9:0]         vcount,
  output logic [7:0]         pixel,
  output logic [23:0]        rgb
);

  logic [9:0]  arr_q [ROWS];
  logic [RW-1:0] wptr_q;
  logic [$clog2(SAMPLE_EVERY+1)-1:0] cnt_q;
  logic [9:0]  row_val_q;
  logic [10:0] hcount_d;
  logic        row_ok_d;
  logic [9:0]  shifted;
  logic        lit;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr_q <= '0;
      cnt_q  <= '0;
    end else if (ready) begin
      if (cnt_q == ($bits(cnt_q))'(SAMPLE_EVERY - 1)) begin
        cnt_q  <= '0;
        wptr_q <= (wptr_q == RW'(ROWS - 1)) ? '0 : wptr_q + 1'b1;
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (ready && cnt_q == ($bits(cnt_q))'(SAMPLE_EVERY - 1)) arr_q[wptr_q] <= in[15:6];
    row_val_q <= arr_q[RW'(vcount)];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount_d <= '0;
      row_ok_d <= 1'b0;
    end else begin
      hcount_d <= hcount;
      row_ok_d <= (32'(vcount) < ROWS);
    end
  end

  assign shifted = row_val_q + 10'd512;     // two's complement + 512 = offset binary
  assign lit = row_ok_d && hcount_d < 11'd1024 &&
               ((hcount_d >= 11'd512 && hcount_d <= {1'b0, shifted}) ||
                (hcount_d <= 11'd512 && hcount_d >= {1'b0, shifted}));

  always_ff @(posedge clk) begin
    if (rst) begin
      pixel <= '0;
      rgb   <= '0;
    end else begin
      pixel <= lit ? shifted[9:2] : 8'd0;
      rgb   <= lit ? {shifted[9:7], shifted[9:7], shifted[9:8],
                      shifted[6:4], shifted[6:4], shifted[6:5],
                      {4{shifted[3:2]}}} : 24'd0;
    end
  end

endmodule
