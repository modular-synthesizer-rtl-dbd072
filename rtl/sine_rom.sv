// sine_rom: 2048-point full-wave sine table stored as a 512-entry quarter wave.
//
// The stored quarter wave is T[i] = round(32767 * sin(pi/2 * (i + 0.5) / 512)),
// i = 0..511, read from sine_quarter.hex. The two symmetries of the sine give
// the other three quarters: the second quarter reads the table backwards, and
// the second half is the negated first half. So addr[10:9] selects the
// quadrant and addr[8:0] the entry (mirrored in quadrants 1 and 3). The
// half-entry offset makes the mirroring exact without a duplicated peak.
//
// The 512x16 table and the use of both symmetries follow the document; the
// half-step sampling and full-scale amplitude are this design's choices.
// Asynchronous read: data follows addr combinationally.
module sine_rom (
  input  logic [10:0]        addr,
  output logic signed [15:0] data
);

  logic [15:0] table_q [512];
  logic [8:0]  idx;
  logic [15:0] mag;

  initial $readmemh("rtl/sine_quarter.hex", table_q);

  assign idx  = addr[9] ? ~addr[8:0] : addr[8:0];
  assign mag  = table_q[idx];
  assign data = addr[10] ? -signed'(mag) : signed'(mag);

endmodule
