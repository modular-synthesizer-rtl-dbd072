// ramp_source: ramp dataset for the DDS, computed instead of stored.
//
// Presents the same interface as sine_rom (an 11-bit address in, a signed
// 16-bit sample out) but needs no memory: the value is a straight line of
// the address, data = ((addr - 1024) * 45) >>> 1, running from -23040 at
// address 0 to +23017 at address 2047, about the same -3 dB peak as the
// other waveforms. The document gives the idea (addition on the lookup
// address); the slope and offset are this design's choice.
module ramp_source (
  input  logic [10:0]        addr,
  output logic signed [15:0] data
);

  logic signed [18:0] scaled;

  assign scaled = (signed'({8'd0, addr}) - 19'sd1024) * 19'sd45;
  assign data   = 16'(scaled >>> 1);

endmodule
