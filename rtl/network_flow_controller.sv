// network_flow_controller: output stage of one APU on the audio ring.
//
// The ring is a closed chain of these stages, one per APU, each a data register
// and an address register clocked on the system clock. On a clock edge where
// SYNC is high the stage loads the DSP core's output and its own compile-time
// address DEV_ADDR; on every other edge it copies the upstream stage's data and
// address. After a SYNC every address on the ring therefore passes every stage
// once per NUM_APU clocks, until the next SYNC refreshes the whole ring with
// the new frame's values. Two multiplexers and two registers, as in the
// document; the synchronous reset (ring cleared to zero) is this design's
// addition.
//
// Timing: data_out/addr_out change one clock after the inputs; SYNC is a
// one-clock pulse per audio frame.
module network_flow_controller
  import synth_pkg::*;
#(
  parameter int unsigned BUS_WIDTH  = N,
  parameter int unsigned AW        = synth_pkg::ADDR_WIDTH,
  parameter logic [AW-1:0] DEV_ADDR = '0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  sync,
  input  logic [BUS_WIDTH-1:0]  data_in,
  input  logic [AW-1:0] addr_in,
  input  logic [BUS_WIDTH-1:0]  dsp_out,
  output logic [BUS_WIDTH-1:0]  data_out,
  output logic [AW-1:0] addr_out
);

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out <= '0;
      addr_out <= DEV_ADDR;
    end else if (sync) begin
      data_out <= dsp_out;
      addr_out <= DEV_ADDR;
    end else begin
      data_out <= data_in;
      addr_out <= addr_in;
    end
  end

endmodule
