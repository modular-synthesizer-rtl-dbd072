// reset_gen: system reset generation.
//
// Produces the synchronous, active-high reset used by the whole design. The
// asynchronous button input is synchronised by two flip-flops; reset is held
// for 2**CW clocks after power-up (the counter starts at zero from the FPGA's
// configuration) and after every press of the button. The registers carry
// declaration initialisers on purpose: they are the power-up values loaded by
// the FPGA configuration, since this block has no reset of its own to use
// (a lint note about initialised registers is expected here). The document only
// names this block; the stretcher is this design's choice.
module reset_gen #(
  parameter int unsigned CW = 4
) (
  input  logic clk,
  input  logic button,
  output logic rst
);

  logic [1:0]    sync_q = 2'b11;
  logic [CW-1:0] cnt_q  = '0;
  logic          done_q = 1'b0;

  always_ff @(posedge clk) begin
    sync_q <= {sync_q[0], button};
    if (sync_q[1]) begin
      cnt_q  <= '0;
      done_q <= 1'b0;
    end else if (!done_q) begin
      cnt_q <= cnt_q + 1'b1;
      if (cnt_q == '1) done_q <= 1'b1;
    end
  end

  assign rst = !done_q;

endmodule
