// apu_wrapper: the network side of one audio processing unit (APU).
//
// An APU is a DSP core wrapped in NUM_REGS control_registers (its parameter
// inputs, each readable from the user or from any address on the audio ring)
// and one network_flow_controller (its output onto the ring at DEV_ADDR). The
// wrapper holds no logic of its own beyond a one-shot that tells the core when
// to compute: core_ready pulses for one clock, once per audio frame, on the
// first clock after SYNC at which every register is usable (it has captured
// its ring value, or it is set to its user value). The core must present its
// result on dsp_out before the next SYNC, when the ring loads it; this gives
// the one-frame latency from input to output that the ring is built around.
//
// Following the document: the register/NFC composition and the rule that a
// core's output is sampled on the next SYNC. This design's choices: the
// number of registers is a parameter (the document's example has three), the
// core sits outside the wrapper so one wrapper serves every core, register i
// answers to register address i, and the core_ready one-shot.
module apu_wrapper
  import synth_pkg::*;
#(
  parameter mod_addr_t   DEV_ADDR = '0,
  parameter int unsigned NUM_REGS = 3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sync,
  input  ctrl_bus_t           ctrl,
  input  logic [N-1:0]        data_in,
  input  mod_addr_t           addr_in,
  output logic [N-1:0]        data_out,
  output mod_addr_t           addr_out,
  // core side
  output logic [N-1:0]        reg_value [NUM_REGS],
  output logic [NUM_REGS-1:0] input_valid,
  output logic                core_ready,
  input  logic [N-1:0]        dsp_out
);

  logic [NUM_REGS-1:0] sel_ext;
  logic                fired_q, all_ready;

  for (genvar i = 0; i < NUM_REGS; i++) begin : g_reg
    control_register #(
      .REG_WIDTH           (N),
      .MY_MODULE_ADDRESS   (DEV_ADDR),
      .MY_REGISTER_ADDRESS (reg_addr_t'(i))
    ) u_reg (
      .clk, .rst, .sync, .ctrl,
      .ring_data   (data_in),
      .ring_addr   (addr_in),
      .value       (reg_value[i]),
      .input_valid (input_valid[i]),
      .sel_ext     (sel_ext[i])
    );
  end

  network_flow_controller #(
    .BUS_WIDTH (N), .AW (ADDR_WIDTH), .DEV_ADDR (DEV_ADDR)
  ) u_nfc (
    .clk, .rst, .sync, .data_in, .addr_in, .dsp_out, .data_out, .addr_out
  );

  assign all_ready  = &(input_valid | sel_ext);
  assign core_ready = all_ready && !fired_q && !sync;

  always_ff @(posedge clk) begin
    if (rst || sync) fired_q <= 1'b0;
    else if (core_ready) fired_q <= 1'b1;
  end

endmodule
