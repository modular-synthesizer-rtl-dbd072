// control_register: one parameter input of an APU.
//
// Holds four things that the control bus can program: a user value
// (EXTERNAL), the ring address to listen to (VALID_ADDR), and the input
// selector, plus the value last read from the audio ring (INTERNAL). After
// every SYNC pulse input_valid drops; the register then watches the ring
// address passing its input and, when it equals VALID_ADDR, stores the ring
// data word as INTERNAL and raises input_valid again. The output is EXTERNAL
// when the input selector is 1 and INTERNAL when it is 0.
//
// Control bus: a word addressed to MY_MODULE_ADDRESS and MY_REGISTER_ADDRESS
// writes EXTERNAL (loc_sel 0, data[15:0]), VALID_ADDR (loc_sel 1, data[4:0]) or
// the input selector (loc_sel 2, data[0]); loc_sel 3 writes nothing. The new
// selector is held in a temporary register and takes effect at the next SYNC,
// so a frame never switches source half way; EXTERNAL and VALID_ADDR take
// effect on the next clock. The bus may hold a word for many clocks: writes are
// idempotent.
//
// Following the document: the four registers, the decode tree, the SYNC-based
// capture and the temporary selector. This design's choices: reset values
// (selector = external, VALID_ADDR = 0, values 0), a capture only once per frame
// (the first match after SYNC), and sel_ext, an extra output that lets the APU
// treat a register on its user value as always valid.
module control_register
  import synth_pkg::*;
#(
  parameter int unsigned REG_WIDTH = N,
  parameter mod_addr_t MY_MODULE_ADDRESS   = '0,
  parameter reg_addr_t MY_REGISTER_ADDRESS = '0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sync,
  input  ctrl_bus_t            ctrl,
  input  logic [REG_WIDTH-1:0] ring_data,
  input  mod_addr_t            ring_addr,
  output logic [REG_WIDTH-1:0] value,
  output logic                 input_valid,
  output logic                 sel_ext
);

  logic [REG_WIDTH-1:0] external_q, internal_q;
  mod_addr_t            valid_addr_q;
  logic                 input_sel_q, temp_input_sel_q;
  logic                 hit;

  assign hit = (ctrl.mod_addr == MY_MODULE_ADDRESS) && (ctrl.reg_addr == MY_REGISTER_ADDRESS);

  // Control bus read logic.
  always_ff @(posedge clk) begin
    if (rst) begin
      external_q       <= '0;
      valid_addr_q     <= '0;
      temp_input_sel_q <= 1'b1;
    end else if (hit) begin
      unique case (ctrl.loc_sel)
        LOC_EXTERNAL:   external_q       <= ctrl.data[REG_WIDTH-1:0];
        LOC_VALID_ADDR: valid_addr_q     <= ctrl.data[ADDR_WIDTH-1:0];
        LOC_INPUT_SEL:  temp_input_sel_q <= ctrl.data[0];
        default: ;
      endcase
    end
  end

  // Ring buffer read logic.
  always_ff @(posedge clk) begin
    if (rst) begin
      internal_q  <= '0;
      input_valid <= 1'b0;
      input_sel_q <= 1'b1;
    end else if (sync) begin
      input_valid <= 1'b0;
      input_sel_q <= temp_input_sel_q;
    end else if (!input_valid && ring_addr == valid_addr_q) begin
      internal_q  <= ring_data;
      input_valid <= 1'b1;
    end
  end

  assign value   = input_sel_q ? external_q : internal_q;
  assign sel_ext = input_sel_q;

endmodule
