// synth_pkg: widths, bus layouts and constants shared by the modular synthesizer.
//
// Audio samples are 16-bit signed PCM at 48 kHz. The audio ring carries a
// 16-bit data word and a 5-bit module address; the single-master control bus
// is 31 bits wide and splits into data, module address, register address and
// location selector. The field widths of the ring and the control bus and the
// 16-bit sample width follow the document; the order of the control-bus fields
// inside the 31-bit word and the 8-bit width of the register-address field are
// this design's choice (16 + 5 + 8 + 2 = 31).
package synth_pkg;

  localparam int unsigned N          = 16;   // audio / parameter word width
  localparam int unsigned ADDR_WIDTH = 5;    // ring address bus width
  localparam int unsigned REG_ADDR_W = 8;    // control-bus register address width
  localparam int unsigned CTRL_WIDTH = 31;   // control bus width

  typedef logic signed [N-1:0]        sample_t;
  typedef logic [ADDR_WIDTH-1:0]      mod_addr_t;
  typedef logic [REG_ADDR_W-1:0]      reg_addr_t;

  // Location selector: which register of a control_register is written.
  typedef enum logic [1:0] {
    LOC_EXTERNAL   = 2'd0,   // user-provided data value
    LOC_VALID_ADDR = 2'd1,   // ring address to read
    LOC_INPUT_SEL  = 2'd2,   // input selector (1 = external value)
    LOC_NONE       = 2'd3    // no register
  } loc_sel_e;

  // Control bus, MSB first: {loc_sel, reg_addr, mod_addr, data}.
  typedef struct packed {
    loc_sel_e  loc_sel;
    reg_addr_t reg_addr;
    mod_addr_t mod_addr;
    logic [N-1:0] data;
  } ctrl_bus_t;

  // Register address that no control_register uses; the bus idles here.
  localparam reg_addr_t REG_ADDR_IDLE = '1;

  // Oscillator wave types.
  typedef enum logic [2:0] {
    WAVE_SINE     = 3'd0,
    WAVE_SQUARE   = 3'd1,
    WAVE_PULSE    = 3'd2,
    WAVE_RAMP     = 3'd3,
    WAVE_SAW      = 3'd4,
    WAVE_TRIANGLE = 3'd5
  } wave_e;

  // Filter types.
  typedef enum logic [1:0] {
    FILT_LOWPASS  = 2'd0,
    FILT_HIGHPASS = 2'd1,
    FILT_BANDPASS = 2'd2,
    FILT_NOTCH    = 2'd3
  } filt_e;

  // Sequencer end behaviour.
  typedef enum logic [1:0] {
    END_STOP    = 2'd0,
    END_LOOP    = 2'd1,
    END_REVERSE = 2'd2
  } seq_end_e;

  // Sampler modes.
  typedef enum logic [1:0] {
    SMP_SILENCE  = 2'd0,
    SMP_RECORD   = 2'd1,
    SMP_PLAYBACK = 2'd2
  } smp_mode_e;

  // Peak amplitude of every oscillator wave, about -3 dB of full scale.
  localparam int signed OSC_PEAK = 23170;

  // Equal-tempered pitches A3..A6 in Hz, rounded: round(220 * 2**(k/12)), k = 0..36.
  localparam int unsigned PITCH_A3_A6 [37] = '{
    220, 233, 247, 262, 277, 294, 311, 330, 349, 370, 392, 415,
    440, 466, 494, 523, 554, 587, 622, 659, 698, 740, 784, 831,
    880, 932, 988, 1047, 1109, 1175, 1245, 1319, 1397, 1480, 1568, 1661,
    1760 };

endpackage
