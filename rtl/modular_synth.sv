// modular_synth: a digital modular synthesizer built around an audio ring.
//
// Audio processing units (APUs) sit on a ring of registers clocked at the
// system clock. Once per audio frame (the 48 kHz SYNC pulse from the codec
// interface) every APU puts its latest output and its address on the ring;
// between SYNCs the words circulate, one stage per clock, so each APU sees
// every address within RING_LEN clocks. Each APU parameter is a
// control_register that takes either a user value or the ring word of a
// chosen address, which makes every patch a run-time choice: the ring is a
// virtual patch panel. A single control module turns typed hexadecimal
// commands from a serial port into words on the 31-bit control bus that
// program those registers.
//
// APUs on the ring (address: core, registers by register address):
//   0x00 codec    : 0 = sample sent to the codec output
//   0x01 oscillator: 0 = frequency (Hz), 1 = wave type, 2 = pulse width
//   0x02 filter   : 0 = input, 1 = frequency (Hz), 2 = type, 3 = q
//   0x03 sequencer: 0 = write data, 1 = {write[15], end mode[14:13],
//                   last index[7:4], write index[3:0]}, 2 = speed
//   0x04 mixer    : 0 = in1, 1 = in2, 2 = level1, 3 = level2 (14 fraction bits)
//   0x05 delay    : 0 = input, 1 = delay (samples), 2 = wet/dry, 3 = gain,
//                   4 = feedback
//   0x06 sampler  : 0 = input, 1 = mode
//   0x1F display  : 0 = input
// The codec APU outputs the codec's input sample; the display APU outputs 0.
// The oscillator and the filter share one divider (shared_divider).
//
// The codec link, clock manager and debug display are outside this RTL: the
// codec's SYNC, input sample and output sample, the video timing counters and
// the serial lines are ports. Following the document: the ring, its 16-bit
// data and 5-bit address, the 31-bit control bus, addresses 0x00 for the codec
// and 0x1F for the display, one control module, the set of audio cores. This
// design's choices: which cores are instantiated at which other addresses
// and their register maps (the document's example has two generic APUs).
//
// Timing: a frame must be longer than the slowest core plus the ring length
// and the divider levels (about 230 clocks here); the document's frame is
// 1350 clocks (64.8 MHz / 48 kHz). Output to ac97_out has one frame of latency
// per APU on the path.
module modular_synth
  import synth_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 64_800_000,
  parameter int unsigned BAUD          = 9600,
  parameter int unsigned SEQ_DEPTH     = 16,
  parameter int unsigned DELAY_MAX     = 8192,
  parameter int unsigned SAMPLER_DEPTH = 32768,
  parameter int unsigned SAMPLER_WIDTH = 8,
  parameter int unsigned DISPLAY_ROWS  = 768
) (
  input  logic               clk,
  input  logic               button_reset,
  // codec interface
  input  logic               sync,
  input  logic signed [15:0] ac97_in,
  output logic signed [15:0] ac97_out,
  // serial control port
  input  logic               uart_rxd,
  output logic               uart_txd,
  // video
  input  logic [10:0]        hcount,
  input  logic [9:0]         vcount,
  output logic [7:0]         pixel,
  output logic [23:0]        rgb
);

  localparam int unsigned NAPU = 8;
  localparam int unsigned DW   = 48;
  localparam mod_addr_t APU_ADDR [NAPU] = '{5'h00, 5'h01, 5'h02, 5'h03, 5'h04, 5'h05, 5'h06, 5'h1F};
  localparam int unsigned NREGS [NAPU]   = '{1, 3, 4, 3, 4, 5, 2, 1};
  localparam int unsigned MAXR = 5;

  logic      rst;
  ctrl_bus_t ctrl;

  reset_gen u_reset (.clk, .button(button_reset), .rst);

  control_module #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_control (
    .clk, .rst, .rxd(uart_rxd), .txd(uart_txd), .ctrl
  );

  // Ring: stage i feeds stage i+1, the last feeds stage 0.
  logic [N-1:0] ring_data [NAPU];
  mod_addr_t    ring_addr [NAPU];
  logic [N-1:0] dsp_out   [NAPU];
  logic [N-1:0] regs      [NAPU][MAXR];
  logic         core_ready[NAPU];

  for (genvar a = 0; a < NAPU; a++) begin : g_apu
    localparam int unsigned PREV = (a == 0) ? NAPU - 1 : a - 1;
    logic [N-1:0]         rv [NREGS[a]];
    logic [NREGS[a]-1:0]  iv;

    apu_wrapper #(.DEV_ADDR(APU_ADDR[a]), .NUM_REGS(NREGS[a])) u_wrap (
      .clk, .rst, .sync, .ctrl,
      .data_in (ring_data[PREV]), .addr_in (ring_addr[PREV]),
      .data_out(ring_data[a]),    .addr_out(ring_addr[a]),
      .reg_value(rv), .input_valid(iv), .core_ready(core_ready[a]),
      .dsp_out (dsp_out[a])
    );

    for (genvar r = 0; r < MAXR; r++) begin : g_r
      if (r < NREGS[a]) begin : g_used
        assign regs[a][r] = rv[r];
      end else begin : g_unused
        assign regs[a][r] = '0;
      end
    end
  end

  // Shared divider: client 0 oscillator, client 1 filter.
  logic [DW-1:0] div_dividend [2];
  logic [15:0]   div_divisor  [2];
  logic [1:0]    div_level;
  logic [DW-1:0] div_quotient;
  logic          div_q_valid;

  shared_divider #(.NUM_CLIENTS(2), .DW(DW), .VW(16)) u_div (
    .clk, .rst, .sync, .dividend(div_dividend), .divisor(div_divisor),
    .level(div_level), .quotient(div_quotient), .q_valid(div_q_valid)
  );

  // 0x00 codec: sample in from the codec, register 0 out to the codec.
  always_ff @(posedge clk) begin
    if (rst) begin
      dsp_out[0] <= '0;
      ac97_out   <= '0;
    end else if (core_ready[0]) begin
      dsp_out[0] <= ac97_in;
      ac97_out   <= regs[0][0];
    end
  end

  // 0x01 oscillator
  oscillator #(.DW(DW)) u_osc (
    .clk, .rst, .ready(core_ready[1]),
    .frequency(regs[1][0]), .wave(wave_e'(regs[1][1][2:0])), .width(regs[1][2]),
    .div_level(div_level[0]), .div_quotient, .div_q_valid,
    .div_dividend(div_dividend[0]), .div_divisor(div_divisor[0]),
    .out(dsp_out[1])
  );

  // 0x02 filter
  logic filt_valid;
  filter #(.DW(DW)) u_filter (
    .clk, .rst, .ready(core_ready[2]), .in(regs[2][0]),
    .frequency(regs[2][1]), .ftype(filt_e'(regs[2][2][1:0])), .q(regs[2][3][3:0]),
    .div_level(div_level[1]), .div_quotient, .div_q_valid,
    .div_dividend(div_dividend[1]), .div_divisor(div_divisor[1]),
    .out(dsp_out[2]), .out_valid(filt_valid)
  );

  // 0x03 sequencer
  localparam int unsigned SIW = (SEQ_DEPTH > 1) ? $clog2(SEQ_DEPTH) : 1;
  sequencer #(.DEPTH(SEQ_DEPTH), .W(N)) u_seq (
    .clk, .rst, .ready(core_ready[3]),
    .write(core_ready[3] && regs[3][1][15]),
    .write_addr(SIW'(regs[3][1][3:0])), .write_data(regs[3][0]),
    .end_mode(seq_end_e'(regs[3][1][14:13])), .last(SIW'(regs[3][1][7:4])),
    .speed(regs[3][2][7:0]), .value(dsp_out[3])
  );

  // 0x04 mixer
  logic mix_valid;
  mixer #(.DECIMAL(14)) u_mix (
    .clk, .rst, .ready(core_ready[4]),
    .in1(regs[4][0]), .in2(regs[4][1]), .level1(regs[4][2]), .level2(regs[4][3]),
    .out(dsp_out[4]), .out_valid(mix_valid)
  );

  // 0x05 delay
  logic dly_valid;
  delay #(.MAX_DELAY(DELAY_MAX)) u_delay (
    .clk, .rst, .ready(core_ready[5]), .in(regs[5][0]), .delay_len(regs[5][1]),
    .wetdry(regs[5][2]), .gain(regs[5][3]), .feedback(regs[5][4]),
    .out(dsp_out[5]), .out_valid(dly_valid)
  );

  // 0x06 sampler
  sampler #(.DEPTH(SAMPLER_DEPTH), .WIDTH(SAMPLER_WIDTH)) u_sampler (
    .clk, .rst, .ready(core_ready[6]), .in(regs[6][0]),
    .mode(smp_mode_e'(regs[6][1][1:0])), .out(dsp_out[6])
  );

  // 0x1F display
  display #(.ROWS(DISPLAY_ROWS), .SAMPLE_EVERY(32)) u_display (
    .clk, .rst, .ready(core_ready[7]), .in(regs[7][0]),
    .hcount, .vcount, .pixel, .rgb
  );
  assign dsp_out[7] = '0;

endmodule
