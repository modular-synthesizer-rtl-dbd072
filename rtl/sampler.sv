// sampler: records a short stretch of audio and plays it back.
//
// Three modes (synth_pkg::smp_mode_e): record, playback and silence. Entering
// a mode resets the sample pointer to 0. In record mode each ready pulse
// stores the top WIDTH bits of the input sample and advances the pointer;
// recording stops by itself when the memory is full, and the recorded length
// is remembered. In playback mode each ready pulse reads the next stored
// sample, looping over the recorded length; the stored bits become the top
// bits of the output and the lower bits are zero. In silence mode, and when
// nothing has been recorded, the output is 0.
//
// Defaults are the document's Small Sampler: 32K x 8 (about 0.68 s at
// 48 kHz); DEPTH = 65536, WIDTH = 16 gives its Big Sampler. The memory has a
// registered read like block RAM. out changes two clocks after ready.
// Following the document: the three modes, the sizes and keeping only the
// top bits. This design's choices: stop-when-full, loop-on-playback and the
// pointer reset on a mode change.
module sampler
  import synth_pkg::*;
#(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ready,
  input  logic signed [15:0] in,
  input  smp_mode_e          mode,
  output logic signed [15:0] out
);

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [WIDTH-1:0] rd_q;
  logic [AW-1:0]    ptr_q;
  logic [AW:0]      len_q;
  smp_mode_e        mode_q;
  logic             play_d;

  always_ff @(posedge clk) begin
    rd_q <= mem_q[ptr_q];
    if (ready && mode == SMP_RECORD && mode_q == SMP_RECORD && len_q < (AW+1)'(DEPTH))
      mem_q[ptr_q] <= in[15 -: WIDTH];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr_q     <= '0;
      len_q     <= '0;
      mode_q    <= SMP_SILENCE;
      play_d    <= 1'b0;
      out       <= '0;
    end else begin
      play_d <= 1'b0;
      if (mode != mode_q) begin
        mode_q <= mode;
        ptr_q  <= '0;
        if (mode == SMP_RECORD) len_q <= '0;
      end else if (ready) begin
        unique case (mode_q)
          SMP_RECORD: if (len_q < (AW+1)'(DEPTH)) begin
            ptr_q <= ptr_q + 1'b1;
            len_q <= len_q + 1'b1;
          end
          SMP_PLAYBACK: if (len_q != 0) begin
            play_d    <= 1'b1;
            ptr_q     <= ((AW+1)'(ptr_q) + 1'b1 >= len_q) ? '0 : ptr_q + 1'b1;
          end else out <= '0;
          default: out <= '0;
        endcase
      end
      if (play_d) out <= 16'({rd_q, {(16-WIDTH){1'b0}}});
    end
  end

endmodule
