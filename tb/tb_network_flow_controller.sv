// tb_network_flow_controller: six output stages closed into a ring, as in the
// ring-buffer timing example (addresses 0..5). After each SYNC stage s must
// hold its own address and DSP word; k clocks later it must hold the word of
// stage (s - k) mod 6. The expected values come from that rule, not from the
// DUT. A SYNC every 10 clocks reloads fresh DSP words.
module tb_network_flow_controller;
  import synth_pkg::*;
  localparam int NS = 6;
  logic clk = 1'b0, rst, sync;
  logic [15:0] dsp [NS], dout [NS];
  logic [4:0]  aout [NS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar s = 0; s < NS; s++) begin : g
    network_flow_controller #(.DEV_ADDR(5'(s))) dut (
      .clk, .rst, .sync,
      .data_in(dout[(s + NS - 1) % NS]), .addr_in(aout[(s + NS - 1) % NS]),
      .dsp_out(dsp[s]), .data_out(dout[s]), .addr_out(aout[s])
    );
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] frame_dsp [NS];
    rst = 1'b1; sync = 1'b0;
    for (int s = 0; s < NS; s++) dsp[s] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 20; f++) begin
      for (int s = 0; s < NS; s++) begin
        frame_dsp[s] = 16'($urandom);
        dsp[s] <= frame_dsp[s];
      end
      sync <= 1'b1;
      @(posedge clk);
      sync <= 1'b0;
      for (int s = 0; s < NS; s++) dsp[s] <= 16'($urandom);  // must not leak
      for (int k = 0; k < 9; k++) begin
        #1;
        for (int s = 0; s < NS; s++) begin
          int src;
          src = (s - k + 10 * NS) % NS;
          checks++;
          if (aout[s] != 5'(src) || dout[s] != frame_dsp[src]) begin
            failures++;
            $display("FAIL frame %0d k=%0d stage %0d: addr %0d data %h, want %0d %h",
                     f, k, s, aout[s], dout[s], src, frame_dsp[src]);
          end
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
