// tb_sequencer: writes 16 random words, then checks the played order for
// each end behaviour against an index walk the testbench computes:
// loop (0..last, 0..last, ...), stop (0..last, last, last, ...) and
// reverse (0..last, last-1..0, 1..last, ...). Also checks that with speed s
// the value only changes every s+1 ready pulses, and that a write in the
// middle of playback shows up when its index is next played.
module tb_sequencer;
  import synth_pkg::*;
  logic clk = 1'b0, rst, ready, write;
  logic [3:0] write_addr, last;
  logic [15:0] write_data, value;
  seq_end_e end_mode;
  logic [7:0] speed;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sequencer #(.DEPTH(16)) dut (.clk, .rst, .ready, .write, .write_addr, .write_data,
                               .end_mode, .last, .speed, .value);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  task automatic pulse();
    ready <= 1'b1;
    @(posedge clk);
    ready <= 1'b0;
    @(posedge clk);
    #1;
  endtask

  task automatic wr(input int i, input logic [15:0] d);
    write <= 1'b1; write_addr <= 4'(i); write_data <= d;
    @(posedge clk);
    write <= 1'b0;
    @(posedge clk);
    model[i] = d;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ready = 1'b0; write = 1'b0; write_addr = '0; write_data = '0;
    end_mode = END_LOOP; last = 4'd15; speed = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 16; i++) wr(i, 16'(PITCH_A3_A6[$urandom_range(0, 36)]));
    // Each mode starts from reset so the index walk starts at 0.
    for (int m = 0; m < 3; m++) begin
      int idx, dir, L;
      rst <= 1'b1; @(posedge clk); rst <= 1'b0; @(posedge clk);
      for (int i = 0; i < 16; i++) wr(i, model[i]);
      end_mode = seq_end_e'(m == 0 ? END_LOOP : (m == 1 ? END_STOP : END_REVERSE));
      L = (m == 0) ? 15 : (m == 1 ? 5 : 6);
      last = 4'(L);
      idx = 0; dir = 1;
      for (int k = 0; k < 40; k++) begin
        pulse();
        check(value == model[idx], $sformatf("mode %0d step %0d: %0d want [%0d]=%0d", m, k, value, idx, model[idx]));
        if (k == 20) wr((idx + 1) % (L + 1), 16'hABCD);
        // next index
        if (dir == 1) begin
          if (idx >= L) begin
            if (end_mode == END_LOOP) idx = 0;
            else if (end_mode == END_REVERSE) begin idx = L - 1; dir = -1; end
          end else idx++;
        end else begin
          if (idx == 0) begin idx = 1; dir = 1; end else idx--;
        end
      end
    end
    // Speed: values change every speed+1 pulses.
    rst <= 1'b1; @(posedge clk); rst <= 1'b0; @(posedge clk);
    for (int i = 0; i < 16; i++) wr(i, 16'(i + 100));
    end_mode = END_LOOP; last = 4'd15; speed = 8'd3;
    for (int k = 0; k < 32; k++) begin
      pulse();
      check(value == 16'(k / 4 + 100), $sformatf("speed 3 pulse %0d: %0d", k, value));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
