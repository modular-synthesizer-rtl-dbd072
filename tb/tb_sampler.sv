// tb_sampler: a 256 x 8 sampler (the default is 32K x 8). Records 100
// random samples, plays them back three times over (the loop must repeat the
// recording, top 8 bits kept, low 8 bits zero), goes silent, then records
// past the end of memory (recording must stop at 256 samples and playback
// loop over exactly 256). Playback values are compared with the samples the
// testbench kept.
module tb_sampler;
  import synth_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 1'b0, rst, ready;
  logic signed [15:0] in, out;
  smp_mode_e mode;
  int checks = 0, failures = 0;
  logic [7:0] kept [$];

  always #5 clk = ~clk;

  sampler #(.DEPTH(DEPTH), .WIDTH(8)) dut (.clk, .rst, .ready, .in, .mode, .out);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  task automatic tick(input logic [15:0] x);
    in <= x;
    ready <= 1'b1;
    @(posedge clk);
    ready <= 1'b0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  task automatic set_mode(input smp_mode_e m);
    mode <= m;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ready = 1'b0; in = '0; mode = SMP_SILENCE;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    tick(16'h1234);
    check(out == 0, "silent after reset");
    for (int pass = 0; pass < 2; pass++) begin
      int len;
      len = (pass == 0) ? 100 : DEPTH + 40;
      kept.delete();
      set_mode(SMP_RECORD);
      for (int n = 0; n < len; n++) begin
        logic [15:0] x;
        x = 16'($urandom);
        if (kept.size() < DEPTH) kept.push_back(x[15:8]);
        tick(x);
        check(out == 0, "silent while recording");
      end
      set_mode(SMP_PLAYBACK);
      for (int n = 0; n < 3 * kept.size(); n++) begin
        tick(16'h0);
        check(out == {kept[n % kept.size()], 8'h00},
              $sformatf("pass %0d play %0d: %h want %h00", pass, n, out, kept[n % kept.size()]));
      end
      set_mode(SMP_SILENCE);
      tick(16'h7777);
      check(out == 0, "silence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
