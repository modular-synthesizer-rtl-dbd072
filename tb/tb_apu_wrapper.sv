// tb_apu_wrapper: one APU shell (address 0x03, three registers). Register 0
// listens to ring address 0x01, register 1 to address 0x05, register 2 keeps
// its user value. The testbench plays the ring upstream of the APU: after
// each SYNC it presents addresses 0..5. Checks: core_ready pulses exactly
// once per frame, on the first clock at which both ring registers have
// captured (after address 5 has passed), the register values are the ring
// words, and the SYNC loads the core output and address 0x03 onto the ring.
module tb_apu_wrapper;
  import synth_pkg::*;
  logic clk = 1'b0, rst, sync;
  ctrl_bus_t ctrl;
  logic [15:0] data_in, data_out, dsp_out;
  mod_addr_t   addr_in, addr_out;
  logic [15:0] rv [3];
  logic [2:0]  iv;
  logic        core_ready;
  int checks = 0, failures = 0, ready_count;

  always #5 clk = ~clk;

  apu_wrapper #(.DEV_ADDR(5'h03), .NUM_REGS(3)) dut (
    .clk, .rst, .sync, .ctrl, .data_in, .addr_in, .data_out, .addr_out,
    .reg_value(rv), .input_valid(iv), .core_ready, .dsp_out
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic cmd(input logic [1:0] loc, input logic [7:0] ra, input logic [15:0] d);
    ctrl <= '{loc_sel: loc_sel_e'(loc), reg_addr: ra, mod_addr: 5'h03, data: d};
    @(posedge clk);
    ctrl <= '{loc_sel: LOC_NONE, reg_addr: REG_ADDR_IDLE, mod_addr: 5'h03, data: 16'h0};
    @(posedge clk);
  endtask

  always @(posedge clk) if (core_ready) ready_count++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; sync = 1'b0; data_in = '0; addr_in = 5'h1E; dsp_out = '0;
    ctrl = '{loc_sel: LOC_NONE, reg_addr: REG_ADDR_IDLE, mod_addr: 5'h03, data: 16'h0};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    cmd(2'd1, 8'd0, 16'h0001);
    cmd(2'd2, 8'd0, 16'h0000);
    cmd(2'd1, 8'd1, 16'h0005);
    cmd(2'd2, 8'd1, 16'h0000);
    cmd(2'd0, 8'd2, 16'h4242);
    for (int f = 0; f < 8; f++) begin
      logic [15:0] out_word;
      out_word = 16'($urandom);
      dsp_out <= out_word;
      sync <= 1'b1;
      @(posedge clk);
      sync <= 1'b0;
      ready_count = 0;
      #1 check(data_out == out_word && addr_out == 5'h03, "SYNC loads core output and address");
      for (int a = 0; a < 6; a++) begin
        addr_in <= 5'(a); data_in <= 16'(f * 256 + a);
        @(posedge clk);
        #1;
        if (f > 0) check(core_ready == (a == 5), $sformatf("core_ready frame %0d after addr %0d", f, a));
      end
      addr_in <= 5'h1E;
      repeat (20) @(posedge clk);
      if (f > 0) begin
        check(ready_count == 1, $sformatf("one core_ready per frame, got %0d", ready_count));
        check(rv[0] == 16'(f * 256 + 1) && rv[1] == 16'(f * 256 + 5) && rv[2] == 16'h4242,
              $sformatf("register values %h %h %h", rv[0], rv[1], rv[2]));
        check(iv[1:0] == 2'b11, "ring registers valid");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
