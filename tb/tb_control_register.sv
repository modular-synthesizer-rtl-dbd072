// tb_control_register: programs one register (module 0x02, register 0x0B)
// over the control bus, following the sequence of the document's example:
// user value 0x92DF, valid address, input selector, writes addressed to other
// modules and registers (ignored), a second user value 0xBEE5. A scripted
// ring presents addresses 0..7 after each SYNC with data 0x1000*frame + addr.
// Checks: output follows the selected source, the selector changes only at
// SYNC, input_valid drops at SYNC and rises on the first clock after the
// wanted address passed, and the captured word is the one at that address.
module tb_control_register;
  import synth_pkg::*;
  logic clk = 1'b0, rst, sync;
  ctrl_bus_t ctrl;
  logic [15:0] ring_data, value;
  mod_addr_t   ring_addr;
  logic input_valid, sel_ext;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_register #(.MY_MODULE_ADDRESS(5'h02), .MY_REGISTER_ADDRESS(8'h0B)) dut (
    .clk, .rst, .sync, .ctrl, .ring_data, .ring_addr, .value, .input_valid, .sel_ext
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic cmd(input logic [1:0] loc, input logic [7:0] ra, input logic [4:0] ma,
                     input logic [15:0] d);
    ctrl <= '{loc_sel: loc_sel_e'(loc), reg_addr: ra, mod_addr: ma, data: d};
    @(posedge clk);
    ctrl <= '{loc_sel: LOC_NONE, reg_addr: REG_ADDR_IDLE, mod_addr: 5'h1F, data: 16'h0};
    @(posedge clk);
  endtask

  // One frame: SYNC, then addresses 0..7 one per clock, then idle clocks.
  // Checks input_valid timing against the given watched address.
  task automatic frame(input int f, input int watched);
    sync <= 1'b1; ring_addr <= 5'h1E; ring_data <= 16'hDEAD;
    @(posedge clk);
    sync <= 1'b0;
    #1 check(!input_valid, "input_valid low after SYNC");
    for (int a = 0; a < 8; a++) begin
      ring_addr <= 5'(a); ring_data <= 16'(f * 16'h1000 + a);
      @(posedge clk);
      #1 check(input_valid == (watched >= 0 && a >= watched),
               $sformatf("input_valid frame %0d addr %0d", f, a));
    end
    ring_addr <= 5'h1E; ring_data <= 16'hDEAD;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; sync = 1'b0; ring_addr = 5'h1E; ring_data = '0;
    ctrl = '{loc_sel: LOC_NONE, reg_addr: REG_ADDR_IDLE, mod_addr: 5'h1F, data: 16'h0};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(sel_ext == 1'b1, "reset selects external");
    cmd(2'd0, 8'h0B, 5'h02, 16'h92DF);
    #1 check(value == 16'h92DF, "external value written");
    cmd(2'd1, 8'h0B, 5'h02, 16'h0005);      // listen to ring address 5
    frame(1, 5);
    check(value == 16'h92DF, "still external");
    cmd(2'd2, 8'h0B, 5'h02, 16'h0000);      // select internal (takes effect at SYNC)
    #1 check(value == 16'h92DF && sel_ext, "selector waits for SYNC");
    cmd(2'd3, 8'h0B, 5'h02, 16'h7862);      // location 3: nothing
    cmd(2'd0, 8'h0B, 5'h03, 16'h1111);      // other module
    cmd(2'd0, 8'h31, 5'h02, 16'h2222);      // other register
    cmd(2'd1, 8'h0B, 5'h00, 16'h0001);      // other module's address register
    frame(2, 5);
    check(!sel_ext, "selector internal after SYNC");
    check(value == 16'h2005, $sformatf("internal value %h", value));
    cmd(2'd0, 8'h0B, 5'h02, 16'hBEE5);
    check(value == 16'h2005, "internal still selected");
    cmd(2'd1, 8'h0B, 5'h02, 16'h0002);
    frame(3, 2);
    check(value == 16'h3002, $sformatf("internal value addr 2: %h", value));
    cmd(2'd1, 8'h0B, 5'h02, 16'h0010);      // address not on the ring
    frame(4, -1);
    check(value == 16'h3002, "no capture keeps old value");
    cmd(2'd2, 8'h0B, 5'h02, 16'h0001);
    frame(5, -1);
    check(value == 16'hBEE5 && sel_ext, "back to external 0xBEE5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
