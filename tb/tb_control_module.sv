// tb_control_module: types commands on the serial line (8N1, 10 clocks per
// bit) and checks the control bus words and the echoed characters decoded
// from txd. One command carries a non-hex character that must be neither
// used nor echoed. The last command is sent with no gap at all between
// characters, so every echo has to wait for the previous one.
module tb_control_module;
  import synth_pkg::*;
  logic clk = 1'b0, rst, rxd, txd;
  ctrl_bus_t ctrl;
  int checks = 0, failures = 0;
  logic [7:0] echoed [$];

  always #5 clk = ~clk;

  control_module #(.CLK_HZ(1000), .BAUD(100)) dut (.clk, .rst, .rxd, .txd, .ctrl);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send(input logic [7:0] b, input int gap = 4);
    logic [9:0] fr;
    fr = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd <= fr[i];
      repeat (10) @(posedge clk);
    end
    repeat (gap) @(posedge clk);
  endtask

  // Serial decoder for the echo.
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (15) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        b[i] = txd;
        repeat (10) @(posedge clk);
      end
      echoed.push_back(b);
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static string cmds [4] = '{"8B0292DF", "4b02 0005", "00000001", "7A5C3E1F"};
    static logic [30:0] want [4] = '{31'h0B0292DF, 31'h4B020005, 31'h00000001, 31'h7A5C3E1F};
    string sent;
    rst = 1'b1; rxd = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (20) @(posedge clk);
    sent = "";
    for (int c = 0; c < 4; c++) begin
      for (int i = 0; i < cmds[c].len(); i++) begin
        send(cmds[c][i], (c == 3) ? 0 : 4);
        if (cmds[c][i] != " ") sent = {sent, cmds[c].substr(i, i)};
      end
      repeat (40) @(posedge clk);
      check(ctrl == want[c], $sformatf("command %s gave %h", cmds[c], ctrl));
    end
    repeat (200) @(posedge clk);
    check(echoed.size() == sent.len(), $sformatf("echo count %0d", echoed.size()));
    for (int i = 0; i < echoed.size() && i < sent.len(); i++)
      check(echoed[i] == sent[i], $sformatf("echo %0d: %c", i, echoed[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
