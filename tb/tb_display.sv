// tb_display: feeds 40 * 32 ready pulses of samples; every 32nd (the one on
// which the internal counter wraps) is written to the next row. The
// testbench then scans rows 0..39 and a set of columns per row and checks
// each pixel: lit exactly when the column lies between 512 and the stored
// 10-bit value + 512, with colour = top 8 bits of that shifted value (and
// the 3-3-2 fields repeated to 24 bits). Rows beyond 767 must be dark.
module tb_display;
  logic clk = 1'b0, rst, ready;
  logic signed [15:0] in;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic [7:0]  pixel;
  logic [23:0] rgb;
  int checks = 0, failures = 0, lit_count = 0;
  logic [9:0] rows [40];

  always #5 clk = ~clk;

  display dut (.clk, .rst, .ready, .in, .hcount, .vcount, .pixel, .rgb);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ready = 1'b0; in = '0; hcount = '0; vcount = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int r = 0; r < 40; r++) begin
      for (int k = 0; k < 32; k++) begin
        logic [15:0] x;
        x = (r == 0) ? 16'h8000 : (r == 1 ? 16'h7FFF : 16'($urandom));
        if (k == 31) rows[r] = x[15:6];
        in <= x;
        ready <= 1'b1;
        @(posedge clk);
        ready <= 1'b0;
        @(posedge clk);
      end
    end
    for (int r = 0; r < 41; r++) begin
      for (int c = 0; c < 1040; c += 7) begin
        logic [9:0] sh;
        bit on;
        logic [7:0] p;
        int vr;
        vr = (r == 40) ? 800 : r;
        vcount <= 10'(vr); hcount <= 11'(c);
        repeat (3) @(posedge clk);
        #1;
        sh = (r < 40) ? rows[r] + 10'd512 : 10'd0;
        on = (r < 40) && c < 1024 && ((c >= 512 && c <= int'(sh)) || (c <= 512 && c >= int'(sh)));
        p = on ? sh[9:2] : 8'd0;
        if (on) lit_count++;
        check(pixel == p, $sformatf("row %0d col %0d: pixel %h want %h", vr, c, pixel, p));
        check(rgb == (on ? {{2{p[7:5]}}, p[7:6], {2{p[4:2]}}, p[4:3], {4{p[1:0]}}} : 24'd0),
              $sformatf("rgb row %0d col %0d", vr, c));
      end
    end
    check(lit_count > 100, "bars drawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
