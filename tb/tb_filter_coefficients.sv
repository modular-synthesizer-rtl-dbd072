// tb_filter_coefficients: the coefficient generator with its own shared
// divider, for several frequencies, all four types and q = 1..3. Each
// coefficient is compared with the ideal value computed in the testbench
// with $sin/$cos for w0 = f/48000 of a turn and alpha = sin(w0)/2**q, in
// units of 2**-16, within 0.5 % of full scale (330 units: the table has 2048
// points per turn). Also checks coef_valid comes once per frame.
module tb_filter_coefficients;
  import synth_pkg::*;
  localparam int DW = 48;
  logic clk = 1'b0, rst, sync;
  logic [15:0] frequency;
  filt_e ftype;
  logic [3:0] q;
  logic [DW-1:0] dividend [1], quotient;
  logic [15:0]   divisor [1];
  logic [0:0]    level;
  logic          q_valid, coef_valid;
  logic signed [17:0] b0, b1, b2, a0, a1, a2;
  int checks = 0, failures = 0, nvalid;

  always #5 clk = ~clk;

  shared_divider #(.NUM_CLIENTS(1), .DW(DW), .VW(16), .LEVEL_OFFSET(8)) u_div (
    .clk, .rst, .sync, .dividend, .divisor, .level, .quotient, .q_valid
  );

  filter_coefficients #(.DW(DW)) dut (
    .clk, .rst, .frequency, .ftype, .q,
    .div_level(level[0]), .div_quotient(quotient), .div_q_valid(q_valid),
    .div_dividend(dividend[0]), .div_divisor(divisor[0]),
    .b0, .b1, .b2, .a0, .a1, .a2, .coef_valid
  );

  always @(posedge clk) if (coef_valid) nvalid++;

  task automatic near(input int got, input real want, input string what);
    int w;
    w = $rtoi(want * 65536.0);
    if (w > 131071) w = 131071;
    checks++;
    if (got - w > 330 || w - got > 330) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d want %0d", what, got, w);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int freqs [5] = '{100, 1000, 4800, 9000, 15000};
    rst = 1'b1; sync = 1'b0; frequency = '0; ftype = FILT_LOWPASS; q = 4'd2;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    foreach (freqs[i]) for (int t = 0; t < 4; t++) for (int qq = 1; qq <= 3; qq++) begin
      real w, c, s, al, eb0, eb1, eb2;
      frequency = 16'(freqs[i]); ftype = filt_e'(t); q = 4'(qq);
      nvalid = 0;
      sync <= 1'b1; @(posedge clk); sync <= 1'b0;
      repeat (80) @(posedge clk);
      checks++;
      if (nvalid != 1) begin failures++; $display("FAIL coef_valid count %0d", nvalid); end
      w = 2.0 * 3.14159265358979 * freqs[i] / 48000.0;
      c = $cos(w); s = $sin(w); al = s / (2.0 ** qq);
      case (t)
        0: begin eb0 = (1 - c) / 2; eb1 = 1 - c;    eb2 = eb0; end
        1: begin eb0 = (1 + c) / 2; eb1 = -(1 + c); eb2 = eb0; end
        2: begin eb0 = al;          eb1 = 0;        eb2 = -al; end
        default: begin eb0 = 1;     eb1 = -2 * c;   eb2 = 1;   end
      endcase
      near(b0, eb0, $sformatf("b0 f=%0d t=%0d q=%0d", freqs[i], t, qq));
      near(b1, eb1, $sformatf("b1 f=%0d t=%0d q=%0d", freqs[i], t, qq));
      near(b2, eb2, $sformatf("b2 f=%0d t=%0d q=%0d", freqs[i], t, qq));
      near(a0, 1 + al, $sformatf("a0 f=%0d q=%0d", freqs[i], qq));
      near(a1, -2 * c, $sformatf("a1 f=%0d", freqs[i]));
      near(a2, 1 - al, $sformatf("a2 f=%0d q=%0d", freqs[i], qq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
