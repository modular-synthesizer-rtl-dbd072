// tb_shared_divider: three clients share the divider. Each frame every
// client drives random arguments only while its level is high (zero
// otherwise) and takes the quotient on q_valid. Checks: the levels come in
// order, never overlap, last SLOT clocks each and start LEVEL_OFFSET clocks
// after SYNC; q_valid comes once per level, DW + 1 clocks after it starts; each
// quotient equals dividend / divisor (all ones for a zero divisor).
module tb_shared_divider;
  localparam int NC = 3, DW = 48, VW = 16, OFF = 8, SLOT = DW + 2;
  logic clk = 1'b0, rst, sync;
  logic [DW-1:0] dividend [NC];
  logic [VW-1:0] divisor  [NC];
  logic [NC-1:0] level;
  logic [DW-1:0] quotient;
  logic          q_valid;
  logic [DW-1:0] a [NC];
  logic [VW-1:0] b [NC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shared_divider #(.NUM_CLIENTS(NC), .DW(DW), .VW(VW), .LEVEL_OFFSET(OFF)) dut (
    .clk, .rst, .sync, .dividend, .divisor, .level, .quotient, .q_valid
  );

  // Clients obey the sharing contract.
  always_comb
    for (int i = 0; i < NC; i++) begin
      dividend[i] = level[i] ? a[i] : '0;
      divisor[i]  = level[i] ? b[i] : '0;
    end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; sync = 1'b0;
    for (int i = 0; i < NC; i++) begin a[i] = '0; b[i] = '0; end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 40; f++) begin
      int qcount [NC];
      for (int i = 0; i < NC; i++) begin
        a[i] = {$urandom, $urandom} >> $urandom_range(0, 40);
        b[i] = (f % 9 == 4 && i == 1) ? '0 : VW'($urandom >> $urandom_range(0, 14));
        qcount[i] = 0;
      end
      sync <= 1'b1;
      @(posedge clk);
      sync <= 1'b0;
      for (int t = 0; t < OFF + NC * SLOT + 10; t++) begin
        logic [NC-1:0] want;
        #1;
        want = '0;
        for (int i = 0; i < NC; i++)
          if (t >= OFF + i * SLOT && t < OFF + (i + 1) * SLOT) want[i] = 1'b1;
        check(level == want, $sformatf("levels at t=%0d: %b want %b", t, level, want));
        if (q_valid) begin
          int owner;
          logic [DW-1:0] exp;
          owner = -1;
          for (int i = 0; i < NC; i++) if (level[i]) owner = i;
          check(owner >= 0 && t == OFF + owner * SLOT + DW + 1,
                $sformatf("q_valid at t=%0d owner %0d", t, owner));
          if (owner >= 0) begin
            exp = (b[owner] == 0) ? '1 : a[owner] / DW'(b[owner]);
            qcount[owner]++;
            check(quotient == exp, $sformatf("%0d / %0d = %0d, got %0d", a[owner], b[owner], exp, quotient));
          end
        end
        @(posedge clk);
      end
      for (int i = 0; i < NC; i++) check(qcount[i] == 1, "one result per level");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
