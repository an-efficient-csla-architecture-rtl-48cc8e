// latch_group_tb: checks one latch-based carry select group.
//
// Instances at the default width (2 bits) and at 5 bits, the widest group.
// The testbench drives the clock itself: for each addition the operands
// and the incoming carry are set, the clock is high for 5 time units and
// then low for 5. At the end of the low phase {co, s} must equal
// a + b + c_sel, so each addition takes exactly one clock cycle.
//
// The two halves of the scheme are also checked separately:
//   * in the high phase, with c_sel = 1, the group shows a + b + 1 (the
//     latches are transparent to the adder running with carry one);
//   * in the low phase the operands are then changed: with c_sel = 1 the
//     output must keep the latched a + b + 1 of the old operands, with
//     c_sel = 0 it must follow the live adder (new a + b).
module latch_group_tb;

  localparam int unsigned HALF = 5;

  logic       clk;
  logic       c_sel;
  logic [1:0] a2, b2, s2;
  logic [4:0] a5, b5, s5;
  logic       co2, co5;
  int         checks = 0;
  int         failures = 0;
  int         cycles = 0;

  latch_group          dut2 (.clk(clk), .a(a2), .b(b2), .c_sel(c_sel), .s(s2), .co(co2));
  latch_group #(.W(5)) dut5 (.clk(clk), .a(a5), .b(b5), .c_sel(c_sel), .s(s5), .co(co5));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycles);
    end
  endtask

  // One addition: operands at the rising edge, result read at the end of the low phase.
  task automatic add_cycle(input int x, input int y, input int c);
    a5 = 5'(x); b5 = 5'(y);
    a2 = 2'(x); b2 = 2'(y);
    c_sel = c[0];
    clk = 1'b1;
    #HALF;
    if (c == 1) begin
      check(int'({co5, s5}), (x % 32) + (y % 32) + 1, "high phase W=5");
      check(int'({co2, s2}), (x % 4) + (y % 4) + 1, "high phase W=2");
    end
    clk = 1'b0;
    #(HALF - 1);
    check(int'({co5, s5}), (x % 32) + (y % 32) + c, "sum W=5");
    check(int'({co2, s2}), (x % 4) + (y % 4) + c, "sum W=2");
    #1;
    cycles++;
  endtask

  initial begin
    int n;
    clk = 1'b0; c_sel = 1'b0;
    a2 = '0; b2 = '0; a5 = '0; b5 = '0;
    #HALF;

    // Every operand pair of the 5-bit group (and so of the 2-bit group), both carries.
    n = 0;
    for (int c = 0; c < 2; c++)
      for (int x = 0; x < 32; x++)
        for (int y = 0; y < 32; y++) begin
          add_cycle(x, y, c);
          n++;
        end
    check(cycles, n, "one addition per clock cycle");

    // Hold behaviour in the low phase.
    for (int i = 0; i < 200; i++) begin
      int x, y, x2, y2;
      x = int'($urandom % 32); y = int'($urandom % 32);
      x2 = int'($urandom % 32); y2 = int'($urandom % 32);
      a5 = 5'(x); b5 = 5'(y); a2 = 2'(x); b2 = 2'(y);
      c_sel = 1'b1;
      clk = 1'b1;
      #HALF;
      clk = 1'b0;
      #1;
      // operands change while the clock is low
      a5 = 5'(x2); b5 = 5'(y2); a2 = 2'(x2); b2 = 2'(y2);
      #1;
      check(int'({co5, s5}), x + y + 1, "latched result held W=5");
      check(int'({co2, s2}), (x % 4) + (y % 4) + 1, "latched result held W=2");
      c_sel = 1'b0;
      #1;
      check(int'({co5, s5}), x2 + y2, "live carry-zero result W=5");
      check(int'({co2, s2}), (x2 % 4) + (y2 % 4), "live carry-zero result W=2");
      #(HALF - 3);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
