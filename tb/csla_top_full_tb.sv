// csla_top_full_tb: the adder at its default size (16 bits) end to end.
//
// csla_top is instantiated with no parameter override. Operands are
// applied at a rising edge and held for the cycle, the clock is high 5 and
// low 5 time units, and at the end of the low phase {cout, sum} is compared
// with a + b + cin. First every cin with a and b over all values of their
// low byte and a sweep of upper bytes, then random words; one addition per
// clock cycle, checked against the cycle count.
module csla_top_full_tb;

  localparam int unsigned HALF  = 5;
  localparam int unsigned NRAND = 200000;

  logic        clk;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  int          checks = 0;
  int          failures = 0;
  int          cycles = 0;
  int          adds = 0;

  csla_top dut (.clk(clk), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic add_cycle(input logic [15:0] x, input logic [15:0] y, input logic c);
    a = x; b = y; cin = c;
    clk = 1'b1;
    #HALF;
    clk = 1'b0;
    #(HALF - 1);
    checks++;
    adds++;
    if ({cout, sum} !== 17'(x) + 17'(y) + 17'(c)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h + %0d -> %h", x, y, c, {cout, sum});
    end
    #1;
    cycles++;
  endtask

  initial begin
    clk = 1'b0; a = '0; b = '0; cin = 1'b0;
    #HALF;
    for (int c = 0; c < 2; c++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y += 3)
          add_cycle(16'({x[7:0], x[7:0]}) ^ 16'(y << 8), 16'(y) | 16'(x << 8), 1'(c));
    for (int i = 0; i < NRAND; i++)
      add_cycle(16'($urandom), 16'($urandom), 1'($urandom));
    checks++;
    if (cycles != adds) begin
      failures++;
      $display("FAIL %0d additions took %0d cycles", adds, cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF * (NRAND + 50000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
