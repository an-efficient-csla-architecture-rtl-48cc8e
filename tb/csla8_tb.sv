// csla8_tb: exhaustive check of the 8-bit latch-based carry select adder.
//
// Every a, b and cin combination (2^17 additions) is run, one addition per
// clock cycle: operands set at the rising edge, clock high 5 and low 5 time
// units, {cout, sum} compared with a + b + cin at the end of the low phase.
// The cycle count is checked, and the select carries c1 and c3 of the two
// latch groups must each have been both zero and one.
module csla8_tb;

  localparam int unsigned HALF = 5;

  logic       clk;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  int         checks = 0;
  int         failures = 0;
  int         cycles = 0;
  int         adds = 0;
  int         c1_hi = 0, c1_lo = 0, c3_hi = 0, c3_lo = 0, c6_hi = 0;

  csla8 dut (.clk(clk), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    clk = 1'b0; a = '0; b = '0; cin = 1'b0;
    #HALF;
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a, b} = 17'(v);
      clk = 1'b1;
      #HALF;
      clk = 1'b0;
      #(HALF - 1);
      checks++;
      adds++;
      if ({cout, sum} !== 9'(a) + 9'(b) + 9'(cin)) begin
        failures++;
        if (failures < 10)
          $display("FAIL %h + %h + %0d -> %h", a, b, cin, {cout, sum});
      end
      // carries into bits 2, 4 and 7, worked out from the operands
      if (((a & 8'h03) + (b & 8'h03) + 8'(cin)) >> 2 != 0) c1_hi++; else c1_lo++;
      if (((a & 8'h0F) + (b & 8'h0F) + 8'(cin)) >> 4 != 0) c3_hi++; else c3_lo++;
      if (((a & 8'h7F) + (b & 8'h7F) + 8'(cin)) >> 7 != 0) c6_hi++;
      #1;
      cycles++;
    end
    checks++;
    if (cycles != adds) begin
      failures++;
      $display("FAIL %0d additions took %0d cycles", adds, cycles);
    end
    $display("c1: one %0d zero %0d; c3: one %0d zero %0d; c6 one %0d", c1_hi, c1_lo, c3_hi, c3_lo, c6_hi);
    checks++;
    if (c1_hi == 0 || c1_lo == 0 || c3_hi == 0 || c3_lo == 0 || c6_hi == 0) begin
      failures++;
      $display("FAIL a select path was never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF * ((1 << 17) + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
