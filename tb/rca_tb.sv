// rca_tb: exhaustive check of the ripple carry adder.
//
// Two instances: the default width (2 bits, the lowest group) and 5 bits
// (the widest group). Every a, b and carry-in combination is applied and
// {co, s} is compared with the integer a + b + ci.
module rca_tb;

  logic [1:0] a2, b2, s2;
  logic [4:0] a5, b5, s5;
  logic       ci, co2, co5;
  int         checks = 0;
  int         failures = 0;

  rca            dut2 (.a(a2), .b(b2), .ci(ci), .s(s2), .co(co2));
  rca #(.W(5))   dut5 (.a(a5), .b(b5), .ci(ci), .s(s5), .co(co5));

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int x = 0; x < 32; x++) begin
        for (int y = 0; y < 32; y++) begin
          ci = c[0];
          a5 = 5'(x);  b5 = 5'(y);
          a2 = 2'(x);  b2 = 2'(y);
          #1;
          checks++;
          if ({co5, s5} !== 6'(x + y + c)) begin
            failures++;
            $display("FAIL W=5 %0d+%0d+%0d -> %0d", x, y, c, {co5, s5});
          end
          if (x < 4 && y < 4) begin
            checks++;
            if ({co2, s2} !== 3'(x + y + c)) begin
              failures++;
              $display("FAIL W=2 %0d+%0d+%0d -> %0d", x, y, c, {co2, s2});
            end
          end
        end
      end
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
