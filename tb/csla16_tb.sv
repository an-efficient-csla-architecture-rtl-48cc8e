// csla16_tb: checks the 16-bit latch-based carry select adder.
//
// The testbench drives the clock: for each addition a, b and cin are set
// at a rising edge, the clock stays high 5 time units and low 5, and at
// the end of the low phase {cout, sum} must equal a + b + cin. One
// addition is issued per cycle and the cycle count is checked against the
// number of additions. Operands are corner cases (zero, all ones, carry
// chains through each group boundary) followed by random words.
//
// For each of the four latch groups the testbench counts how often its
// select carry (c1, c3, c6, c10) was one, so the latched carry-one result
// was used, and how often it was zero, so the live carry-zero result was
// used; a group whose two paths were not both exercised counts a failure.
module csla16_tb;

  localparam int unsigned HALF = 5;
  localparam int unsigned NRAND = 100000;

  logic        clk;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  int          checks = 0;
  int          failures = 0;
  int          cycles = 0;
  int          adds = 0;
  int          used_latch [1:4];
  int          used_live  [1:4];

  csla16 dut (.clk(clk), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  function automatic logic [16:0] ref_add(input logic [15:0] x, input logic [15:0] y, input logic c);
    return 17'(x) + 17'(y) + 17'(c);
  endfunction

  // Carry entering bit k of x + y + c, i.e. the select carry of the group starting at k.
  function automatic logic carry_into(input logic [15:0] x, input logic [15:0] y, input logic c,
                                      input int unsigned k);
    logic [16:0] mask;
    mask = (17'(1) << k) - 17'(1);
    return ((17'(x) & mask) + (17'(y) & mask) + 17'(c)) >> k != 17'(0);
  endfunction

  task automatic add_cycle(input logic [15:0] x, input logic [15:0] y, input logic c);
    a = x; b = y; cin = c;
    clk = 1'b1;
    #HALF;
    clk = 1'b0;
    #(HALF - 1);
    checks++;
    adds++;
    if ({cout, sum} !== ref_add(x, y, c)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h + %0d -> %h (expected %h)", x, y, c, {cout, sum}, ref_add(x, y, c));
    end
    for (int g = 1; g <= 4; g++) begin
      if (carry_into(x, y, c, csla_pkg::group_lsb(g))) used_latch[g]++;
      else                used_live[g]++;
    end
    #1;
    cycles++;
  endtask

  initial begin
    clk = 1'b0; a = '0; b = '0; cin = 1'b0;
    for (int g = 1; g <= 4; g++) begin used_latch[g] = 0; used_live[g] = 0; end
    #HALF;

    add_cycle(16'h0000, 16'h0000, 1'b0);
    add_cycle(16'hFFFF, 16'h0000, 1'b1);
    add_cycle(16'hFFFF, 16'hFFFF, 1'b1);
    add_cycle(16'hFFFF, 16'hFFFF, 1'b0);
    add_cycle(16'h8000, 16'h8000, 1'b0);
    add_cycle(16'h7FFF, 16'h0001, 1'b0);
    // a carry generated at the top of each group, the rest propagating
    foreach (csla_pkg::GROUP_W[g]) begin
      int unsigned msb;
      msb = csla_pkg::group_lsb(g) + csla_pkg::GROUP_W[g] - 1;
      add_cycle(16'hFFFF >> (15 - msb), 16'h0001, 1'b0);
      add_cycle(16'(1) << msb, 16'(1) << msb, 1'b1);
      add_cycle(~(16'(1) << msb), 16'h0000, 1'b1);
    end
    for (int i = 0; i < NRAND; i++)
      add_cycle(16'($urandom), 16'($urandom), 1'($urandom));

    checks++;
    if (cycles != adds) begin
      failures++;
      $display("FAIL %0d additions took %0d cycles", adds, cycles);
    end
    for (int g = 1; g <= 4; g++) begin
      $display("group %0d: latched carry-one result used %0d times, live carry-zero result %0d times",
               g + 1, used_latch[g], used_live[g]);
      checks++;
      if (used_latch[g] == 0 || used_live[g] == 0) begin
        failures++;
        $display("FAIL group %0d did not use both paths", g + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF * (NRAND + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
