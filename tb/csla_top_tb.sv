// csla_top_tb: end-to-end test of the adder at the four word sizes.
//
// Four copies of csla_top (WIDTH = 8, 16, 32, 64) share one clock and are
// given operands at the same time. For each addition the operands are set
// at a rising edge, the clock is high 5 time units and low 5, and at the
// end of the low phase every copy's {cout, sum} must equal a + b + cin;
// one addition per clock cycle, checked against the cycle count.
//
// Mechanisms counted (a count of zero is a failure):
//   * latched path: a group's select carry is one, so the carry-one result
//     captured in the high phase is used (every width);
//   * live path: a select carry is zero, so the carry-zero result formed in
//     the low phase is used (every width);
//   * stage cascade: a carry passes from one 16-bit stage into the next
//     (32 and 64 bits);
//   * carry out of the word (every width).
// The select carries are worked out from the operands, not read from the
// design.
module csla_top_tb;

  localparam int unsigned HALF  = 5;
  localparam int unsigned NRAND = 50000;
  localparam int          NW    = 4;
  localparam int unsigned WIDTHS [NW] = '{8, 16, 32, 64};

  logic        clk;
  logic [63:0] a, b;
  logic        cin;
  logic [7:0]  sum8;
  logic [15:0] sum16;
  logic [31:0] sum32;
  logic [63:0] sum64;
  logic        cout8, cout16, cout32, cout64;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int adds = 0;
  int n_latched [NW];
  int n_live    [NW];
  int n_cascade [NW];
  int n_cout    [NW];

  csla_top #(.WIDTH(8))  dut8  (.clk(clk), .a(a[7:0]),  .b(b[7:0]),  .cin(cin), .sum(sum8),  .cout(cout8));
  csla_top               dut16 (.clk(clk), .a(a[15:0]), .b(b[15:0]), .cin(cin), .sum(sum16), .cout(cout16));
  csla_top #(.WIDTH(32)) dut32 (.clk(clk), .a(a[31:0]), .b(b[31:0]), .cin(cin), .sum(sum32), .cout(cout32));
  csla_top #(.WIDTH(64)) dut64 (.clk(clk), .a(a[63:0]), .b(b[63:0]), .cin(cin), .sum(sum64), .cout(cout64));

  // Carry entering bit k of x + y + c (k <= 64).
  function automatic logic carry_into(input logic [63:0] x, input logic [63:0] y, input logic c,
                                      input int unsigned k);
    logic [64:0] mask;
    if (k == 0) return c;
    mask = (65'(1) << k) - 65'(1);
    return (((65'(x) & mask) + (65'(y) & mask) + 65'(c)) >> k) != 65'(0);
  endfunction

  // Bit positions where a latch group starts, for a given width.
  function automatic logic is_group_start(input int unsigned w, input int unsigned k);
    if (w == 8) return (k == 2 || k == 4);
    for (int unsigned g = 1; g < csla_pkg::NUM_GROUPS; g++)
      if (k % 16 == csla_pkg::group_lsb(g)) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check_width(input int idx, input logic [64:0] got);
    int unsigned w;
    logic [64:0] mask, expect_v;
    w = WIDTHS[idx];
    mask = (65'(1) << (w + 1)) - 65'(1);
    expect_v = ((65'(a) & (mask >> 1)) + (65'(b) & (mask >> 1)) + 65'(cin)) & mask;
    checks++;
    if (got !== expect_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL WIDTH=%0d a=%h b=%h cin=%0d got %h expected %h", w, a, b, cin, got, expect_v);
    end
    for (int unsigned k = 1; k < w; k++) begin
      if (is_group_start(w, k)) begin
        if (carry_into(a, b, cin, k)) n_latched[idx]++;
        else                          n_live[idx]++;
      end
      if (k % 16 == 0 && carry_into(a, b, cin, k)) n_cascade[idx]++;
    end
    if (got[w]) n_cout[idx]++;
  endtask

  task automatic add_cycle(input logic [63:0] x, input logic [63:0] y, input logic c);
    a = x; b = y; cin = c;
    clk = 1'b1;
    #HALF;
    clk = 1'b0;
    #(HALF - 1);
    adds++;
    check_width(0, 65'({cout8, sum8}));
    check_width(1, 65'({cout16, sum16}));
    check_width(2, 65'({cout32, sum32}));
    check_width(3, 65'({cout64, sum64}));
    #1;
    cycles++;
  endtask

  initial begin
    clk = 1'b0; a = '0; b = '0; cin = 1'b0;
    for (int i = 0; i < NW; i++) begin
      n_latched[i] = 0; n_live[i] = 0; n_cascade[i] = 0; n_cout[i] = 0;
    end
    #HALF;

    add_cycle('0, '0, 1'b0);
    add_cycle('1, '0, 1'b1);
    add_cycle('1, '1, 1'b1);
    add_cycle(64'h0000_FFFF_0000_FFFF, 64'h1, 1'b0);
    add_cycle(64'h8000_8000_8000_8080, 64'h8000_8000_8000_8080, 1'b0);
    for (int i = 0; i < NRAND; i++)
      add_cycle({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));

    checks++;
    if (cycles != adds) begin
      failures++;
      $display("FAIL %0d additions took %0d cycles", adds, cycles);
    end
    for (int i = 0; i < NW; i++) begin
      $display("WIDTH=%0d: latched path %0d, live path %0d, stage cascade carries %0d, carry out %0d",
               WIDTHS[i], n_latched[i], n_live[i], n_cascade[i], n_cout[i]);
      checks += 3;
      if (n_latched[i] == 0) begin failures++; $display("FAIL WIDTH=%0d latched path never used", WIDTHS[i]); end
      if (n_live[i] == 0)    begin failures++; $display("FAIL WIDTH=%0d live path never used", WIDTHS[i]); end
      if (n_cout[i] == 0)    begin failures++; $display("FAIL WIDTH=%0d no carry out", WIDTHS[i]); end
      if (WIDTHS[i] > 16) begin
        checks++;
        if (n_cascade[i] == 0) begin failures++; $display("FAIL WIDTH=%0d no stage cascade carry", WIDTHS[i]); end
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
