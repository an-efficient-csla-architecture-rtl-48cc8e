// csla8: 8-bit latch-based carry select adder.
//
// The lower three groups of the 16-bit adder are kept unchanged: a 2-bit
// ripple carry adder on bits 1:0 fed by cin, and latch groups on bits 3:2
// and 6:4 (carries c1 and c3 select their muxes). Instead of further
// groups, bit 7 is a single full adder whose carry input is c6, the carry
// out of bits 6:4; its carry out is cout.
//
//   {cout, sum} = a + b + cin
//
// Timing is that of csla16: operands held from a rising clock edge to the
// end of the cycle, result valid in the low phase. Reusing groups 1-3 and
// closing with a full adder follows the published 8-bit variant.
module csla8
  import csla_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] sum,
  output logic       cout
);

  logic c1, c3, c6;

  rca #(.W(2)) u_group1 (
    .a (a[1:0]),
    .b (b[1:0]),
    .ci(cin),
    .s (sum[1:0]),
    .co(c1)
  );

  latch_group #(.W(2)) u_group2 (
    .clk  (clk),
    .a    (a[3:2]),
    .b    (b[3:2]),
    .c_sel(c1),
    .s    (sum[3:2]),
    .co   (c3)
  );

  latch_group #(.W(3)) u_group3 (
    .clk  (clk),
    .a    (a[6:4]),
    .b    (b[6:4]),
    .c_sel(c3),
    .s    (sum[6:4]),
    .co   (c6)
  );

  full_adder u_bit7 (
    .a (a[7]),
    .b (b[7]),
    .ci(c6),
    .s (sum[7]),
    .co(cout)
  );

endmodule
