// csla16: 16-bit latch-based carry select adder.
//
// Bits 1:0 are a plain 2-bit ripple carry adder fed by cin. Bits 3:2, 6:4,
// 10:7 and 15:11 are latch groups (see latch_group): each has one ripple
// carry adder with the clock as its carry input, latches that keep the
// carry-in-one result and a mux driven by the carry of the group below.
// The carries between groups are c1, c3, c6 and c10 (named after the bit
// they leave); the carry of the top group is cout.
//
//   {cout, sum} = a + b + cin
//
// Timing: present a, b and cin at a rising clock edge and hold them to the
// end of that cycle. sum and cout are valid in the low phase of the same
// cycle: one addition per clock cycle, with the carry-in-one half formed in
// the high phase and the carry-in-zero half in the low phase. The group
// widths and carry names are those of the published 16-bit structure.
module csla16
  import csla_pkg::*;
(
  input  logic                clk,
  input  logic [STAGE_W-1:0]  a,
  input  logic [STAGE_W-1:0]  b,
  input  logic                cin,
  output logic [STAGE_W-1:0]  sum,
  output logic                cout
);

  // carry[g] is the carry out of group g (carry[0] = c1, ..., carry[4] = cout).
  logic [NUM_GROUPS-1:0] carry;

  rca #(.W(GROUP_W[0])) u_group1 (
    .a (a[GROUP_W[0]-1:0]),
    .b (b[GROUP_W[0]-1:0]),
    .ci(cin),
    .s (sum[GROUP_W[0]-1:0]),
    .co(carry[0])
  );

  for (genvar g = 1; g < NUM_GROUPS; g++) begin : g_group
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned GW  = GROUP_W[g];

    latch_group #(.W(GW)) u_group (
      .clk  (clk),
      .a    (a[LSB +: GW]),
      .b    (b[LSB +: GW]),
      .c_sel(carry[g-1]),
      .s    (sum[LSB +: GW]),
      .co   (carry[g])
    );
  end

  assign cout = carry[NUM_GROUPS-1];

endmodule
