// latch_group: one carry select group of the latch-based CSLA.
//
// A regular carry select group needs two ripple carry adders, one for a
// block carry of zero and one for a block carry of one. This group has a
// single W-bit ripple carry adder whose carry input is the clock:
//   * clock high: the adder forms a + b + 1 and W+1 D latches (enabled by
//     the clock) follow and, at the falling edge, keep that sum and carry;
//   * clock low: the adder forms a + b + 0 while the latches hold a + b + 1.
// A 2(W+1):(W+1) mux then picks the latched result when the carry from the
// group below (c_sel) is one and the live adder result when it is zero.
//
// Timing: a and b must be stable from the rising clock edge to the end of
// the following low phase. s and co are valid during the low phase, one
// addition per clock cycle. During the high phase a group with c_sel = 0
// shows the carry-in-one result, which is not the sum. The structure (one
// adder, clock as carry, latches on the clock, mux on the incoming carry)
// follows the published group; the operand hold rule is derived from it.
// The clock deliberately feeds the adder as data and enables the latches;
// tools that report a clock used as data, or the latches, are seeing the
// intended structure.
module latch_group #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         c_sel,
  output logic [W-1:0] s,
  output logic         co
);

  logic [W-1:0] s_live;    // adder output, carry in = clk
  logic         co_live;
  logic [W:0]   held;      // {carry, sum} latched while clk is high

  rca #(.W(W)) u_rca (
    .a (a),
    .b (b),
    .ci(clk),
    .s (s_live),
    .co(co_live)
  );

  d_latch #(.W(W + 1)) u_latch (
    .d  ({co_live, s_live}),
    .e  (clk),
    .q  (held),
    .q_n()          // the complementary output is not needed here
  );

  sel_mux #(.N(W + 1)) u_mux (
    .in0({co_live, s_live}),
    .in1(held),
    .sel(c_sel),
    .y  ({co, s})
  );

endmodule
