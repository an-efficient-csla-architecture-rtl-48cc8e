// d_latch: level-sensitive D latch with enable, W bits wide.
//
// While e is high the latch is transparent and q follows d; when e falls
// q keeps the value d had at that moment until e rises again. q_n is the
// complement of q. This is the behaviour of the classic gated D latch with
// complementary outputs Q and Q'; it is written as an always_latch instead
// of the cross-coupled gate form. The width parameter is this design's own
// so that one instance can hold a group's whole sum and carry; each bit
// behaves as an independent one-bit latch.
//
// The latch a lint tool reports here is intended: it is the storage
// element of the adder. In the adder e is the clock: the latches capture the carry-in-one result
// during the high phase and hold it through the low phase.
module d_latch #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] d,
  input  logic         e,
  output logic [W-1:0] q,
  output logic [W-1:0] q_n
);

  always_latch begin
    if (e) q = d;
  end

  assign q_n = ~q;

endmodule
