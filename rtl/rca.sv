// rca: W-bit ripple carry adder.
//
// A chain of W full adders: the carry out of bit i is the carry in of bit
// i+1, as drawn for the two full adders of a latch group. {co, s} = a + b
// + ci. Combinational; the delay grows with W through the carry chain.
// W defaults to 2, the width of the lowest group of the 16-bit adder.
module rca #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  logic [W:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[W];

endmodule
