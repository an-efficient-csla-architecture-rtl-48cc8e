// full_adder: one-bit full adder.
//
// s = a ^ b ^ ci and co = majority(a, b, ci). It is the cell from which all
// ripple carry adders of the design are chained. In a latch group the
// lowest full adder receives the clock as its carry input, so the same
// cell adds with carry one while the clock is high and with carry zero
// while it is low. The gate-level form is the textbook one; the design
// only names the cell. Purely combinational, no timing of its own.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
