// sel_mux: 2N:N select multiplexer made of N 2:1 multiplexers.
//
// y = sel ? in1 : in0, bit by bit. In a latch group of width W it is the
// 2(W+1):(W+1) mux (6:3, 8:4, 10:5, 12:6 for W = 2..5): in0 carries the live
// carry-in-zero sum and carry of the group's adder, in1 the latched
// carry-in-one sum and carry, and sel is the carry arriving from the
// group below. Purely combinational.
module sel_mux #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] in0,
  input  logic [N-1:0] in1,
  input  logic         sel,
  output logic [N-1:0] y
);

  for (genvar i = 0; i < N; i++) begin : g_mux2
    assign y[i] = sel ? in1[i] : in0[i];
  end

endmodule
