// csla_top: latch-based carry select adder of WIDTH bits.
//
// WIDTH = 16 (default) is the 16-bit adder csla16. WIDTH = 8 is the 8-bit
// variant csla8. Any other multiple of 16 chains WIDTH/16 copies of csla16,
// the carry out of each copy driving the carry in of the next; 32 bits are
// thus two 16-bit adders and 64 bits two 32-bit adders, the word sizes the
// design is evaluated at. All copies share the one clock.
//
//   {cout, sum} = a + b + cin
//
// Timing: a, b and cin are presented at a rising clock edge and held until
// the next one; sum and cout are valid in the low phase of that cycle, one
// addition per clock cycle. In a chain the upper copies settle through the
// carry passing up from the lower copy, so the low phase must cover the
// whole chain. Carry chaining of the 16-bit stages follows the published
// wide variants; sharing the clock is this design's choice.
module csla_top
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  if (WIDTH == 8) begin : g_w8
    csla8 u_csla8 (
      .clk (clk),
      .a   (a),
      .b   (b),
      .cin (cin),
      .sum (sum),
      .cout(cout)
    );
  end else begin : g_chain
    localparam int unsigned STAGES = WIDTH / STAGE_W;

    // stage_c[k] is the carry into stage k; stage_c[STAGES] is cout.
    logic [STAGES:0] stage_c;

    assign stage_c[0] = cin;

    for (genvar k = 0; k < STAGES; k++) begin : g_stage
      csla16 u_csla16 (
        .clk (clk),
        .a   (a[k*STAGE_W +: STAGE_W]),
        .b   (b[k*STAGE_W +: STAGE_W]),
        .cin (stage_c[k]),
        .sum (sum[k*STAGE_W +: STAGE_W]),
        .cout(stage_c[k+1])
      );
    end

    assign cout = stage_c[STAGES];
  end

  // Only 8 and non-zero multiples of 16 are built.
  if (WIDTH != 8 && (WIDTH == 0 || WIDTH % STAGE_W != 0)) begin : g_bad_width
    $error("csla_top: WIDTH must be 8 or a multiple of 16, got %0d", WIDTH);
  end

endmodule
