// d_latch_tb: checks the gated D latch against its reference behaviour.
//
// Phase 1 (enable high): d is toggled and q must follow it at once, with
// q_n its complement. Phase 2 (enable low): d is toggled and q must keep
// the value it had when the enable fell. Phase 3: enable high again, q
// follows d. This is the classic latch waveform (transparent, hold,
// transparent). A 4-bit instance is checked with random words the same way.
module d_latch_tb;

  logic       d, e, q, q_n;
  logic [3:0] d4, q4, q4_n;
  logic       kept;
  logic [3:0] kept4;
  int         checks = 0;
  int         failures = 0;

  d_latch          dut  (.d(d),  .e(e), .q(q),  .q_n(q_n));
  d_latch #(.W(4)) dut4 (.d(d4), .e(e), .q(q4), .q_n(q4_n));

  task automatic expect1(input logic exp_q, input string what);
    checks++;
    if (q !== exp_q || q_n !== ~exp_q) begin
      failures++;
      $display("FAIL %s: d=%0d e=%0d q=%0d q_n=%0d expected q=%0d", what, d, e, q, q_n, exp_q);
    end
  endtask

  task automatic expect4(input logic [3:0] exp_q, input string what);
    checks++;
    if (q4 !== exp_q || q4_n !== ~exp_q) begin
      failures++;
      $display("FAIL %s: d4=%h q4=%h q4_n=%h expected %h", what, d4, q4, q4_n, exp_q);
    end
  endtask

  initial begin
    // transparent
    e = 1'b1; d = 1'b1; d4 = 4'h0;
    #1 expect1(1'b1, "transparent");
    d = 1'b0;
    #1 expect1(1'b0, "transparent");
    // hold with d low at the falling enable
    e = 1'b0;
    #1 expect1(1'b0, "hold");
    d = 1'b1;
    #1 expect1(1'b0, "hold");
    d = 1'b0;
    #1 expect1(1'b0, "hold");
    // transparent again
    e = 1'b1; d = 1'b1;
    #1 expect1(1'b1, "transparent");
    // hold with d high at the falling enable
    e = 1'b0;
    #1 d = 1'b0;
    #1 expect1(1'b1, "hold high");

    // random words on the 4-bit instance
    for (int i = 0; i < 200; i++) begin
      e = 1'b1;
      d4 = 4'($urandom);
      #1 expect4(d4, "transparent4");
      kept4 = d4;
      e = 1'b0;
      #1;
      d4 = 4'($urandom);
      #1 expect4(kept4, "hold4");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
