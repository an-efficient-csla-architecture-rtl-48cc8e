// sel_mux_tb: checks the 2N:N select multiplexer.
//
// The default 6:3 instance is run over all in0/in1/sel combinations, a
// 12:6 instance over random words; y must equal in1 when sel is one and
// in0 when it is zero.
module sel_mux_tb;

  logic [2:0] in0_3, in1_3, y3;
  logic [5:0] in0_6, in1_6, y6;
  logic       sel;
  int         checks = 0;
  int         failures = 0;

  sel_mux          dut3 (.in0(in0_3), .in1(in1_3), .sel(sel), .y(y3));
  sel_mux #(.N(6)) dut6 (.in0(in0_6), .in1(in1_6), .sel(sel), .y(y6));

  initial begin
    for (int v = 0; v < 128; v++) begin
      {sel, in1_3, in0_3} = 7'(v);
      in0_6 = 6'($urandom);
      in1_6 = 6'($urandom);
      #1;
      checks += 2;
      if (y3 !== (sel ? in1_3 : in0_3)) begin
        failures++;
        $display("FAIL 6:3 sel=%0d in0=%h in1=%h y=%h", sel, in0_3, in1_3, y3);
      end
      if (y6 !== (sel ? in1_6 : in0_6)) begin
        failures++;
        $display("FAIL 12:6 sel=%0d in0=%h in1=%h y=%h", sel, in0_6, in1_6, y6);
      end
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
