// Self-checking testbench of the 8:4 output multiplexer: every select value
// and every pair of 4-bit inputs.
module tb_mux_8to4;

  logic       sel;
  logic [3:0] in1, in0, y;
  int         checks = 0;
  int         failures = 0;

  mux_8to4 dut (.sel(sel), .in1(in1), .in0(in0), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 512; v++) begin
      {sel, in1, in0} = 9'(v);
      #1;
      checks++;
      if (y != (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%0d in1=%h in0=%h -> y=%h", sel, in1, in0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
