// Self-checking testbench of the NAND full adder: all eight input
// combinations, compared with the integer sum a + b + c.
module tb_full_adder;

  logic a, b, c, s, cy;
  int   checks = 0;
  int   failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({cy, s} != 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d -> cy=%0d s=%0d", a, b, c, cy, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
