// Self-checking testbench of the 4-bit ripple-carry first-stage adder: all
// 512 combinations of a, b and cin, compared with the integer sum.
module tb_rca4;

  logic [3:0] a, b, s;
  logic       cin, c0;
  int         checks = 0;
  int         failures = 0;

  rca4 dut (.a(a), .b(b), .cin(cin), .s(s), .c0(c0));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int exp_sum;
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      #1;
      exp_sum = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({c0, s} != 5'(exp_sum)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> c0=%0d s=%0d", a, b, cin, c0, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
