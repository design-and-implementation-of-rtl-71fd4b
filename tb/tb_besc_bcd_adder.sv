// Self-checking testbench of the one-digit BESC-BCD adder: all 200
// combinations of two BCD digits and a carry in. The reference is the integer
// sum split into a decimal carry and a digit.
module tb_besc_bcd_adder;

  logic [3:0] a, b, o;
  logic       cin, cout;
  int         checks = 0;
  int         failures = 0;
  int         n_corrected = 0;

  besc_bcd_adder dut (.a(a), .b(b), .cin(cin), .o(o), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int total;
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 10; x++)
        for (int y = 0; y < 10; y++) begin
          a   = 4'(x);
          b   = 4'(y);
          cin = 1'(ci);
          #1;
          total = x + y + ci;
          if (total > 9) n_corrected++;
          checks++;
          if (int'(o) != total % 10 || int'(cout) != total / 10) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> cout=%0d o=%0d", x, y, ci, cout, o);
          end
        end
    checks++;
    if (n_corrected == 0) begin
      failures++;
      $display("FAIL no corrected sum was applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
