// End-to-end testbench of the multi-digit BESC-BCD adder at its default size
// (two digits). Applies every pair of two-digit BCD operands with carry in 0
// and 1 (20,000 additions) and compares the sum and the per-digit carries
// with integer decimal arithmetic.
//
// It also counts how often each mechanism of the design is exercised and
// fails if one never occurs: a digit sum needing no correction (with the
// converter held idle, checked through hierarchical references), correction
// of sums 10..15 (first-stage carry 0) and of sums 16..19 (first-stage carry
// 1), a decimal carry rippling into the upper digit, a carry in, and a
// carry out of the whole sum.
module tb_besc_bcd_adder_ndigit;

  localparam int D = 2;

  logic [4*D-1:0] a, b, o;
  logic           cin;
  logic [D-1:0]   cout;
  int             checks = 0;
  int             failures = 0;

  // mechanism counters
  int n_plain = 0, n_corr_lo = 0, n_corr_hi = 0, n_idle_ok = 0;
  int n_ripple = 0, n_cin = 0, n_overflow = 0;

  besc_bcd_adder_ndigit dut (.a(a), .b(b), .cin(cin), .o(o), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Packs an integer 0..99 into two BCD digits.
  function automatic logic [7:0] to_bcd2(int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  // Checks that a digit's converter is idle (output 0) when that digit needs
  // no correction, and counts it.
  task automatic check_idle(int digit_sum, logic [3:0] m);
    if (digit_sum <= 9) begin
      checks++;
      if (m != 4'd0) begin
        failures++;
        $display("FAIL converter active for digit sum %0d: m=%h", digit_sum, m);
      end else begin
        n_idle_ok++;
      end
    end
  endtask

  task automatic count_digit(int digit_sum);
    if (digit_sum <= 9)       n_plain++;
    else if (digit_sum <= 15) n_corr_lo++;
    else                      n_corr_hi++;
  endtask

  initial begin : stimulus
    int total, exp_o, ds0, ds1, c1;
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 100; x++)
        for (int y = 0; y < 100; y++) begin
          a   = to_bcd2(x);
          b   = to_bcd2(y);
          cin = 1'(ci);
          #1;
          total = x + y + ci;
          exp_o = total % 100;
          ds0   = x % 10 + y % 10 + ci;
          c1    = ds0 / 10;
          ds1   = x / 10 + y / 10 + c1;
          checks++;
          if (o != to_bcd2(exp_o) || cout[D-1] != 1'(total / 100)
              || cout[0] != 1'(c1)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> cout=%b o=%h", x, y, ci, cout, o);
          end
          count_digit(ds0);
          count_digit(ds1);
          check_idle(ds0, dut.g_digit[0].u_digit.m);
          check_idle(ds1, dut.g_digit[1].u_digit.m);
          if (c1 != 0) n_ripple++;
          if (ci != 0) n_cin++;
          if (total >= 100) n_overflow++;
        end

    $display("mechanisms: plain=%0d corrected_10_15=%0d corrected_16_19=%0d idle_converter=%0d ripple=%0d carry_in=%0d overflow=%0d",
             n_plain, n_corr_lo, n_corr_hi, n_idle_ok, n_ripple, n_cin, n_overflow);
    checks++;
    if (n_plain == 0 || n_corr_lo == 0 || n_corr_hi == 0 || n_idle_ok == 0 ||
        n_ripple == 0 || n_cin == 0 || n_overflow == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
