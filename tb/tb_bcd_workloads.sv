// Workload testbench of the multi-digit BESC-BCD adder at other sizes.
// One digit (DIGITS = 1): all 200 additions of two digits and a carry in.
// Four digits (DIGITS = 4), the multi-digit extension: 20,000 random operand
// pairs plus the all-nines case with carry in, where the carry ripples
// through every digit. The reference is integer decimal arithmetic.
module tb_bcd_workloads;

  logic [3:0]  a1, b1, o1;
  logic        cin1;
  logic [0:0]  cout1;

  logic [15:0] a4, b4, o4;
  logic        cin4;
  logic [3:0]  cout4;

  int checks = 0;
  int failures = 0;
  int n_full_ripple = 0;

  besc_bcd_adder_ndigit #(.DIGITS(1)) dut1 (
    .a(a1), .b(b1), .cin(cin1), .o(o1), .cout(cout1)
  );

  besc_bcd_adder_ndigit #(.DIGITS(4)) dut4 (
    .a(a4), .b(b4), .cin(cin4), .o(o4), .cout(cout4)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] to_bcd4(int v);
    logic [15:0] r;
    for (int i = 0; i < 4; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic check4(int x, int y, int ci);
    int total;
    a4   = to_bcd4(x);
    b4   = to_bcd4(y);
    cin4 = 1'(ci);
    #1;
    total = x + y + ci;
    checks++;
    if (o4 != to_bcd4(total % 10000) || cout4[3] != 1'(total / 10000)) begin
      failures++;
      $display("FAIL 4-digit %0d+%0d+%0d -> cout=%b o=%h", x, y, ci, cout4, o4);
    end
    if (cout4 == 4'b1111) n_full_ripple++;
  endtask

  initial begin : stimulus
    int total;
    a4 = '0; b4 = '0; cin4 = 1'b0;
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 10; x++)
        for (int y = 0; y < 10; y++) begin
          a1 = 4'(x); b1 = 4'(y); cin1 = 1'(ci);
          #1;
          total = x + y + ci;
          checks++;
          if (int'(o1) != total % 10 || int'(cout1) != total / 10) begin
            failures++;
            $display("FAIL 1-digit %0d+%0d+%0d -> cout=%0d o=%0d", x, y, ci, cout1, o1);
          end
        end

    check4(9999, 0, 1);
    check4(9999, 9999, 1);
    for (int k = 0; k < 20000; k++)
      check4(int'($urandom_range(9999)), int'($urandom_range(9999)),
             int'($urandom_range(1)));

    checks++;
    if (n_full_ripple == 0) begin
      failures++;
      $display("FAIL carry never rippled through all four digits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
