// Self-checking testbench of the decimal carry generator. Every binary sum a
// digit position can produce (0..19) is applied as {C0, S3..S0}; the output
// must be 1 exactly for sums above 9.
module tb_carry_generator;

  logic       c0, cout;
  logic [3:0] s;
  int         checks = 0;
  int         failures = 0;

  carry_generator dut (.c0(c0), .s(s[3:1]), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v <= 19; v++) begin
      {c0, s} = 5'(v);
      #1;
      checks++;
      if (cout != (v > 9)) begin
        failures++;
        $display("FAIL sum=%0d -> cout=%0d", v, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
