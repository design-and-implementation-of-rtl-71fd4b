// Self-checking testbench of the binary to excess six converter.
// Enabled: every sum 10..19 must convert to its BCD digit, sum - 10.
// Disabled: for every 5-bit input the output must stay 0 (converter idle).
module tb_besc;

  logic       en, c0;
  logic [3:0] s, m;
  int         checks = 0;
  int         failures = 0;

  besc dut (.en(en), .c0(c0), .s(s), .m(m));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    en = 1'b1;
    for (int v = 10; v <= 19; v++) begin
      {c0, s} = 5'(v);
      #1;
      checks++;
      if (int'(m) != v - 10) begin
        failures++;
        $display("FAIL enabled sum=%0d -> m=%0d, expected %0d", v, m, v - 10);
      end
    end
    en = 1'b0;
    for (int v = 0; v < 32; v++) begin
      {c0, s} = 5'(v);
      #1;
      checks++;
      if (m != 4'd0) begin
        failures++;
        $display("FAIL disabled sum=%0d -> m=%0d, expected 0", v, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
