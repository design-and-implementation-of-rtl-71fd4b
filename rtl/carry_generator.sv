// Decimal carry generator of one BCD digit.
//
// The first-stage binary sum {C0, S3..S0} lies in 0..19. It is an invalid
// BCD result exactly when it exceeds 9, i.e. when C0 is set, or when S3 is
// set together with S2 or S1 (sums 10..15). The function is
//   cout = C0 | S3 & (S2 | S1)
// which is the same as C0 + S3*S2 + S3*S1, realised with one AND and two OR
// gates (two gate levels after the adder). The function is the published
// decimal-carry condition; grouping S2 | S1 first is this design's choice to
// stay within one AND and two OR gates. The output is the digit's decimal
// carry, the select of the output multiplexer and the enable of the BESC.
// Combinational.
module carry_generator (
  input  logic       c0,
  input  logic [3:1] s,   // S3..S1; S0 cannot decide whether the sum exceeds 9
  output logic       cout
);

  logic s2_or_s1;

  assign s2_or_s1 = s[2] | s[1];
  assign cout     = c0 | (s[3] & s2_or_s1);

endmodule
