// First-stage 4-bit ripple-carry binary adder of one BCD digit position.
//
// Four full adders are chained from bit 0 to bit 3: S = A + B + cin, with the
// carry out of bit 3 brought out as C0. In a multi-digit adder cin is the
// decimal carry of the digit below; for a lone digit it is 0. The ripple
// structure is the main configuration of the design (carry-select and
// carry-skip first stages are alternatives that only replace this block).
// Combinational.
module rca4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       c0
);

  logic [4:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .c (c[i]),
      .s (s[i]),
      .cy(c[i+1])
    );
  end

  assign c0 = c[4];

endmodule
