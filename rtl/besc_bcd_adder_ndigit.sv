// Multi-digit BESC-BCD adder (top level).
//
// DIGITS one-digit BESC-BCD adders are chained: the decimal carry out of
// digit i is the carry in of the first-stage adder of digit i+1, so the
// carry ripples through the first-stage adders while each digit's
// correction stays local. The default of two digits is the two-digit adder
// the design is evaluated with; larger DIGITS extend it the same way.
//
// Interface: a, b hold DIGITS packed BCD digits, digit 0 (least significant)
// in bits 3:0. cin is the carry into digit 0 (0 for a plain addition). o is
// the BCD sum and cout[i] the decimal carry out of digit i; cout[DIGITS-1]
// is the carry out of the whole sum, so
//   cout[DIGITS-1] * 10**DIGITS + o = a + b + cin   (in decimal).
// Combinational: the result follows the inputs after the ripple delay.
module besc_bcd_adder_ndigit #(
  parameter int unsigned DIGITS = 2
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                cin,
  output logic [4*DIGITS-1:0] o,
  output logic [DIGITS-1:0]   cout
);

  logic [DIGITS:0] c;   // c[i] is the carry into digit i

  assign c[0] = cin;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    besc_bcd_adder u_digit (
      .a   (a[4*i +: 4]),
      .b   (b[4*i +: 4]),
      .cin (c[i]),
      .o   (o[4*i +: 4]),
      .cout(c[i+1])
    );
  end

  assign cout = c[DIGITS:1];

endmodule
