// One-digit BESC-BCD adder.
//
// Adds two BCD digits and a carry in. A 4-bit ripple-carry adder forms the
// binary sum {C0, S}; the carry generator flags sums above 9; the BESC turns
// such a sum into its corrected digit (sum - 10) without a second carry
// chain; the 8:4 multiplexer picks the BESC output when the flag is set and
// the plain sum otherwise. The flag is the decimal carry out.
//
// Interface: a, b are valid BCD digits (0..9), cin is 0 or 1; o is the BCD
// sum digit and cout the decimal carry, so 10*cout + o = a + b + cin.
// Inputs outside 0..9 give unspecified results. Combinational: no clock.
// The carry in is this design's addition for chaining digits; a lone digit
// ties it to 0.
module besc_bcd_adder (
  input  bcd_pkg::bcd_digit_t a,
  input  bcd_pkg::bcd_digit_t b,
  input  logic                cin,
  output bcd_pkg::bcd_digit_t o,
  output logic                cout
);

  import bcd_pkg::*;

  bin_sum_t   sum1;   // first-stage binary sum
  bcd_digit_t m;      // BESC output
  logic       corr;   // carry generator output: sum1 > 9

  rca4 u_rca (
    .a  (a),
    .b  (b),
    .cin(cin),
    .s  (sum1.s),
    .c0 (sum1.c0)
  );

  carry_generator u_cgen (
    .c0  (sum1.c0),
    .s   (sum1.s[3:1]),
    .cout(corr)
  );

  besc u_besc (
    .en(corr),
    .c0(sum1.c0),
    .s (sum1.s),
    .m (m)
  );

  mux_8to4 u_mux (
    .sel(corr),
    .in1(m),
    .in0(sum1.s),
    .y  (o)
  );

  assign cout = corr;

endmodule
