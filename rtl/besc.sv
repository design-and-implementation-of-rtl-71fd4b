// Binary to Excess Six Converter (BESC).
//
// Replaces the second 4-bit adder of a conventional BCD adder, which adds the
// constant 6 to a binary sum above 9. For a first-stage sum {C0,S3..S0} in
// 10..19 the corrected digit is (S + 6) mod 16 = sum - 10, and over that
// range (all other inputs are don't-cares) it reduces to carry-free logic:
//   M0 = S0
//   M1 = ~S1
//   M2 = ~C0 & S2 & S1  |  C0 & ~S1
//   M3 = C0 & S1
// i.e. two inverters, three AND gates and one OR gate.
//
// The converter is switched off when no correction is needed: the inputs are
// isolated by the enable (the carry generator output), so while en is 0 the
// internal nodes and M hold 0 and do not toggle with the sum. That gating is
// this design's own realisation of "switching off"; with en = 1 the outputs
// follow the equations above. Combinational.
module besc (
  input  logic       en,
  input  logic       c0,
  input  logic [3:0] s,
  output logic [3:0] m
);

  import bcd_pkg::*;

  bin_sum_t g;     // operand-isolated inputs
  logic     nc0;
  logic     ns1;

  assign g.c0 = c0 & en;
  assign g.s  = s & {4{en}};

  assign nc0 = ~g.c0;
  assign ns1 = ~g.s[1];

  assign m[0] = g.s[0];
  assign m[1] = ns1 & en;
  assign m[2] = (nc0 & g.s[2] & g.s[1]) | (g.c0 & ns1);
  assign m[3] = g.c0 & g.s[1];

endmodule
