// One-bit full adder written as a NAND-only network.
//
// Sum: three NANDs with tied inputs invert a, b and c; four 3-input NANDs
// each decode one odd-parity minterm (a'b'c, a'bc', ab'c', abc); a 4-input
// NAND combines them. That is 8 NAND gates and 3 levels of delay.
// Carry: three 2-input NANDs on the pairs (a,b), (b,c), (a,c) and a 3-input
// NAND combining them: 4 gates, 2 levels.
// The gate counts (12 NAND per full adder) are the ones used for the area
// estimates of the adder; the two networks are the classic NAND realisations.
// Purely combinational: no clock, no reset.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic cy
);

  logic na, nb, nc;          // inverted inputs (NAND with tied inputs)
  logic [3:0] mt_n;          // inverted odd-parity minterms
  logic nab, nbc, nac;       // carry pair terms

  assign na = ~(a & a);
  assign nb = ~(b & b);
  assign nc = ~(c & c);

  assign mt_n[0] = ~(na & nb & c);
  assign mt_n[1] = ~(na & b & nc);
  assign mt_n[2] = ~(a & nb & nc);
  assign mt_n[3] = ~(a & b & c);
  assign s       = ~(mt_n[0] & mt_n[1] & mt_n[2] & mt_n[3]);

  assign nab = ~(a & b);
  assign nbc = ~(b & c);
  assign nac = ~(a & c);
  assign cy  = ~(nab & nbc & nac);

endmodule
