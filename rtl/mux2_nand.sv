// 2:1 multiplexer of four NAND gates.
//
// One NAND with tied inputs inverts sel; two NANDs gate in1 with sel and in0
// with the inverted sel; a final NAND merges them: y = sel ? in1 : in0, in
// three gate levels. Combinational.
module mux2_nand (
  input  logic sel,
  input  logic in1,
  input  logic in0,
  output logic y
);

  logic nsel, t1, t0;

  assign nsel = ~(sel & sel);
  assign t1   = ~(in1 & sel);
  assign t0   = ~(in0 & nsel);
  assign y    = ~(t1 & t0);

endmodule
