// 8:4 output multiplexer of one BCD digit: four 2:1 NAND multiplexers with a
// common select.
//
// sel = 1 passes in1 (the BESC output M3..M0), sel = 0 passes in0 (the
// first-stage sum S3..S0). The select is the carry generator output, so a
// sum above 9 leaves through the converter and any other sum straight from
// the first-stage adder. Combinational.
module mux_8to4 (
  input  logic       sel,
  input  logic [3:0] in1,
  input  logic [3:0] in0,
  output logic [3:0] y
);

  for (genvar i = 0; i < 4; i++) begin : g_mux
    mux2_nand u_mux (
      .sel(sel),
      .in1(in1[i]),
      .in0(in0[i]),
      .y  (y[i])
    );
  end

endmodule
