// esta_subtractor: WIDTH-bit subtractor, the single subtractor resource S1 of
// the example datapath.
//
// Purely combinational: y = a - b modulo 2**WIDTH. S1 has no twin to be
// checked against, so it gets LFSR/MISR test logic around it instead (see
// esta_lfsr, esta_misr, esta_controller). The width is this design's choice;
// the method does not give one.
module esta_subtractor #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a - b;
endmodule
