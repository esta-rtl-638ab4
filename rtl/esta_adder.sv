// esta_adder: WIDTH-bit adder, one of the adder resources of the example
// datapath. It is used as A1, A2 and as the extra adder EA, which the T-delay
// variant of the method adds to check A1 and A2.
//
// Purely combinational: y = a + b modulo 2**WIDTH, so the result settles in
// the same clock cycle. The method does not give the word width. WIDTH
// defaults to 16 here, and the carry out is dropped, as in the rest of the
// datapath.
module esta_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a + b;
endmodule
