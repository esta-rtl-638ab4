// esta_multiplier: WIDTH-bit multiplier, used for the multiplier resources
// M1, M2 and M3 of the example datapath.
//
// Purely combinational. It keeps the low WIDTH bits of the product, so every
// value of the datapath stays WIDTH bits wide. The method names the
// multipliers but gives neither their width nor a product format; both are
// this design's choices. M3 does the one multiplication bound to it. In its
// dead cycles the same unit recomputes the work of M1 or M2, and the result
// is compared.
module esta_multiplier #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  // The product is evaluated at the width of y: only its low WIDTH bits.
  always_comb y = a * b;
endmodule
