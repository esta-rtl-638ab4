// esta_comparator: equality checker ("=?") between two resources under test.
//
// Two resources of one type get the same operands in a clock cycle. If the
// controller enables the check (en), mismatch is high whenever their results
// differ. Purely combinational; the controller samples mismatch at the end of
// the cycle. A mismatch means one of the two is faulty. Equal results do not
// prove that both are fault-free.
module esta_comparator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             en,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic             mismatch
);
  always_comb mismatch = en && (x != y);
endmodule
