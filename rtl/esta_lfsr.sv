// esta_lfsr: pseudo-random pattern generator that feeds the subtractor S1
// with test operands in the clock cycles where S1 has no work of its own.
//
// Right-shifting Galois LFSR with the feedback mask esta_pkg::lfsr_taps(WIDTH).
// With a listed width it is maximal length, period 2**WIDTH-1. Reset and
// load put SEED into the register; en advances it by one step at the clock
// edge. load wins over en. q is the current pattern, a register output. The
// method only names "LFSR" test logic; the polynomial, the seed and the
// reseed per test session are this design's choices. SEED must not be zero.
module esta_lfsr
  import esta_pkg::*;
#(
  parameter int unsigned     WIDTH = 16,
  parameter logic [63:0]     SEED  = 64'h1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= SEED[WIDTH-1:0];
    else if (load)  q <= SEED[WIDTH-1:0];
    else if (en)    q <= WIDTH'(lfsr_next(64'(q), WIDTH));
  end

  initial assert (SEED[WIDTH-1:0] != '0) else $error("esta_lfsr: SEED must be non-zero");
endmodule
