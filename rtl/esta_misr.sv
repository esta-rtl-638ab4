// esta_misr: multiple-input signature register that compresses the results
// of the subtractor S1 during its LFSR test cycles.
//
// At a clock edge with en high, the register takes one Galois LFSR step
// (mask esta_pkg::lfsr_taps(WIDTH)) and XORs in the word d. clear, and
// reset, set it to zero; clear wins over en. sig is a register output. The
// controller compares it with the fault-free signature at the end of each
// test session. The method only names "MISR" test logic; the polynomial and
// the session scheme are this design's choices.
module esta_misr
  import esta_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sig
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= WIDTH'(misr_next(64'(sig), 64'(d), WIDTH));
  end
endmodule
