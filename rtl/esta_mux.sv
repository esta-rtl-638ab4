// esta_mux: N-input operand multiplexer, like those in front of every
// resource input of the example datapath.
//
// Combinational. y = d[sel]. If sel is N or more, y is d[0]. The operand
// lists come from the schedule. The controller sets sel once per control
// step. SELW must be able to hold N-1.
module esta_mux #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned N     = 4,
  parameter int unsigned SELW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] d,
  input  logic [SELW-1:0]         sel,
  output logic [WIDTH-1:0]        y
);
  always_comb begin
    y = d[0];
    for (int unsigned i = 1; i < N; i++)
      if (sel == SELW'(i)) y = d[i];
  end
endmodule
