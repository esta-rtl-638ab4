// esta_top: the example datapath after ESTA, made online-testable.
//
// The datapath evaluates one fixed data flow graph in four control steps. It
// takes fifteen inputs a..o and gives four results:
//   C1  s1 = a-b (S1)   p1 = c+d (A1)   im0 = e+f (A2)   im1 = g*h (M1)   im2 = i*j (M2)
//   C2  im3 = k+s1 (A1) im4 = s1*p1 (M1) p6 = l+im0 (A2) t6 = im0*im1 (M2) t8 = im1*im2 (M3)
//   C3  t3 = im3*im4 (M1)  p3 = p6+t6 (A1)  p7 = t8+m (A2)
//   C4  p4 = n+t3 (A1)  p8 = t3+p6 (A2)  t4 = p3*t8 (M1)  t7 = p7*o (M2)
// dout holds p4, p8, t4, t7 (esta_pkg::OUT_*). All arithmetic is modulo
// 2**WIDTH.
//
// ESTA reuses resources in the cycles where they are idle (dead intervals)
// to recompute the work of busy ones of the same type, and compares the two
// results. The adders are busy in every step, so an extra adder EA is added.
// EA repeats A1's operation in C1 and A2's in C2. M3 only works in C2; it
// repeats M2's operation in C1 and M1's in C3. S1 has no twin. S1 gets two
// LFSRs at its inputs in its free steps C2..C4, and a MISR on its output,
// checked once per test session of TEST_LEN patterns. Every resource is
// thus tested while the design does its normal work. No extra clock cycle is
// added, and one flag, error, reports a fault; err_src tells which check
// fired. Normal results never depend on the test logic.
//
// Interface: din is taken into the input registers when in_valid and in_ready
// are high. Results appear in dout with out_valid four cycles after the
// accepting edge. A new vector can be taken every four cycles.
//
// What follows the method: the resources, their binding, the four-step
// schedule and the test pairs. What is this design's choice: the register
// allocation (one register per intermediate value), the handshake, the word
// width, the LFSR/MISR polynomials and seeds, and the test-session length.
// A few operand edges of the example graph are not fully determined by the
// method's example; the operands used were chosen to agree with its operand
// multiplexer inputs.
module esta_top
  import esta_pkg::*;
#(
  parameter int unsigned WIDTH    = 16,
  parameter int unsigned TEST_LEN = 30,
  parameter logic [63:0] SEED1    = 64'hACE1,
  parameter logic [63:0] SEED2    = 64'h5EED
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [N_IN-1:0][WIDTH-1:0]   din,
  output logic                         out_valid,
  output logic [N_OUT-1:0][WIDTH-1:0]  dout,
  output logic                         error,
  output logic [N_ERR-1:0]             err_src
);
  typedef logic [WIDTH-1:0] word_t;

  ctrl_t  ctrl;
  state_e state;
  logic   in_load;
  logic   mism_add, mism_m1, mism_m2;

  // Input registers and the registers of the intermediate values.
  word_t [N_IN-1:0] x;
  word_t s1, p1, im0, im1, im2;     // written in C1
  word_t im3, im4, p6, t6, t8;      // written in C2
  word_t t3, p3, p7;                // written in C3

  // Resource operands and results.
  word_t a1_a, a1_b, a1_y, a2_a, a2_b, a2_y, ea_a, ea_b, ea_y;
  word_t m1_a, m1_b, m1_y, m2_a, m2_b, m2_y, m3_a, m3_b, m3_y;
  word_t s1_a, s1_b, s1_y, cmp_add_y;
  word_t lfsr1, lfsr2, misr_sig;

  esta_controller #(.WIDTH(WIDTH), .SEED1(SEED1), .SEED2(SEED2), .TEST_LEN(TEST_LEN)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .in_load, .out_valid, .ctrl, .state,
    .mism_add, .mism_m1, .mism_m2, .misr_sig, .error, .err_src
  );

  // ---------------- operand multiplexers ----------------
  esta_mux #(.WIDTH(WIDTH), .N(4)) u_mux_a1a (.d({x[IN_N], p6, x[IN_K], x[IN_C]}), .sel(ctrl.sel_a1), .y(a1_a));
  esta_mux #(.WIDTH(WIDTH), .N(4)) u_mux_a1b (.d({t3, t6, s1, x[IN_D]}),           .sel(ctrl.sel_a1), .y(a1_b));
  esta_mux #(.WIDTH(WIDTH), .N(4)) u_mux_a2a (.d({t3, t8, x[IN_L], x[IN_E]}),       .sel(ctrl.sel_a2), .y(a2_a));
  esta_mux #(.WIDTH(WIDTH), .N(4)) u_mux_a2b (.d({p6, x[IN_M], im0, x[IN_F]}),      .sel(ctrl.sel_a2), .y(a2_b));
  esta_mux #(.WIDTH(WIDTH), .N(4)) u_mux_m1a (.d({p3, im3, s1, x[IN_G]}),           .sel(ctrl.sel_m1), .y(m1_a));
  esta_mux #(.WIDTH(WIDTH), .N(4)) u_mux_m1b (.d({t8, im4, p1, x[IN_H]}),           .sel(ctrl.sel_m1), .y(m1_b));
  esta_mux #(.WIDTH(WIDTH), .N(3)) u_mux_m2a (.d({p7, im0, x[IN_I]}),               .sel(ctrl.sel_m2), .y(m2_a));
  esta_mux #(.WIDTH(WIDTH), .N(3)) u_mux_m2b (.d({x[IN_O], im1, x[IN_J]}),          .sel(ctrl.sel_m2), .y(m2_b));
  esta_mux #(.WIDTH(WIDTH), .N(3)) u_mux_m3a (.d({im3, x[IN_I], im1}),              .sel(ctrl.sel_m3), .y(m3_a));
  esta_mux #(.WIDTH(WIDTH), .N(3)) u_mux_m3b (.d({im4, x[IN_J], im2}),              .sel(ctrl.sel_m3), .y(m3_b));
  esta_mux #(.WIDTH(WIDTH), .N(2)) u_mux_eaa (.d({x[IN_L], x[IN_C]}),               .sel(ctrl.sel_ea), .y(ea_a));
  esta_mux #(.WIDTH(WIDTH), .N(2)) u_mux_eab (.d({im0, x[IN_D]}),                   .sel(ctrl.sel_ea), .y(ea_b));
  esta_mux #(.WIDTH(WIDTH), .N(2)) u_mux_s1a (.d({lfsr1, x[IN_A]}),                 .sel(ctrl.sel_s1), .y(s1_a));
  esta_mux #(.WIDTH(WIDTH), .N(2)) u_mux_s1b (.d({lfsr2, x[IN_B]}),                 .sel(ctrl.sel_s1), .y(s1_b));
  esta_mux #(.WIDTH(WIDTH), .N(2)) u_mux_cmp (.d({a2_y, a1_y}),                     .sel(ctrl.sel_cmp_add), .y(cmp_add_y));

  // ---------------- resources ----------------
  esta_adder      #(.WIDTH(WIDTH)) u_a1 (.a(a1_a), .b(a1_b), .y(a1_y));
  esta_adder      #(.WIDTH(WIDTH)) u_a2 (.a(a2_a), .b(a2_b), .y(a2_y));
  esta_adder      #(.WIDTH(WIDTH)) u_ea (.a(ea_a), .b(ea_b), .y(ea_y));
  esta_multiplier #(.WIDTH(WIDTH)) u_m1 (.a(m1_a), .b(m1_b), .y(m1_y));
  esta_multiplier #(.WIDTH(WIDTH)) u_m2 (.a(m2_a), .b(m2_b), .y(m2_y));
  esta_multiplier #(.WIDTH(WIDTH)) u_m3 (.a(m3_a), .b(m3_b), .y(m3_y));
  esta_subtractor #(.WIDTH(WIDTH)) u_s1 (.a(s1_a), .b(s1_b), .y(s1_y));

  // ---------------- online test logic ----------------
  esta_comparator #(.WIDTH(WIDTH)) u_chk_add (.en(ctrl.chk_add), .x(cmp_add_y), .y(ea_y), .mismatch(mism_add));
  esta_comparator #(.WIDTH(WIDTH)) u_chk_m1  (.en(ctrl.chk_m1),  .x(m1_y),      .y(m3_y), .mismatch(mism_m1));
  esta_comparator #(.WIDTH(WIDTH)) u_chk_m2  (.en(ctrl.chk_m2),  .x(m2_y),      .y(m3_y), .mismatch(mism_m2));

  esta_lfsr #(.WIDTH(WIDTH), .SEED(SEED1)) u_lfsr1 (
    .clk, .rst_n, .load(ctrl.bist_restart), .en(ctrl.bist_step), .q(lfsr1));
  esta_lfsr #(.WIDTH(WIDTH), .SEED(SEED2)) u_lfsr2 (
    .clk, .rst_n, .load(ctrl.bist_restart), .en(ctrl.bist_step), .q(lfsr2));
  esta_misr #(.WIDTH(WIDTH)) u_misr (
    .clk, .rst_n, .clear(ctrl.bist_restart), .en(ctrl.bist_step), .d(s1_y), .sig(misr_sig));

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x   <= '0;
      s1  <= '0; p1  <= '0; im0 <= '0; im1 <= '0; im2 <= '0;
      im3 <= '0; im4 <= '0; p6  <= '0; t6  <= '0; t8  <= '0;
      t3  <= '0; p3  <= '0; p7  <= '0;
      dout <= '0;
    end else begin
      if (in_load) x <= din;
      if (ctrl.ld_step[0]) begin
        s1 <= s1_y; p1 <= a1_y; im0 <= a2_y; im1 <= m1_y; im2 <= m2_y;
      end
      if (ctrl.ld_step[1]) begin
        im3 <= a1_y; im4 <= m1_y; p6 <= a2_y; t6 <= m2_y; t8 <= m3_y;
      end
      if (ctrl.ld_step[2]) begin
        t3 <= m1_y; p3 <= a1_y; p7 <= a2_y;
      end
      if (ctrl.ld_step[3]) begin
        dout[OUT_P4] <= a1_y; dout[OUT_P8] <= a2_y;
        dout[OUT_T4] <= m1_y; dout[OUT_T7] <= m2_y;
      end
      // Exactly the four control steps load datapath registers.
      a_step_matches_state: assert ((ctrl.ld_step != '0) == (state != ST_IDLE))
        else $error("esta_top: register loads outside a control step");
    end
  end
endmodule
