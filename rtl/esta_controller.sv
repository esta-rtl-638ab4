// esta_controller: the modified controller of the ESTA example datapath.
//
// The controller steps each flow through the four control steps C1..C4 of
// the scheduled data flow graph. In each step it sets the operand
// multiplexers and register loads for the normal operations, and the extra
// selects and check enables that ESTA adds. The online tests it schedules
// are:
//   C1  EA recomputes A1's c+d; M3, which is free, recomputes M2's i*j.
//   C2  EA recomputes A2's l+im0. S1 is free and gets one LFSR pattern.
//   C3  M3, which is free, recomputes M1's im3*im4. S1 gets one LFSR pattern.
//   C4  S1 gets one LFSR pattern.
// Every adder and multiplier is thus checked once per flow, on the flow's
// own operands. The equality checkers report a mismatch in the same cycle.
//
// S1 is checked by test sessions instead. A session is TEST_LEN LFSR
// patterns long, collected over consecutive flows. In the cycle after the
// last pattern (chk_pending), the MISR is compared with GOLDEN, the
// signature a fault-free S1 gives. In that same cycle the LFSRs are reseeded
// and the MISR cleared. An S1 dead cycle that falls on it is skipped.
//
// Any mismatch sets its bit in the sticky err_src, and error is their OR.
// Only reset clears them.
//
// Interface and timing: a vector is accepted (in_load) when in_valid and
// in_ready are both high. in_ready is high in ST_IDLE and in ST_C4, so flows
// can follow each other back to back, one every four cycles. out_valid is
// high for the one cycle after C4, while the results are in the output
// registers. The schedule and the test pairs follow the method's example;
// the handshake, the session scheme and the sticky flag are this design's
// own choices.
module esta_controller
  import esta_pkg::*;
#(
  parameter int unsigned WIDTH    = 16,
  parameter logic [63:0] SEED1    = 64'hACE1,
  parameter logic [63:0] SEED2    = 64'h5EED,
  parameter int unsigned TEST_LEN = 30
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  output logic             in_load,
  output logic             out_valid,
  output ctrl_t            ctrl,
  output state_e           state,
  input  logic             mism_add,
  input  logic             mism_m1,
  input  logic             mism_m2,
  input  logic [WIDTH-1:0] misr_sig,
  output logic             error,
  output logic [N_ERR-1:0] err_src
);
  localparam logic [WIDTH-1:0] GOLDEN =
    WIDTH'(golden_signature(SEED1, SEED2, WIDTH, TEST_LEN));
  localparam int unsigned CNTW = (TEST_LEN > 1) ? $clog2(TEST_LEN) : 1;

  state_e          state_n;
  logic [CNTW-1:0] pat_cnt;
  logic            chk_pending;
  logic            sig_bad;

  // Control step sequencing.
  always_comb begin
    in_ready = (state == ST_IDLE) || (state == ST_C4);
    in_load  = in_valid && in_ready;
    unique case (state)
      ST_IDLE: state_n = in_valid ? ST_C1 : ST_IDLE;
      ST_C1:   state_n = ST_C2;
      ST_C2:   state_n = ST_C3;
      ST_C3:   state_n = ST_C4;
      ST_C4:   state_n = in_valid ? ST_C1 : ST_IDLE;
      default: state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      out_valid <= 1'b0;
    end else begin
      state     <= state_n;
      out_valid <= (state == ST_C4);
      // M3 can check only one multiplier at a time; a vector is only taken when ready.
      a_one_m3_check: assert (!(ctrl.chk_m1 && ctrl.chk_m2))
        else $error("esta_controller: M3 asked to check M1 and M2 at once");
      a_load_ready: assert (!in_load || in_ready)
        else $error("esta_controller: vector taken while not ready");
    end
  end

  // Control word of each step: normal operation plus the ESTA test schedule.
  always_comb begin
    ctrl = '0;
    ctrl.bist_restart = chk_pending;
    unique case (state)
      ST_C1: begin
        ctrl.sel_a1 = 2'd0; ctrl.sel_a2 = 2'd0;     // +1 (c,d)    +5 (e,f)
        ctrl.sel_m1 = 2'd0; ctrl.sel_m2 = 2'd0;     // *1 (g,h)    *5 (i,j)
        ctrl.sel_m3 = 2'd1;                         // M3 repeats *5
        ctrl.sel_ea = 1'b0; ctrl.sel_cmp_add = 1'b0;// EA repeats +1
        ctrl.sel_s1 = 1'b0;                         // -1 (a,b)
        ctrl.chk_add = 1'b1; ctrl.chk_m2 = 1'b1;
        ctrl.ld_step = 4'b0001;
      end
      ST_C2: begin
        ctrl.sel_a1 = 2'd1; ctrl.sel_a2 = 2'd1;     // +2 (k,s1)   +6 (l,im0)
        ctrl.sel_m1 = 2'd1; ctrl.sel_m2 = 2'd1;     // *2 (s1,p1)  *6 (im0,im1)
        ctrl.sel_m3 = 2'd0;                         // *8 (im1,im2)
        ctrl.sel_ea = 1'b1; ctrl.sel_cmp_add = 1'b1;// EA repeats +6
        ctrl.sel_s1 = 1'b1;
        ctrl.chk_add = 1'b1;
        ctrl.bist_step = !chk_pending;
        ctrl.ld_step = 4'b0010;
      end
      ST_C3: begin
        ctrl.sel_a1 = 2'd2; ctrl.sel_a2 = 2'd2;     // +3 (p6,t6)  +7 (t8,m)
        ctrl.sel_m1 = 2'd2;                         // *3 (im3,im4)
        ctrl.sel_m3 = 2'd2;                         // M3 repeats *3
        ctrl.sel_s1 = 1'b1;
        ctrl.chk_m1 = 1'b1;
        ctrl.bist_step = !chk_pending;
        ctrl.ld_step = 4'b0100;
      end
      ST_C4: begin
        ctrl.sel_a1 = 2'd3; ctrl.sel_a2 = 2'd3;     // +4 (n,t3)   +8 (t3,p6)
        ctrl.sel_m1 = 2'd3; ctrl.sel_m2 = 2'd2;     // *4 (p3,t8)  *7 (p7,o)
        ctrl.sel_s1 = 1'b1;
        ctrl.bist_step = !chk_pending;
        ctrl.ld_step = 4'b1000;
      end
      default: ;
    endcase
  end

  // S1 test sessions.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pat_cnt     <= '0;
      chk_pending <= 1'b0;
    end else if (chk_pending) begin
      chk_pending <= 1'b0;
      pat_cnt     <= '0;
    end else if (ctrl.bist_step) begin
      if (pat_cnt == CNTW'(TEST_LEN - 1)) begin
        chk_pending <= 1'b1;
        pat_cnt     <= '0;
      end else begin
        pat_cnt <= pat_cnt + 1'b1;
      end
    end
  end

  assign sig_bad = chk_pending && (misr_sig != GOLDEN);

  // Sticky error flag.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_src <= '0;
    else begin
      if (mism_add) err_src[ERR_ADD] <= 1'b1;
      if (mism_m1)  err_src[ERR_M1]  <= 1'b1;
      if (mism_m2)  err_src[ERR_M2]  <= 1'b1;
      if (sig_bad)  err_src[ERR_S1]  <= 1'b1;
    end
  end
  assign error = |err_src;

  // M3 can check only one multiplier at a time; a vector is only taken when ready.
  initial assert (TEST_LEN >= 1) else $error("esta_controller: TEST_LEN must be at least 1");
endmodule
