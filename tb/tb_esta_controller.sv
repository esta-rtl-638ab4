// tb_esta_controller: self-checking testbench of the modified controller
// esta_controller.
//
// A model in the testbench tracks the control step from in_valid, counts the
// S1 test patterns, and knows when a session ends. Every cycle it compares
// the step, in_ready, out_valid and the whole control word with the expected
// schedule:
//   C1 operand set 0 everywhere, M3 on (i,j), EA on (c,d) vs A1, checks ADD and M2
//   C2 operand set 1, M3 on (im1,im2), EA on (l,im0) vs A2, check ADD, S1 pattern
//   C3 operand set 2, M3 on (im3,im4), check M1, S1 pattern
//   C4 operand set 3 (M2 set 2), S1 pattern
// The fault-free MISR signature is computed here on its own (Galois mask
// 0xB400, as the LFSRs). The testbench feeds it, or a wrong value, as
// misr_sig. It also pulses the mismatch inputs, and checks the sticky
// err_src bits and error.
module tb_esta_controller;
  import esta_pkg::*;

  localparam int unsigned WIDTH    = 16;
  localparam int unsigned TEST_LEN = 30;
  localparam logic [15:0] SEED1    = 16'hACE1;
  localparam logic [15:0] SEED2    = 16'h5EED;
  localparam logic [15:0] MASK     = 16'hB400;
  localparam int unsigned N_CYC    = 2000;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             in_valid = 1'b0, in_ready, in_load, out_valid;
  ctrl_t            ctrl;
  state_e           state;
  logic             mism_add = 1'b0, mism_m1 = 1'b0, mism_m2 = 1'b0;
  logic [WIDTH-1:0] misr_sig;
  logic             error;
  logic [N_ERR-1:0] err_src;
  int unsigned      checks = 0, failures = 0;

  esta_controller #(.WIDTH(WIDTH), .TEST_LEN(TEST_LEN)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_load, .out_valid, .ctrl, .state,
    .mism_add, .mism_m1, .mism_m2, .misr_sig, .error, .err_src
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] lstep(input logic [15:0] s);
    return s[0] ? ((s >> 1) ^ MASK) : (s >> 1);
  endfunction

  function automatic logic [15:0] golden();
    logic [15:0] l1 = SEED1, l2 = SEED2, sig = '0;
    for (int p = 0; p < int'(TEST_LEN); p++) begin
      sig = lstep(sig) ^ (l1 - l2);
      l1 = lstep(l1);
      l2 = lstep(l2);
    end
    return sig;
  endfunction

  function automatic ctrl_t expect_ctrl(input int step, input logic pending);
    ctrl_t c = '0;
    c.bist_restart = pending;
    case (step)
      1: begin c.sel_m3 = 2'd1; c.chk_add = 1; c.chk_m2 = 1; c.ld_step = 4'b0001; end
      2: begin
        c.sel_a1 = 2'd1; c.sel_a2 = 2'd1; c.sel_m1 = 2'd1; c.sel_m2 = 2'd1; c.sel_m3 = 2'd0;
        c.sel_ea = 1; c.sel_cmp_add = 1; c.sel_s1 = 1; c.chk_add = 1;
        c.bist_step = !pending; c.ld_step = 4'b0010;
      end
      3: begin
        c.sel_a1 = 2'd2; c.sel_a2 = 2'd2; c.sel_m1 = 2'd2; c.sel_m3 = 2'd2;
        c.sel_s1 = 1; c.chk_m1 = 1; c.bist_step = !pending; c.ld_step = 4'b0100;
      end
      4: begin
        c.sel_a1 = 2'd3; c.sel_a2 = 2'd3; c.sel_m1 = 2'd3; c.sel_m2 = 2'd2;
        c.sel_s1 = 1; c.bist_step = !pending; c.ld_step = 4'b1000;
      end
      default: ;
    endcase
    return c;
  endfunction

  int          step_m;        // expected control step, 0 = idle
  logic        pending_m;     // expected end-of-session check
  int          pat_m;         // expected pattern count
  logic        out_valid_m;
  logic [3:0]  err_m;
  int          sessions, bad_sessions, flows, mism_pulses;
  logic [15:0] gold;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle step=%0d: %s", step_m, what);
    end
  endtask

  initial begin
    ctrl_t exp_c;
    logic  bad_sig, nxt_pending;
    gold = golden();
    misr_sig = gold;
    step_m = 0; pending_m = 0; pat_m = 0; out_valid_m = 0; err_m = '0;
    sessions = 0; bad_sessions = 0; flows = 0; mism_pulses = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < int'(N_CYC); cyc++) begin
      // Drive inputs for this cycle (after the negative edge).
      in_valid = ($urandom % 4) != 0;
      bad_sig  = pending_m && (sessions % 3 == 2);
      misr_sig = bad_sig ? (gold ^ 16'h0100) : gold;
      mism_add = 1'b0; mism_m1 = 1'b0; mism_m2 = 1'b0;
      if (cyc == 700)  begin mism_add = 1'b1; mism_pulses++; end
      if (cyc == 1100) begin mism_m1  = 1'b1; mism_pulses++; end
      if (cyc == 1500) begin mism_m2  = 1'b1; mism_pulses++; end
      #1;
      // Compare with the model.
      exp_c = expect_ctrl(step_m, pending_m);
      chk(int'(state) == step_m, $sformatf("state %0d", state));
      chk(ctrl === exp_c, $sformatf("ctrl %h expected %h", ctrl, exp_c));
      chk(in_ready === (step_m == 0 || step_m == 4), "in_ready");
      chk(in_load === (in_valid && (step_m == 0 || step_m == 4)), "in_load");
      chk(out_valid === out_valid_m, "out_valid");
      chk(err_src === err_m, $sformatf("err_src %b expected %b", err_src, err_m));
      chk(error === (err_m != 0), "error");
      // Advance the model to the next edge.
      err_m = err_m | {bad_sig, mism_m2, mism_m1, mism_add};
      if (bad_sig) bad_sessions++;
      nxt_pending = 1'b0;
      if (pending_m) begin
        pat_m = 0;
        sessions++;
      end else if (step_m >= 2) begin
        if (pat_m == int'(TEST_LEN) - 1) begin
          pat_m = 0;
          nxt_pending = 1'b1;
        end else pat_m++;
      end
      pending_m   = nxt_pending;
      out_valid_m = (step_m == 4);
      if (step_m == 4) flows++;
      case (step_m)
        0, 4:    step_m = in_valid ? 1 : 0;
        default: step_m = step_m + 1;
      endcase
      @(negedge clk);
    end
    chk(sessions >= 6, "too few test sessions");
    chk(bad_sessions >= 2, "no bad signature was exercised");
    chk(mism_pulses == 3, "mismatch pulses");
    $display("flows=%0d sessions=%0d bad_sessions=%0d", flows, sessions, bad_sessions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_CYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
