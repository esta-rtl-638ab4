// tb_esta_top: end-to-end testbench of the online-testable example datapath
// esta_top, at its default parameters.
//
// Phase 1, fault-free: random input vectors, with random idle gaps and
// back-to-back runs. Each result vector is compared with a model of the data
// flow graph written here. Each result must come exactly four clock edges
// after the edge that took its inputs. error must stay low through many
// S1 test sessions.
// Phase 2, injected faults: a stuck-at-1 bit is forced on the output of one
// resource at a time (A1, A2, EA, M1, M2, M3, S1). The design is then run
// until error rises. The flag bit that fires must belong to the check that
// covers that resource.
// The testbench counts each test mechanism of the design and fails if one
// never happened: EA checking A1, EA checking A2, M3 checking M2, M3 checking
// M1, LFSR patterns into S1, signature checks, back-to-back flows, idle
// cycles, and detection by each flag bit.
module tb_esta_top;
  import esta_pkg::*;

  localparam int unsigned WIDTH   = 16;
  localparam int unsigned N_FLOWS = 400;
  localparam int unsigned MAX_CYC = 200000;
  typedef logic [WIDTH-1:0] word_t;

  logic                        clk = 1'b0, rst_n = 1'b0;
  logic                        in_valid = 1'b0, in_ready, out_valid, error;
  logic [N_IN-1:0][WIDTH-1:0]  din = '0;
  logic [N_OUT-1:0][WIDTH-1:0] dout;
  logic [N_ERR-1:0]            err_src;
  int unsigned                 checks = 0, failures = 0;

  esta_top dut (.clk, .rst_n, .in_valid, .in_ready, .din, .out_valid, .dout, .error, .err_src);

  always #5 clk = ~clk;

  // Reference model of the data flow graph.
  function automatic logic [N_OUT-1:0][WIDTH-1:0] dfg(input logic [N_IN-1:0][WIDTH-1:0] v);
    word_t a = v[0], b = v[1], c = v[2], d = v[3], e = v[4], f = v[5], g = v[6], h = v[7];
    word_t i = v[8], j = v[9], k = v[10], l = v[11], m = v[12], n = v[13], o = v[14];
    word_t s1, p1, p5, t1, t5, p2, t2, p6, t6, t8, t3, p3, p7;
    logic [N_OUT-1:0][WIDTH-1:0] r;
    s1 = a - b;  p1 = c + d;  p5 = e + f;  t1 = g * h;  t5 = i * j;
    p2 = k + s1; t2 = s1 * p1; p6 = l + p5; t6 = p5 * t1; t8 = t1 * t5;
    t3 = p2 * t2; p3 = p6 + t6; p7 = t8 + m;
    r[0] = n + t3; r[1] = t3 + p6; r[2] = p3 * t8; r[3] = p7 * o;
    return r;
  endfunction

  // Mechanism counters.
  int unsigned n_ea_a1, n_ea_a2, n_m3_m2, n_m3_m1, n_s1_pat, n_sig_chk, n_b2b, n_idle;
  int unsigned n_detect [N_ERR];

  always @(posedge clk) if (rst_n) begin
    if (dut.ctrl.chk_add && !dut.ctrl.sel_cmp_add) n_ea_a1++;
    if (dut.ctrl.chk_add &&  dut.ctrl.sel_cmp_add) n_ea_a2++;
    if (dut.ctrl.chk_m2) n_m3_m2++;
    if (dut.ctrl.chk_m1) n_m3_m1++;
    if (dut.ctrl.bist_step) n_s1_pat++;
    if (dut.ctrl.bist_restart) n_sig_chk++;
    if (dut.state == ST_C4 && in_valid) n_b2b++;
    if (dut.state == ST_IDLE) n_idle++;
  end

  logic [N_OUT-1:0][WIDTH-1:0] exp_q [$];
  int unsigned                 acc_q [$];
  int unsigned                 cyc = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b0;
    exp_q.delete();
    acc_q.delete();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // One cycle at the negative edge: check the outputs of the last edge, then
  // drive the inputs of the next. compare = 0 skips result checks.
  task automatic cycle(input int unsigned busy_pct, input logic compare);
    logic [N_OUT-1:0][WIDTH-1:0] e;
    int unsigned a;
    @(negedge clk);
    cyc++;
    if (out_valid) begin
      chk(exp_q.size() > 0, "result without input");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        a = acc_q.pop_front();
        if (compare) begin
          chk(dout === e, $sformatf("dout %h expected %h", dout, e));
          chk(cyc - a == 5, $sformatf("latency %0d edges", cyc - a - 1));
        end
      end
    end
    in_valid = ($urandom % 100) < busy_pct;
    foreach (din[q]) din[q] = word_t'($urandom);
    #1;
    if (in_valid && in_ready) begin
      exp_q.push_back(dfg(din));
      acc_q.push_back(cyc);
    end
  endtask

  task automatic inject(input int which);
    case (which)
      0: force dut.u_a1.y = (dut.a1_a + dut.a1_b) | word_t'(16'h0008);
      1: force dut.u_a2.y = (dut.a2_a + dut.a2_b) | word_t'(16'h0100);
      2: force dut.u_ea.y = (dut.ea_a + dut.ea_b) | word_t'(16'h0002);
      3: force dut.u_m1.y = (dut.m1_a * dut.m1_b) | word_t'(16'h0040);
      4: force dut.u_m2.y = (dut.m2_a * dut.m2_b) | word_t'(16'h0004);
      5: force dut.u_m3.y = (dut.m3_a * dut.m3_b) | word_t'(16'h2000);
      default: force dut.u_s1.y = (dut.s1_a - dut.s1_b) | word_t'(16'h0010);
    endcase
  endtask

  task automatic remove(input int which);
    case (which)
      0: release dut.u_a1.y;
      1: release dut.u_a2.y;
      2: release dut.u_ea.y;
      3: release dut.u_m1.y;
      4: release dut.u_m2.y;
      5: release dut.u_m3.y;
      default: release dut.u_s1.y;
    endcase
  endtask

  initial begin
    int unsigned flows, waited;
    logic [N_ERR-1:0] expect_src;
    foreach (n_detect[q]) n_detect[q] = 0;
    {n_ea_a1, n_ea_a2, n_m3_m2, n_m3_m1, n_s1_pat, n_sig_chk, n_b2b, n_idle} = '0;
    do_reset();

    // Phase 1: fault-free operation.
    flows = 0;
    while (flows < N_FLOWS) begin
      cycle((flows % 100 < 50) ? 100 : 40, 1'b1);
      if (in_valid && in_ready) flows++;
      chk(!error, "error flag in a fault-free run");
    end
    repeat (8) cycle(0, 1'b1);
    chk(exp_q.size() == 0, "results missing at the end of phase 1");
    // Every adder and multiplier is checked exactly once per flow.
    chk(n_ea_a1 == N_FLOWS && n_ea_a2 == N_FLOWS, $sformatf("adder checks %0d/%0d per %0d flows", n_ea_a1, n_ea_a2, N_FLOWS));
    chk(n_m3_m1 == N_FLOWS && n_m3_m2 == N_FLOWS, $sformatf("multiplier checks %0d/%0d per %0d flows", n_m3_m1, n_m3_m2, N_FLOWS));
    // S1 gets one LFSR pattern in each of C2..C4, except in a signature-check cycle.
    chk(n_s1_pat <= 3 * N_FLOWS && n_s1_pat + n_sig_chk >= 3 * N_FLOWS,
        $sformatf("S1 patterns %0d for %0d flows", n_s1_pat, N_FLOWS));

    // Phase 2: one injected stuck-at-1 fault per resource.
    for (int f = 0; f <= 6; f++) begin
      do_reset();
      inject(f);
      waited = 0;
      while (!error && waited < 5000) begin
        cycle(80, 1'b0);
        waited++;
      end
      case (f)
        0, 1, 2: expect_src = 4'b0001 << ERR_ADD;
        3:       expect_src = 4'b0001 << ERR_M1;
        4:       expect_src = 4'b0001 << ERR_M2;
        5:       expect_src = (4'b0001 << ERR_M1) | (4'b0001 << ERR_M2);
        default: expect_src = 4'b0001 << ERR_S1;
      endcase
      chk(error, $sformatf("fault %0d not detected", f));
      chk(err_src != 0 && (err_src & ~expect_src) == 0,
          $sformatf("fault %0d flagged by %b", f, err_src));
      for (int q = 0; q < int'(N_ERR); q++) if (err_src[q]) n_detect[q]++;
      $display("fault %0d detected after %0d cycles, err_src=%b", f, waited, err_src);
      remove(f);
    end

    $display("count: ea_a1=%0d ea_a2=%0d m3_m2=%0d m3_m1=%0d s1_patterns=%0d sig_checks=%0d back_to_back=%0d idle=%0d",
             n_ea_a1, n_ea_a2, n_m3_m2, n_m3_m1, n_s1_pat, n_sig_chk, n_b2b, n_idle);
    $display("count: detections add=%0d m1=%0d m2=%0d s1=%0d",
             n_detect[ERR_ADD], n_detect[ERR_M1], n_detect[ERR_M2], n_detect[ERR_S1]);
    chk(n_ea_a1 > 0, "EA never checked A1");
    chk(n_ea_a2 > 0, "EA never checked A2");
    chk(n_m3_m2 > 0, "M3 never checked M2");
    chk(n_m3_m1 > 0, "M3 never checked M1");
    chk(n_s1_pat > 0, "S1 never got an LFSR pattern");
    chk(n_sig_chk > 0, "no MISR signature check");
    chk(n_b2b > 0, "no back-to-back flow");
    chk(n_idle > 0, "no idle cycle");
    foreach (n_detect[q]) chk(n_detect[q] > 0, $sformatf("flag bit %0d never fired", q));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
