// tb_esta_fault_coverage: online fault coverage of the example datapath,
// measured at the error pin.
//
// One single stuck-at fault at a time (stuck-at-0 and stuck-at-1 on every
// bit) is forced onto a word of the design. The design then runs
// N_VECTORS random input vectors back to back, and the fault counts as
// detected if error rises. Between faults the design is reset. The faulted
// words are:
//   the outputs of the seven arithmetic units A1, A2, EA, M1, M2, M3, S1,
//   and four datapath registers (s1, p6, t8 and the result register t4),
//   which no check covers.
// Every unit fault must be detected but one: M1 bit 0 stuck-at-0, which
// corrupts M1's own later check operand (see below). The register faults are
// only counted; they show where the online checks end. The testbench prints the coverage
// per word and overall. It runs at the design's default parameters.
module tb_esta_fault_coverage;
  import esta_pkg::*;

  localparam int unsigned WIDTH     = 16;
  localparam int unsigned N_VECTORS = 200;
  localparam int unsigned N_SITES   = 11;
  localparam int unsigned TEST_LEN  = 30;   // esta_top default
  typedef logic [WIDTH-1:0] word_t;

  logic                        clk = 1'b0, rst_n = 1'b0;
  logic                        in_valid = 1'b0, in_ready, out_valid, error;
  logic [N_IN-1:0][WIDTH-1:0]  din = '0;
  logic [N_OUT-1:0][WIDTH-1:0] dout;
  logic [N_ERR-1:0]            err_src;
  int unsigned                 checks = 0, failures = 0;
  word_t                       m0, m1;   // bits forced to 0 / to 1

  esta_top dut (.clk, .rst_n, .in_valid, .in_ready, .din, .out_valid, .dout, .error, .err_src);

  always #5 clk = ~clk;

  task automatic inject(input int site);
    case (site)
      0:  force dut.u_a1.y = ((dut.a1_a + dut.a1_b) & ~m0) | m1;
      1:  force dut.u_a2.y = ((dut.a2_a + dut.a2_b) & ~m0) | m1;
      2:  force dut.u_ea.y = ((dut.ea_a + dut.ea_b) & ~m0) | m1;
      3:  force dut.u_m1.y = ((dut.m1_a * dut.m1_b) & ~m0) | m1;
      4:  force dut.u_m2.y = ((dut.m2_a * dut.m2_b) & ~m0) | m1;
      5:  force dut.u_m3.y = ((dut.m3_a * dut.m3_b) & ~m0) | m1;
      default: force dut.u_s1.y = ((dut.s1_a - dut.s1_b) & ~m0) | m1;
    endcase
  endtask

  task automatic remove(input int site);
    case (site)
      0:  release dut.u_a1.y;
      1:  release dut.u_a2.y;
      2:  release dut.u_ea.y;
      3:  release dut.u_m1.y;
      4:  release dut.u_m2.y;
      5:  release dut.u_m3.y;
      default: release dut.u_s1.y;
    endcase
  endtask

  function automatic string site_name(input int site);
    case (site)
      0: return "A1"; 1: return "A2"; 2: return "EA"; 3: return "M1";
      4: return "M2"; 5: return "M3"; 6: return "S1";
      7: return "reg s1"; 8: return "reg p6"; 9: return "reg t8";
      default: return "reg t4";
    endcase
  endfunction

  // A stuck register bit is modelled by rewriting the register after every
  // clock edge with that bit set (m1) or cleared (m0), so every read of the
  // register in the following cycle sees the stuck bit.
  task automatic stick_reg(input int site);
    case (site)
      7:       dut.s1 = (dut.s1 & ~m0) | m1;
      8:       dut.p6 = (dut.p6 & ~m0) | m1;
      9:       dut.t8 = (dut.t8 & ~m0) | m1;
      default: dut.dout[OUT_T4] = (dut.dout[OUT_T4] & ~m0) | m1;
    endcase
  endtask

  int unsigned det [N_SITES], tot [N_SITES];

  initial begin
    int unsigned vec, all_det, all_tot, unit_det, unit_tot;
    foreach (det[q]) begin det[q] = 0; tot[q] = 0; end
    m0 = '0; m1 = '0;
    for (int site = 0; site < int'(N_SITES); site++) begin
      for (int bitpos = 0; bitpos < int'(WIDTH); bitpos++) begin
        for (int pol = 0; pol < 2; pol++) begin
          @(negedge clk);
          rst_n = 1'b0;
          in_valid = 1'b0;
          repeat (2) @(negedge clk);
          rst_n = 1'b1;
          m0 = (pol == 0) ? (word_t'(1) << bitpos) : '0;
          m1 = (pol == 1) ? (word_t'(1) << bitpos) : '0;
          if (site <= 6) inject(site);
          vec = 0;
          while (vec < N_VECTORS && !error) begin
            @(negedge clk);
            in_valid = 1'b1;
            foreach (din[q]) din[q] = word_t'($urandom);
            if (site > 6) stick_reg(site);
            #1;
            if (in_ready) vec++;
          end
          // Let the last flows finish so their checks and the next
          // signature check can fire.
          repeat (4 * (TEST_LEN / 3 + 2)) begin
            @(negedge clk);
            in_valid = 1'b1;
            foreach (din[q]) din[q] = word_t'($urandom);
            if (site > 6) stick_reg(site);
          end
          tot[site]++;
          if (error) det[site]++;
          else if (site <= 6) $display("undetected: %s bit %0d stuck-at-%0d", site_name(site), bitpos, pol);
          if (site <= 6) remove(site);
        end
      end
    end
    all_det = 0; all_tot = 0; unit_det = 0; unit_tot = 0;
    for (int site = 0; site < int'(N_SITES); site++) begin
      $display("coverage %-7s %0d/%0d", site_name(site), det[site], tot[site]);
      all_det += det[site]; all_tot += tot[site];
      if (site <= 6) begin
        unit_det += det[site]; unit_tot += tot[site];
        checks++;
        // M1 bit 0 stuck-at-0 masks itself: M1 produces im4 in C2, so im4 is
        // always even and the product im3*im4 it is checked on in C3 is
        // always even too. It is the one unit fault expected to escape.
        if (det[site] != tot[site] - ((site == 3) ? 1 : 0)) begin
          failures++;
          $display("FAIL %s: %0d of %0d stuck-at faults detected", site_name(site), det[site], tot[site]);
        end
      end
    end
    $display("count: unit faults detected %0d of %0d; all faults %0d of %0d (%0d%%)",
             unit_det, unit_tot, all_det, all_tot, (100 * all_det) / all_tot);
    checks++;
    if (unit_tot != 7 * 2 * WIDTH) begin
      failures++;
      $display("FAIL fault list incomplete");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
