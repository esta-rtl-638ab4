// tb_esta_misr: self-checking testbench of the signature register esta_misr.
//
// A model in the testbench (right-shifting Galois step with mask 0xB400, then
// XOR of the input word) follows the MISR through random enable and data
// sequences and through clear. It also checks that a single flipped input
// bit in a sequence changes the final signature.
module tb_esta_misr;
  localparam int unsigned WIDTH = 16;
  localparam logic [15:0] MASK  = 16'hB400;

  logic             clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic [WIDTH-1:0] d = '0, sig, model;
  int unsigned      checks = 0, failures = 0;

  esta_misr #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .clear, .en, .d, .sig);

  always #5 clk = ~clk;

  function automatic logic [15:0] step(input logic [15:0] s, input logic [15:0] x);
    return (s[0] ? ((s >> 1) ^ MASK) : (s >> 1)) ^ x;
  endfunction

  task automatic check(input string what);
    checks++;
    if (sig !== model) begin
      failures++;
      $display("FAIL %s sig=%h expected %h", what, sig, model);
    end
  endtask

  initial begin
    logic [15:0] seq [32];
    logic [15:0] good;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    model = '0;
    @(negedge clk) check("reset");
    for (int n = 0; n < 3000; n++) begin
      en = 1'($urandom);
      clear = ($urandom % 50) == 0;
      d = 16'($urandom);
      @(negedge clk);
      if (clear) model = '0;
      else if (en) model = step(model, d);
      check("random");
    end
    // A corrupted word must change the signature of a 32-word session.
    for (int r = 0; r < 20; r++) begin
      foreach (seq[i]) seq[i] = 16'($urandom);
      for (int pass = 0; pass < 2; pass++) begin
        clear = 1'b1; en = 1'b0;
        @(negedge clk);
        clear = 1'b0; en = 1'b1;
        foreach (seq[i]) begin
          d = seq[i];
          if (pass == 1 && i == (r % 32)) d = d ^ (16'd1 << (r % 16));
          @(negedge clk);
        end
        en = 1'b0;
        if (pass == 0) good = sig;
      end
      checks++;
      if (sig == good) begin
        failures++;
        $display("FAIL flipped word left the signature unchanged");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
