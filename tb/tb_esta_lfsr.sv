// tb_esta_lfsr: self-checking testbench of the pattern generator esta_lfsr.
//
// At WIDTH = 16 the LFSR must follow a right-shifting Galois register with
// feedback mask 0xB400 (x^16 + x^14 + x^13 + x^11 + 1), modelled here on its
// own. The testbench checks the reset value, holding while en is low, every
// step of a full period, the period of 65535 steps (the register is back at
// the seed then and not before), and reseeding by load.
module tb_esta_lfsr;
  localparam int unsigned WIDTH = 16;
  localparam logic [63:0] SEED  = 64'hACE1;
  localparam logic [15:0] MASK  = 16'hB400;

  logic             clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [WIDTH-1:0] q, model;
  int unsigned      checks = 0, failures = 0;

  esta_lfsr #(.WIDTH(WIDTH), .SEED(SEED)) dut (.clk, .rst_n, .load, .en, .q);

  always #5 clk = ~clk;

  function automatic logic [15:0] step(input logic [15:0] s);
    return s[0] ? ((s >> 1) ^ MASK) : (s >> 1);
  endfunction

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s q=%h expected %h", what, q, model);
    end
  endtask

  initial begin
    int unsigned first_return;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    model = SEED[15:0];
    @(negedge clk) check("reset");
    repeat (5) begin
      @(negedge clk) check("hold");
    end
    en = 1'b1;
    first_return = 0;
    for (int unsigned n = 1; n <= 65535; n++) begin
      @(negedge clk);
      model = step(model);
      check("step");
      if (first_return == 0 && q == SEED[15:0]) first_return = n;
    end
    checks++;
    if (first_return != 65535) begin
      failures++;
      $display("FAIL period %0d", first_return);
    end
    repeat (7) begin
      @(negedge clk);
      model = step(model);
    end
    check("steps after period");
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    en = 1'b0;
    model = SEED[15:0];
    check("load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
