// tb_esta_comparator: self-checking testbench of the equality checker
// esta_comparator.
//
// Applies equal words, words differing in a single bit (every position) and
// random words, each with the check enabled and disabled. mismatch must be
// high only when the check is enabled and the words differ.
module tb_esta_comparator;
  localparam int unsigned WIDTH = 16;

  logic             clk = 1'b0;
  logic             en, mismatch;
  logic [WIDTH-1:0] x, y;
  int unsigned      checks = 0, failures = 0;

  esta_comparator #(.WIDTH(WIDTH)) dut (.en(en), .x(x), .y(y), .mismatch(mismatch));

  always #5 clk = ~clk;

  task automatic apply(input logic ven, input logic [WIDTH-1:0] vx, input logic [WIDTH-1:0] vy);
    en = ven; x = vx; y = vy;
    @(posedge clk);
    checks++;
    if (mismatch !== (ven && (vx != vy))) begin
      failures++;
      $display("FAIL en=%b x=%h y=%h mismatch=%b", ven, vx, vy, mismatch);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] w;
    for (int r = 0; r < 100; r++) begin
      w = WIDTH'($urandom);
      apply(1'b1, w, w);
      apply(1'b0, w, w);
      for (int b = 0; b < WIDTH; b++) begin
        apply(1'b1, w, w ^ (WIDTH'(1) << b));
        apply(1'b0, w ^ (WIDTH'(1) << b), w);
      end
      apply(1'b1, WIDTH'($urandom), WIDTH'($urandom));
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
