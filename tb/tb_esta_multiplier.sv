// tb_esta_multiplier: self-checking testbench of the multiplier esta_multiplier.
//
// Applies corner operands (zero, one, all ones, top bit) and random operands
// at WIDTH = 16. Each result is compared with the same operation done in
// 64-bit arithmetic and cut to WIDTH bits. A watchdog ends the run after a
// fixed number of clock cycles.
module tb_esta_multiplier;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned N_RAND = 2000;

  logic             clk = 1'b0;
  logic [WIDTH-1:0] a, b, y;
  int unsigned      checks = 0, failures = 0;

  esta_multiplier #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  task automatic apply(input logic [WIDTH-1:0] va, input logic [WIDTH-1:0] vb);
    longint unsigned ref64;
    logic [WIDTH-1:0] expect_y;
    a = va;
    b = vb;
    @(posedge clk);
    ref64    = longint'(va) * longint'(vb);
    expect_y = ref64[WIDTH-1:0];
    checks++;
    if (y !== expect_y) begin
      failures++;
      $display("FAIL a=%h b=%h y=%h expected %h", va, vb, y, expect_y);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] corner [6];
    corner = '{'0, WIDTH'(1), '1, {1'b1, {(WIDTH-1){1'b0}}}, {1'b0, {(WIDTH-1){1'b1}}}, WIDTH'(16'h5A5A)};
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    repeat (N_RAND) apply(WIDTH'($urandom), WIDTH'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_RAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
