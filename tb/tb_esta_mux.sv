// tb_esta_mux: self-checking testbench of the operand multiplexer esta_mux.
//
// Drives a 4-input and a 3-input instance with random words and every select
// value. The expected output is picked from the input array by the
// testbench; a select past the last input must give input 0.
module tb_esta_mux;
  localparam int unsigned WIDTH = 16;

  logic                   clk = 1'b0;
  logic [3:0][WIDTH-1:0]  d4;
  logic [2:0][WIDTH-1:0]  d3;
  logic [1:0]             s4, s3;
  logic [WIDTH-1:0]       y4, y3;
  int unsigned            checks = 0, failures = 0;

  esta_mux #(.WIDTH(WIDTH), .N(4)) dut4 (.d(d4), .sel(s4), .y(y4));
  esta_mux #(.WIDTH(WIDTH), .N(3)) dut3 (.d(d3), .sel(s3), .y(y3));

  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int s = 0; s < 4; s++) begin
        foreach (d4[i]) d4[i] = WIDTH'($urandom);
        foreach (d3[i]) d3[i] = WIDTH'($urandom);
        s4 = 2'(s);
        s3 = 2'(s);
        @(posedge clk);
        checks++;
        if (y4 !== d4[s]) begin
          failures++;
          $display("FAIL N=4 sel=%0d y=%h expected %h", s, y4, d4[s]);
        end
        checks++;
        if (y3 !== ((s < 3) ? d3[s] : d3[0])) begin
          failures++;
          $display("FAIL N=3 sel=%0d y=%h", s, y3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
