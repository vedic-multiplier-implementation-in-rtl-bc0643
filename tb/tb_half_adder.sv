// tb_half_adder: exhaustive self-checking testbench for the half adder.
//
// All four input pairs are applied, one per clock cycle; sum and carry are
// compared at the falling edge with the arithmetic sum x + y worked out in the
// testbench. A watchdog ends the run with a failure if it has not finished
// after a fixed number of cycles.
module tb_half_adder;
  logic clk;
  logic x, y, s, c;
  int checks = 0;
  int failures = 0;

  half_adder dut (.x(x), .y(y), .s(s), .c(c));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [1:0] expected;
    x = 1'b0;
    y = 1'b0;
    for (int i = 0; i < 4; i++) begin
      @(posedge clk);
      x = i[0];
      y = i[1];
      @(negedge clk);
      expected = 2'(int'(i[0]) + int'(i[1]));
      checks++;
      if ({c, s} !== expected) begin
        failures++;
        $display("FAIL x=%0d y=%0d: got c=%0d s=%0d, expected %0d", x, y, c, s, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
