// tb_adder: self-checking testbench for the W-bit adder.
//
// Two instances are tested, at the 6-bit and 4-bit widths the 4x4 multiplier
// uses. Both are run exhaustively over all operand pairs (4096 and 256 per
// instance), one pair per clock cycle, and the sums are compared at the falling
// edge with (x + y) mod 2^W computed in the testbench. Pairs whose sum wraps
// are counted and must occur.
module tb_adder;
  logic clk;
  logic [5:0] x6, y6, s6;
  logic [3:0] x4, y4, s4;
  int checks = 0;
  int failures = 0;
  int wraps = 0;

  adder #(.W(6)) dut6 (.x(x6), .y(y6), .s(s6));
  adder #(.W(4)) dut4 (.x(x4), .y(y4), .s(s4));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned full;
    x6 = '0; y6 = '0; x4 = '0; y4 = '0;
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk);
      x6 = i[5:0];
      y6 = i[11:6];
      x4 = i[3:0];
      y4 = i[7:4];
      @(negedge clk);
      full = int'(x6) + int'(y6);
      checks++;
      if (s6 !== 6'(full % 64)) begin
        failures++;
        $display("FAIL W=6 %0d + %0d: got %0d", x6, y6, s6);
      end
      if (full >= 64) wraps++;
      if (i < 256) begin
        full = int'(x4) + int'(y4);
        checks++;
        if (s4 !== 4'(full % 16)) begin
          failures++;
          $display("FAIL W=4 %0d + %0d: got %0d", x4, y4, s4);
        end
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL no wrapping sum was applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
