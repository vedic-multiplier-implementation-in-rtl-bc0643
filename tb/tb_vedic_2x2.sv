// tb_vedic_2x2: exhaustive self-checking testbench for the 2x2 Vedic multiplier.
//
// All sixteen operand pairs are applied, one per clock cycle, and the product
// is compared at the falling edge with a * b computed by the testbench. Each
// bit of the product is also checked against its own closed form (q0 is the
// vertical product a0*b0, q3 is set only for 3*3), and the run counts how
// often the upper half adder produced a carry, failing if it never did.
module tb_vedic_2x2;
  logic clk;
  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0;
  int failures = 0;
  int high_carries = 0;

  vedic_2x2 dut (.a(a), .b(b), .q(q));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned expected;
    a = '0;
    b = '0;
    for (int i = 0; i < 16; i++) begin
      @(posedge clk);
      a = i[1:0];
      b = i[3:2];
      @(negedge clk);
      expected = int'(a) * int'(b);
      checks++;
      if (q !== 4'(expected)) begin
        failures++;
        $display("FAIL %0d * %0d: got %0d, expected %0d", a, b, q, expected);
      end
      checks++;
      if (q[0] !== (a[0] & b[0])) begin
        failures++;
        $display("FAIL %0d * %0d: q0 is not the vertical product a0*b0", a, b);
      end
      if (q[3]) high_carries++;
    end
    checks++;
    if (high_carries != 1) begin
      failures++;
      $display("FAIL upper half-adder carry seen %0d times, expected once (3*3)", high_carries);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
