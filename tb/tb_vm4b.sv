// tb_vm4b: end-to-end self-checking testbench for the 4x4 Vedic multiplier,
// run with the multiplier at its default (and only) configuration.
//
// First a directed vector gives the product 0x0F that the reference simulation
// of this design shows on its hex display (3 * 5). Then all 256 operand pairs
// are applied, one per clock cycle, and the 8-bit product is compared at the
// falling edge with a * b computed by the testbench.
//
// The multiplier is combinational, so the product must already be correct half
// a cycle after the operands change; there is no latency to count.
//
// Each mechanism of the architecture is counted and must occur at least once:
//   - the carry of the upper half adder inside each of the four 2x2 blocks
//     (its operand halves are both 3),
//   - a partial product q0 whose upper bits q0[3:2] are non-zero and so feed
//     the second adder,
//   - a sum of the weight-4 terms (q3*4 + q2 + q1 + q0[3:2]) that carries into
//     product bit 6 or higher, i.e. the adder tree carries across the 2x2 boundary,
//   - a product with bit 7 set (the largest products).
// A watchdog ends the run with a failure after a fixed number of cycles.
module tb_vm4b;
  logic clk;
  logic [3:0] a, b;
  logic [7:0] y;
  int checks = 0;
  int failures = 0;
  int carry_hh = 0, carry_lh = 0, carry_hl = 0, carry_ll = 0;
  int q0_upper_used = 0;
  int tree_carry = 0;
  int top_bit = 0;

  vm4b dut (.a(a), .b(b), .y(y));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_product(input logic [3:0] ta, input logic [3:0] tb);
    int unsigned expected;
    @(posedge clk);
    a = ta;
    b = tb;
    @(negedge clk);
    expected = int'(ta) * int'(tb);
    checks++;
    if (y !== 8'(expected)) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d, expected %0d", ta, tb, y, expected);
    end
  endtask

  task automatic count_mechanisms(input logic [3:0] ta, input logic [3:0] tb);
    int unsigned p_hh, p_lh, p_hl, p_ll, weight4;
    p_hh = int'(ta[3:2]) * int'(tb[3:2]);
    p_lh = int'(ta[1:0]) * int'(tb[3:2]);
    p_hl = int'(ta[3:2]) * int'(tb[1:0]);
    p_ll = int'(ta[1:0]) * int'(tb[1:0]);
    if (p_hh == 9) carry_hh++;
    if (p_lh == 9) carry_lh++;
    if (p_hl == 9) carry_hl++;
    if (p_ll == 9) carry_ll++;
    if ((p_ll >> 2) != 0) q0_upper_used++;
    weight4 = p_hh * 4 + p_lh + p_hl + (p_ll >> 2);
    if (weight4 >= 16) tree_carry++;
    if (int'(ta) * int'(tb) >= 128) top_bit++;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("mechanism %s: %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin : stimulus
    a = '0;
    b = '0;

    // Directed: the displayed reference product 0x0F.
    check_product(4'd3, 4'd5);
    checks++;
    if (y !== 8'h0F) begin
      failures++;
      $display("FAIL reference product: got %h, expected 0F", y);
    end

    // Exhaustive sweep.
    for (int i = 0; i < 256; i++) begin
      check_product(i[3:0], i[7:4]);
      count_mechanisms(i[3:0], i[7:4]);
    end

    require("2x2 high*high half-adder carry", carry_hh);
    require("2x2 low*high half-adder carry", carry_lh);
    require("2x2 high*low half-adder carry", carry_hl);
    require("2x2 low*low half-adder carry", carry_ll);
    require("q0[3:2] into second adder", q0_upper_used);
    require("adder-tree carry past bit 5", tree_carry);
    require("product bit 7 set", top_bit);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
