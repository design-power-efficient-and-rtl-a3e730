// tb_comp74: exhaustive self-checking test of the 7:4 compressor. For all 512 combinations of
// x[7:1], cin1 and cin2 it checks x1+...+x7+cin1+cin2 = sum + 2*(carry + cout1) + 4*cout2.
// It also counts how often each output was 1, and fails if any output never was. A watchdog
// ends the run with a failure after 2000 cycles.
module tb_comp74;
  logic clk = 1'b0;
  logic [7:1] x;
  logic cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;
  int n_sum = 0, n_carry = 0, n_cout1 = 0, n_cout2 = 0;

  comp74 dut (.x(x), .cin1(cin1), .cin2(cin2),
              .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int expect_total, got_total;
      @(negedge clk);
      {x, cin1, cin2} = 9'(v);
      @(posedge clk);
      expect_total = $countones(x) + int'(cin1) + int'(cin2);
      got_total    = int'(sum) + 2 * (int'(carry) + int'(cout1)) + 4 * int'(cout2);
      checks++;
      if (got_total != expect_total) begin
        failures++;
        $display("FAIL x=%b cin1=%0b cin2=%0b -> sum=%0b carry=%0b cout1=%0b cout2=%0b",
                 x, cin1, cin2, sum, carry, cout1, cout2);
      end
      n_sum   += int'(sum);
      n_carry += int'(carry);
      n_cout1 += int'(cout1);
      n_cout2 += int'(cout2);
    end
    checks++;
    if (n_sum == 0 || n_carry == 0 || n_cout1 == 0 || n_cout2 == 0) begin
      failures++;
      $display("FAIL an output never toggled: sum=%0d carry=%0d cout1=%0d cout2=%0d",
               n_sum, n_carry, n_cout1, n_cout2);
    end
    $display("outputs set: sum=%0d carry=%0d cout1=%0d cout2=%0d", n_sum, n_carry, n_cout1, n_cout2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
