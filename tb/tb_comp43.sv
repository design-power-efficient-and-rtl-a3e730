// tb_comp43: exhaustive self-checking test of the 4:3 compressor. For all 32 combinations of
// x[4:1] and cin it checks the compressor identity x1+x2+x3+x4+cin = sum + 2*(carry + cout).
// It also checks that cout does not depend on cin, which is what lets a row of compressors
// avoid a rippling carry, and that cout is the majority of x1, x2, x3. A watchdog ends the run
// with a failure after 1000 cycles.
module tb_comp43;
  logic clk = 1'b0;
  logic [4:1] x;
  logic cin, sum, carry, cout;
  logic cout_cin0;
  int checks = 0, failures = 0;

  comp43 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        int expect_total, got_total, ones;
        @(negedge clk);
        x   = 4'(v);
        cin = 1'(c);
        @(posedge clk);
        ones = $countones(x) + c;
        expect_total = ones;
        got_total    = int'(sum) + 2 * (int'(carry) + int'(cout));
        checks++;
        if (got_total != expect_total) begin
          failures++;
          $display("FAIL x=%b cin=%0b -> sum=%0b carry=%0b cout=%0b", x, cin, sum, carry, cout);
        end
        checks++;
        if (cout != ((x[1] & x[2]) | (x[1] & x[3]) | (x[2] & x[3]))) begin
          failures++;
          $display("FAIL cout is not maj(x1,x2,x3) for x=%b", x);
        end
        if (c == 0) cout_cin0 = cout;
        else begin
          checks++;
          if (cout != cout_cin0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
