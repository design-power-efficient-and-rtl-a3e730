// tb_urdhwa_mult8: exhaustive end-to-end test of the 8x8 Urdhwa compressor multiplier, with the
// top at its default configuration. It applies every one of the 65,536 operand pairs, one per
// clock, and compares c with a * b worked out in integer arithmetic. It also counts how often
// the carry mechanisms of the reduction were used:
//   - a 4:3 compressor's cout                   (column 7 cell)
//   - a 7:4 compressor's cout1 and its weight-4 cout2, which skips a column (column 7 cell)
//   - a carry-in that reaches a compressor's carry output (column 12 4:3, u = 1)
//   - the top product bit c[15]
// Each of these must happen at least once, or the test fails. A watchdog ends the run with a
// failure after 70,000 cycles.
module tb_urdhwa_mult8;
  logic clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] c;
  int checks = 0, failures = 0;
  int n_c43_cout = 0, n_c74_cout1 = 0, n_c74_cout2 = 0, n_cin_to_carry = 0, n_msb = 0;

  urdhwa_mult8 dut (.a(a), .b(b), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        @(negedge clk);
        a = 8'(va);
        b = 8'(vb);
        @(posedge clk);
        checks++;
        if (c != 16'(va * vb)) begin
          failures++;
          if (failures < 20) $display("FAIL %0d * %0d -> %0d (expected %0d)", va, vb, c, va * vb);
        end
        n_c43_cout     += int'(dut.u43_c7_1.cout);
        n_c74_cout1    += int'(dut.u74_c7_0.cout1);
        n_c74_cout2    += int'(dut.u74_c7_0.cout2);
        n_cin_to_carry += ((dut.u43_c12_0.u && dut.u43_c12_0.cin) ? 1 : 0);
        n_msb          += int'(c[15]);
      end
    end
    $display("mechanisms: 4:3 cout=%0d  7:4 cout1=%0d  7:4 cout2=%0d  cin->carry=%0d  c[15]=%0d",
             n_c43_cout, n_c74_cout1, n_c74_cout2, n_cin_to_carry, n_msb);
    checks++;
    if (n_c43_cout == 0)     begin failures++; $display("FAIL 4:3 cout never set"); end
    checks++;
    if (n_c74_cout1 == 0)    begin failures++; $display("FAIL 7:4 cout1 never set"); end
    checks++;
    if (n_c74_cout2 == 0)    begin failures++; $display("FAIL 7:4 cout2 never set"); end
    checks++;
    if (n_cin_to_carry == 0) begin failures++; $display("FAIL carry-in never reached carry"); end
    checks++;
    if (n_msb == 0)          begin failures++; $display("FAIL c[15] never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
