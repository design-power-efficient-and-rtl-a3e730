// tb_urdhwa_pp: self-checking test of the crosswise partial product generator. For 2000 random
// operand pairs plus the corner cases 0, 1 and 255, it rebuilds every column independently:
// it sorts the terms a[i] & b[j] by i + j and fills them in order of increasing i. It then
// checks each column word and the weighted sum of all terms against a * b. A watchdog ends
// the run with a failure after 5000 cycles.
module tb_urdhwa_pp;
  logic clk = 1'b0;
  logic [7:0] a, b;
  logic [7:0] pp [15];
  int checks = 0, failures = 0;

  urdhwa_pp dut (.a(a), .b(b), .pp(pp));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [7:0] ta, input logic [7:0] tb_);
    logic [7:0] ref_col [15];
    int fill [15];
    longint weighted;
    @(negedge clk);
    a = ta;
    b = tb_;
    @(posedge clk);
    for (int k = 0; k < 15; k++) begin
      ref_col[k] = '0;
      fill[k] = 0;
    end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        ref_col[i+j][fill[i+j]] = a[i] & b[j];
        fill[i+j]++;
      end
    weighted = 0;
    for (int k = 0; k < 15; k++) begin
      checks++;
      if (pp[k] != ref_col[k]) begin
        failures++;
        $display("FAIL a=%0d b=%0d column %0d: got %b expected %b", a, b, k, pp[k], ref_col[k]);
      end
      weighted += longint'($countones(pp[k])) << k;
    end
    checks++;
    if (weighted != longint'(a) * longint'(b)) begin
      failures++;
      $display("FAIL a=%0d b=%0d: weighted term sum %0d", a, b, weighted);
    end
  endtask

  initial begin
    check_one(8'd0, 8'd0);
    check_one(8'd255, 8'd255);
    check_one(8'd1, 8'd255);
    check_one(8'd255, 8'd1);
    for (int n = 0; n < 2000; n++) check_one(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
