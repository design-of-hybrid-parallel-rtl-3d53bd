// tb_xnor_or_rca: exhaustive test of the XNOR/OR ripple chain at its
// default width of 10 bits. The expected sum is (a + cin) mod 2^10.
// Counts the inputs on which the carry ripples through every cell.
module tb_xnor_or_rca;

  localparam int unsigned W = 10;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_full_ripple = 0;

  logic [W-1:0] a, sum, expected;
  logic         cin;

  xnor_or_rca dut (.a(a), .cin(cin), .sum(sum));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < (2 << W); v++) begin
      @(posedge clk);
      {cin, a} = (W + 1)'(v);
      @(negedge clk);
      expected = W'(int'(a) + int'(cin));
      if (cin && (&a)) n_full_ripple++;
      checks++;
      if (sum !== expected) begin
        failures++;
        $display("FAIL a=%h cin=%b sum=%h exp=%h", a, cin, sum, expected);
      end
    end
    if (n_full_ripple == 0) begin
      failures++;
      $display("FAIL full ripple never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
