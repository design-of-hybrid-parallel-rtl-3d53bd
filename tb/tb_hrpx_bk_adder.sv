// tb_hrpx_bk_adder: test of the 18-bit HRPX adder (18-bit a, 8-bit b).
// Applies the five input pairs of the published example simulation and
// compares with the sums printed there (23498, 23455, 84935, 137038,
// 126839), then random pairs and pairs that make the prefix carry ripple
// through the whole upper part. Expected: sum = (a + b) mod 2^18, and `mid`
// is the carry out of a[7:0] + b.
module tb_hrpx_bk_adder;

  localparam int unsigned W  = 18;
  localparam int unsigned PW = 8;
  localparam int unsigned NRAND = 50000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_mid = 0, n_full_ripple = 0;

  logic [W-1:0]  a, sum;
  logic [PW-1:0] b;
  logic          mid;

  hrpx_bk_adder dut (.a(a), .b(b), .sum(sum), .mid(mid));

  // the published example: a, b, printed sum
  int ex_a [5] = '{23427, 23421, 84910, 137024, 126783};
  int ex_b [5] = '{71, 34, 25, 14, 56};
  int ex_s [5] = '{23498, 23455, 84935, 137038, 126839};

  task automatic check(input logic [W-1:0] exp_sum);
    logic exp_mid;
    exp_mid = ((int'(a[PW-1:0]) + int'(b)) >= (1 << PW));
    if (mid) n_mid++;
    if (mid && (&a[W-1:PW])) n_full_ripple++;
    checks++;
    if (sum !== exp_sum || mid !== exp_mid) begin
      failures++;
      $display("FAIL a=%0d b=%0d sum=%0d mid=%b exp=%0d mid %b", a, b, sum, mid, exp_sum, exp_mid);
    end
  endtask

  initial begin : watchdog
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int k = 0; k < 5; k++) begin
      @(posedge clk);
      a = W'(ex_a[k]); b = PW'(ex_b[k]);
      @(negedge clk);
      check(W'(ex_s[k]));
    end
    for (int k = 0; k < NRAND; k++) begin
      @(posedge clk);
      a = W'($urandom); b = PW'($urandom);
      if (k % 8 == 0) a[W-1:PW] = '1;   // long ripple in the upper part
      @(negedge clk);
      check(W'(int'(a) + int'(b)));
    end
    // carry out of the prefix part into an all-ones upper part: wraps to 0
    @(posedge clk);
    a = '1; b = PW'(1);
    @(negedge clk);
    check('0);
    if (n_mid == 0 || n_full_ripple == 0) begin
      failures++;
      $display("FAIL prefix carry or full ripple never exercised");
    end
    $display("prefix carries: %0d, full ripples: %0d", n_mid, n_full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
