// tb_hmpe_ks_adder: test of the 8-bit HMPE adder with a Kogge-Stone prefix
// structure, a modulo 255 adder. Every pair of residues a, b in 0..254 is
// applied; the expected sum is (a + b) mod 255 and must never be 255, the
// second zero that this structure exists to avoid. The run counts the three
// ways through the excess-1 unit: increment from a carry out (a+b > 255),
// increment from an all-ones plain sum (a+b = 255, giving 0), and no
// increment. The input pairs of the published example simulation are among
// the vectors; none of them carries out or sums to 255, so this design
// returns a+b for them (the example shows a+b+1, see hmpe_ks_adder).
module tb_hmpe_ks_adder;

  localparam int unsigned N = 8;
  localparam int unsigned M = (1 << N) - 1;  // modulus

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_inc_g = 0, n_inc_p = 0, n_plain = 0;

  logic [N-1:0] a, b, sum;

  hmpe_ks_adder dut (.a(a), .b(b), .sum(sum));

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int s;
    for (int x = 0; x < M; x++) begin
      for (int y = 0; y < M; y++) begin
        @(posedge clk);
        a = N'(x); b = N'(y);
        @(negedge clk);
        s = x + y;
        if (s > M)       n_inc_g++;
        else if (s == M) n_inc_p++;
        else             n_plain++;
        checks++;
        if (int'(sum) != (s % M)) begin
          failures++;
          $display("FAIL a=%0d b=%0d sum=%0d exp=%0d", a, b, sum, s % M);
        end
      end
    end
    if (n_inc_g == 0 || n_inc_p == 0 || n_plain == 0) begin
      failures++;
      $display("FAIL a path of the excess-1 unit was never taken");
    end
    $display("increment by carry: %0d, by all-ones: %0d, none: %0d", n_inc_g, n_inc_p, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
