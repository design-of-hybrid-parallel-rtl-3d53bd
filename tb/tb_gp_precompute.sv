// tb_gp_precompute: exhaustive test of the generate/propagate stage at
// 8 bits. For every bit the expected pair comes from the arithmetic sum of
// the two operand bits: generate when it is 2, propagate when it is 1.
module tb_gp_precompute;
  import prefix_pkg::*;

  localparam int unsigned N = 8;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [N-1:0] a, b;
  gp_t  [N-1:0] gp;

  gp_precompute dut (.a(a), .b(b), .gp(gp));

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int bit_sum;
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      @(posedge clk);
      {a, b} = (2 * N)'(v);
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        bit_sum = int'(a[i]) + int'(b[i]);
        checks++;
        if (gp[i].g !== (bit_sum == 2) || gp[i].p !== (bit_sum == 1)) begin
          failures++;
          $display("FAIL a=%h b=%h bit %0d g=%b p=%b", a, b, i, gp[i].g, gp[i].p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
