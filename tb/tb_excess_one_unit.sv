// tb_excess_one_unit: exhaustive test of the modified excess-1 unit at
// 8 bits. Every plain sum is applied with every combination of the group
// propagate and group generate inputs; the expected output is the plain sum
// plus one, modulo 256, when either of them is set, and the plain sum
// otherwise. The run also counts the three cases: increment from G, from P,
// and no increment.
module tb_excess_one_unit;

  localparam int unsigned N = 8;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_inc_g = 0, n_inc_p = 0, n_pass = 0;

  logic [N-1:0] s_in, s_out, expected;
  logic         p_all, g_all;

  excess_one_unit dut (.s_in(s_in), .p_all(p_all), .g_all(g_all), .s_out(s_out));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < (4 << N); v++) begin
      @(posedge clk);
      {p_all, g_all, s_in} = (N + 2)'(v);
      @(negedge clk);
      if (p_all || g_all) expected = N'(int'(s_in) + 1);
      else                expected = s_in;
      if (g_all)      n_inc_g++;
      else if (p_all) n_inc_p++;
      else            n_pass++;
      checks++;
      if (s_out !== expected) begin
        failures++;
        $display("FAIL s_in=%h p=%b g=%b s_out=%h exp=%h", s_in, p_all, g_all, s_out, expected);
      end
    end
    if (n_inc_g == 0 || n_inc_p == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("increment by G: %0d, by P: %0d, none: %0d", n_inc_g, n_inc_p, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
