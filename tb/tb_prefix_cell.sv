// tb_prefix_cell: exhaustive test of the prefix operator.
// All 16 combinations of the upper and lower (g,p) pairs are applied, one
// per clock. The expected pair is worked out from what the joined span does
// with a carry: it generates one if the upper span generates, or if the
// upper span propagates what the lower span generates; it propagates only
// if both halves propagate.
module tb_prefix_cell;
  import prefix_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  gp_t hi, lo, out;

  prefix_cell dut (.hi(hi), .lo(lo), .out(out));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic exp_g, exp_p;
    for (int v = 0; v < 16; v++) begin
      @(posedge clk);
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      @(negedge clk);
      if (hi.g)      exp_g = 1'b1;
      else if (hi.p) exp_g = lo.g;
      else           exp_g = 1'b0;
      exp_p = (hi.p && lo.p) ? 1'b1 : 1'b0;
      checks++;
      if (out.g !== exp_g || out.p !== exp_p) begin
        failures++;
        $display("FAIL hi=%b%b lo=%b%b out=%b%b exp=%b%b",
                 hi.g, hi.p, lo.g, lo.p, out.g, out.p, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
