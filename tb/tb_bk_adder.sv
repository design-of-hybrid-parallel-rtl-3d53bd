// tb_bk_adder: test of the Brent-Kung adder.
// The 8-bit default is tested exhaustively over a and b; an 11-bit instance
// gets random vectors. The expected {cout, sum} is the integer a + b.
module tb_bk_adder;

  localparam int unsigned N  = 8;
  localparam int unsigned NW = 11;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_cout = 0;

  logic [N-1:0]  a, b, sum;
  logic          cout;
  logic [NW-1:0] aw, bw, sumw;
  logic          coutw;

  bk_adder           dut   (.a(a), .b(b), .sum(sum), .cout(cout));
  bk_adder #(.N(NW)) dut_w (.a(aw), .b(bw), .sum(sumw), .cout(coutw));

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [N:0]  exp;
    logic [NW:0] expw;
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      @(posedge clk);
      {a, b} = (2 * N)'(v);
      aw = NW'($urandom); bw = NW'($urandom);
      @(negedge clk);
      exp  = (N+1)'(a) + (N+1)'(b);
      expw = (NW+1)'(aw) + (NW+1)'(bw);
      if (cout) n_cout++;
      checks += 2;
      if ({cout, sum} !== exp) begin
        failures++;
        $display("FAIL N=%0d a=%h b=%h got=%h exp=%h", N, a, b, {cout, sum}, exp);
      end
      if ({coutw, sumw} !== expw) begin
        failures++;
        $display("FAIL N=%0d a=%h b=%h got=%h exp=%h", NW, aw, bw, {coutw, sumw}, expw);
      end
    end
    if (n_cout == 0) begin
      failures++;
      $display("FAIL carry-out never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
