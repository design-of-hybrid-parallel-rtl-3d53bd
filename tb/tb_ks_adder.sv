// tb_ks_adder: test of the Kogge-Stone adder with carry-in.
// The 8-bit default is tested exhaustively over a, b and cin; a 13-bit
// instance gets random vectors. The expected {cout, sum} is the integer
// a + b + cin. The worked example of the 8-bit Kogge-Stone graph,
// A = 1010_1010, B = 0010_0100, Cin = 0, whose printed sum bits are
// 1100_1110, is applied first.
module tb_ks_adder;

  localparam int unsigned N  = 8;
  localparam int unsigned NW = 13;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_cout = 0, n_cin = 0;

  logic [N-1:0]  a, b, sum;
  logic          cin, cout;
  logic [NW-1:0] aw, bw, sumw;
  logic          cinw, coutw;

  ks_adder             dut   (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  ks_adder #(.N(NW))   dut_w (.a(aw), .b(bw), .cin(cinw), .sum(sumw), .cout(coutw));

  task automatic check(input logic [N:0] got, input logic [N:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL N=%0d a=%h b=%h cin=%b got=%h exp=%h", N, a, b, cin, got, exp);
    end
  endtask

  task automatic check_w();
    logic [NW:0] exp;
    exp = (NW+1)'(aw) + (NW+1)'(bw) + (NW+1)'(cinw);
    checks++;
    if ({coutw, sumw} !== exp) begin
      failures++;
      $display("FAIL N=%0d a=%h b=%h cin=%b got=%h exp=%h", NW, aw, bw, cinw, {coutw, sumw}, exp);
    end
  endtask

  initial begin : watchdog
    repeat (140000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    // worked example
    @(posedge clk);
    a = 8'b1010_1010; b = 8'b0010_0100; cin = 1'b0;
    aw = '0; bw = '0; cinw = 1'b0;
    @(negedge clk);
    check({cout, sum}, 9'b0_1100_1110);
    // exhaustive at 8 bits, random at 13 bits
    for (int v = 0; v < (2 << (2 * N)); v++) begin
      @(posedge clk);
      {cin, a, b} = (2 * N + 1)'(v);
      aw = NW'($urandom); bw = NW'($urandom); cinw = 1'($urandom);
      @(negedge clk);
      if (cout) n_cout++;
      if (cin)  n_cin++;
      check({cout, sum}, (N+1)'(a) + (N+1)'(b) + (N+1)'(cin));
      check_w();
    end
    if (n_cout == 0 || n_cin == 0) begin
      failures++;
      $display("FAIL carry-in or carry-out never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
