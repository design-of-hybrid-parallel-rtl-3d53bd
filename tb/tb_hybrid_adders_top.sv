// tb_hybrid_adders_top: end-to-end test of the whole adder library at its
// default sizes (no parameter overrides).
// Each cycle drives fresh inputs into all five adders at once and checks
// every output against integer arithmetic:
//   Kogge-Stone:  {cout, sum} = a + b + cin
//   Brent-Kung:   {cout, sum} = a + b
//   HRPX:         sum = (a + b) mod 2^18, mid = carry out of a[7:0] + b
//   HMPE (both):  sum = (a + b) mod 255, for residues a, b in 0..254
// Directed vectors come first: the worked Kogge-Stone example, the HRPX
// example inputs with their printed sums, and an HMPE pair summing to 255.
// The run counts each mechanism of the design and fails if one never
// happened: carry-in and carry-out of the prefix adders, the HRPX prefix
// carry and a ripple through its whole upper part, and the two reasons for
// the HMPE excess-1 increment (carry out, and all-ones sum).
module tb_hybrid_adders_top;

  localparam int unsigned NRAND = 100000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  // mechanism counters
  int n_ks_cin = 0, n_ks_cout = 0, n_bk_cout = 0;
  int n_hrpx_mid = 0, n_hrpx_ripple = 0;
  int n_hmpe_bk_g = 0, n_hmpe_bk_p = 0, n_hmpe_ks_g = 0, n_hmpe_ks_p = 0;

  logic [7:0]  ks_a, ks_b, ks_sum;
  logic        ks_cin, ks_cout;
  logic [7:0]  bk_a, bk_b, bk_sum;
  logic        bk_cout;
  logic [17:0] hrpx_a, hrpx_sum;
  logic [7:0]  hrpx_b;
  logic        hrpx_mid;
  logic [7:0]  hmpe_bk_a, hmpe_bk_b, hmpe_bk_sum;
  logic [7:0]  hmpe_ks_a, hmpe_ks_b, hmpe_ks_sum;

  hybrid_adders_top dut (.*);

  int ex_a [5] = '{23427, 23421, 84910, 137024, 126783};
  int ex_b [5] = '{71, 34, 25, 14, 56};
  int ex_s [5] = '{23498, 23455, 84935, 137038, 126839};

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s", what);
  endtask

  task automatic check_all(input bit use_hrpx_exp, input int hrpx_exp);
    int s, hs;
    // Kogge-Stone
    checks++;
    if ({ks_cout, ks_sum} !== 9'(int'(ks_a) + int'(ks_b) + int'(ks_cin)))
      fail($sformatf("ks %0d+%0d+%0d -> %0d", ks_a, ks_b, ks_cin, {ks_cout, ks_sum}));
    if (ks_cin)  n_ks_cin++;
    if (ks_cout) n_ks_cout++;
    // Brent-Kung
    checks++;
    if ({bk_cout, bk_sum} !== 9'(int'(bk_a) + int'(bk_b)))
      fail($sformatf("bk %0d+%0d -> %0d", bk_a, bk_b, {bk_cout, bk_sum}));
    if (bk_cout) n_bk_cout++;
    // HRPX
    hs = use_hrpx_exp ? hrpx_exp : ((int'(hrpx_a) + int'(hrpx_b)) % (1 << 18));
    checks++;
    if (int'(hrpx_sum) != hs ||
        hrpx_mid !== ((int'(hrpx_a[7:0]) + int'(hrpx_b)) > 255))
      fail($sformatf("hrpx %0d+%0d -> %0d mid %b", hrpx_a, hrpx_b, hrpx_sum, hrpx_mid));
    if (hrpx_mid) n_hrpx_mid++;
    if (hrpx_mid && (&hrpx_a[17:8])) n_hrpx_ripple++;
    // HMPE, Brent-Kung
    s = int'(hmpe_bk_a) + int'(hmpe_bk_b);
    checks++;
    if (int'(hmpe_bk_sum) != s % 255)
      fail($sformatf("hmpe_bk %0d+%0d -> %0d", hmpe_bk_a, hmpe_bk_b, hmpe_bk_sum));
    if (s > 255) n_hmpe_bk_g++;
    if (s == 255) n_hmpe_bk_p++;
    // HMPE, Kogge-Stone
    s = int'(hmpe_ks_a) + int'(hmpe_ks_b);
    checks++;
    if (int'(hmpe_ks_sum) != s % 255)
      fail($sformatf("hmpe_ks %0d+%0d -> %0d", hmpe_ks_a, hmpe_ks_b, hmpe_ks_sum));
    if (s > 255) n_hmpe_ks_g++;
    if (s == 255) n_hmpe_ks_p++;
  endtask

  function automatic logic [7:0] residue();
    return 8'($urandom_range(254, 0));
  endfunction

  initial begin : watchdog
    repeat (NRAND + 100) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    // directed: worked examples
    for (int k = 0; k < 5; k++) begin
      @(posedge clk);
      ks_a = 8'b1010_1010; ks_b = 8'b0010_0100; ks_cin = 1'b0;
      bk_a = 8'b1010_1010; bk_b = 8'b0010_0100;
      hrpx_a = 18'(ex_a[k]); hrpx_b = 8'(ex_b[k]);
      hmpe_bk_a = 8'd100; hmpe_bk_b = 8'd155;   // sums to 255: the second zero
      hmpe_ks_a = 8'd200; hmpe_ks_b = 8'd55;
      @(negedge clk);
      check_all(1'b1, ex_s[k]);
      if (ks_sum !== 8'b1100_1110) fail("Kogge-Stone worked example");
    end
    // random traffic on all five adders at once
    for (int k = 0; k < NRAND; k++) begin
      @(posedge clk);
      {ks_a, ks_b, ks_cin} = 17'($urandom);
      {bk_a, bk_b} = 16'($urandom);
      hrpx_a = 18'($urandom); hrpx_b = 8'($urandom);
      if (k % 16 == 0) hrpx_a[17:8] = '1;
      hmpe_bk_a = residue(); hmpe_bk_b = residue();
      hmpe_ks_a = residue(); hmpe_ks_b = residue();
      if (k % 64 == 0) hmpe_bk_b = 8'(255 - int'(hmpe_bk_a));
      if (k % 64 == 1) hmpe_ks_b = 8'(255 - int'(hmpe_ks_a));
      @(negedge clk);
      check_all(1'b0, 0);
    end
    $display("ks cin %0d cout %0d, bk cout %0d, hrpx mid %0d ripple %0d",
             n_ks_cin, n_ks_cout, n_bk_cout, n_hrpx_mid, n_hrpx_ripple);
    $display("hmpe_bk carry-inc %0d all-ones-inc %0d, hmpe_ks carry-inc %0d all-ones-inc %0d",
             n_hmpe_bk_g, n_hmpe_bk_p, n_hmpe_ks_g, n_hmpe_ks_p);
    if (n_ks_cin == 0)      fail("ks carry-in never used");
    if (n_ks_cout == 0)     fail("ks carry-out never produced");
    if (n_bk_cout == 0)     fail("bk carry-out never produced");
    if (n_hrpx_mid == 0)    fail("hrpx prefix carry never produced");
    if (n_hrpx_ripple == 0) fail("hrpx full ripple never happened");
    if (n_hmpe_bk_g == 0 || n_hmpe_bk_p == 0) fail("hmpe_bk increment path missed");
    if (n_hmpe_ks_g == 0 || n_hmpe_ks_p == 0) fail("hmpe_ks increment path missed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
