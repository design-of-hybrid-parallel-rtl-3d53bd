// tb_bk_prefix_tree: test of the Brent-Kung carry tree at three widths:
// 8 (the default, exhaustive over both operands), 6 and 13 (random). The
// bitwise (g,p) pairs are formed in the testbench from two operands. For
// every span [i:0] the expected group generate is the carry out of bit i of
// the integer sum of the operands' low i+1 bits, and the expected group
// propagate says that every bit of the span has exactly one operand bit set.
module tb_bk_prefix_tree;
  import prefix_pkg::*;

  localparam int unsigned NA = 8;
  localparam int unsigned NB = 6;
  localparam int unsigned NC = 13;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [NA-1:0] a_a, b_a;
  logic [NB-1:0] a_b, b_b;
  logic [NC-1:0] a_c, b_c;
  gp_t  [NA-1:0] in_a, out_a;
  gp_t  [NB-1:0] in_b, out_b;
  gp_t  [NC-1:0] in_c, out_c;

  for (genvar i = 0; i < NA; i++) begin : g_in_a
    assign in_a[i] = '{g: a_a[i] & b_a[i], p: a_a[i] ^ b_a[i]};
  end
  for (genvar i = 0; i < NB; i++) begin : g_in_b
    assign in_b[i] = '{g: a_b[i] & b_b[i], p: a_b[i] ^ b_b[i]};
  end
  for (genvar i = 0; i < NC; i++) begin : g_in_c
    assign in_c[i] = '{g: a_c[i] & b_c[i], p: a_c[i] ^ b_c[i]};
  end

  bk_prefix_tree                dut_a (.gp_in(in_a), .grp(out_a));
  bk_prefix_tree #(.N(NB)) dut_b (.gp_in(in_b), .grp(out_b));
  bk_prefix_tree #(.N(NC)) dut_c (.gp_in(in_c), .grp(out_c));

  // Compare the n spans of one tree; g and p hold grp[i].g and grp[i].p.
  task automatic check_tree(input int n, input longint unsigned a, input longint unsigned b,
                            input logic [63:0] g, input logic [63:0] p);
    longint unsigned mask, s;
    logic exp_g, exp_p;
    for (int i = 0; i < n; i++) begin
      mask  = (64'd1 << (i + 1)) - 64'd1;
      s     = (a & mask) + (b & mask);
      exp_g = s[i+1];
      exp_p = (((a ^ b) & mask) == mask);
      checks++;
      if (g[i] !== exp_g || p[i] !== exp_p) begin
        failures++;
        $display("FAIL n=%0d a=%h b=%h span [%0d:0] g=%b p=%b exp %b%b",
                 n, a, b, i, g[i], p[i], exp_g, exp_p);
      end
    end
  endtask

  task automatic check_all();
    logic [63:0] g, p;
    g = '0; p = '0;
    for (int i = 0; i < NA; i++) begin g[i] = out_a[i].g; p[i] = out_a[i].p; end
    check_tree(NA, 64'(a_a), 64'(b_a), g, p);
    g = '0; p = '0;
    for (int i = 0; i < NB; i++) begin g[i] = out_b[i].g; p[i] = out_b[i].p; end
    check_tree(NB, 64'(a_b), 64'(b_b), g, p);
    g = '0; p = '0;
    for (int i = 0; i < NC; i++) begin g[i] = out_c[i].g; p[i] = out_c[i].p; end
    check_tree(NC, 64'(a_c), 64'(b_c), g, p);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < (1 << (2 * NA)); v++) begin
      @(posedge clk);
      {a_a, b_a} = (2 * NA)'(v);
      a_b = NB'($urandom); b_b = NB'($urandom);
      a_c = NC'($urandom); b_c = NC'($urandom);
      @(negedge clk);
      check_all();
    end
    // all-propagate and all-generate patterns at every width
    for (int k = 0; k < 4; k++) begin
      @(posedge clk);
      a_a = (k[0]) ? '1 : '0; b_a = (k[1]) ? '1 : ~a_a;
      a_b = (k[0]) ? '1 : '0; b_b = (k[1]) ? '1 : ~a_b;
      a_c = (k[0]) ? '1 : '0; b_c = (k[1]) ? '1 : ~a_c;
      @(negedge clk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
