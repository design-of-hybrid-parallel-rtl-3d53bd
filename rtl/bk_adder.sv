// bk_adder: N-bit Brent-Kung parallel prefix adder.
//
// Three stages:
//  1. pre-processing: G_i = a_i AND b_i, P_i = a_i XOR b_i (gp_precompute);
//  2. carries: the Brent-Kung tree forms the carry out of every span [i:0]
//     (bk_prefix_tree);
//  3. post-processing: S_0 = P_0, S_i = P_i XOR C_(i-1).
// The carry out of the top bit is cout. There is no carry-in, as in the
// 8-bit Brent-Kung graph this follows. Purely combinational; the carry path
// is 2*ceil(log2 N)-1 prefix cells. The width parameter is this library's.
module bk_adder
  import prefix_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);

  gp_t [N-1:0] gp;
  gp_t [N-1:0] grp;
  logic [N:0]  carry;  // carry[i] = carry into bit i

  gp_precompute #(.N(N)) u_pre (.a(a), .b(b), .gp(gp));
  bk_prefix_tree #(.N(N)) u_tree (.gp_in(gp), .grp(grp));

  assign carry[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_sum
    assign carry[i+1] = grp[i].g;
    assign sum[i]     = gp[i].p ^ carry[i];
  end
  assign cout = carry[N];

endmodule
