// ks_adder: N-bit Kogge-Stone parallel prefix adder with carry-in.
//
// Three stages:
//  1. pre-processing: G_i = a_i AND b_i, P_i = a_i XOR b_i (gp_precompute);
//  2. carries: the carry-in is merged into bit 0 by one prefix cell,
//     G'_0 = G_0 OR (P_0 AND cin), then the Kogge-Stone tree forms the
//     carry out of every span [i:0] (ks_prefix_tree);
//  3. post-processing: S_i = P_i XOR C_(i-1), with C_(-1) = cin.
// The carry out of the top bit is cout. Purely combinational; the carry
// path is one cell for cin plus ceil(log2 N) tree cells. The structure and
// the 8-bit default follow the Kogge-Stone example with carry-in; the
// parameterised width is this library's.
module ks_adder
  import prefix_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  gp_t [N-1:0] gp;     // bitwise pairs
  gp_t [N-1:0] gp_c;   // bitwise pairs with cin merged into bit 0
  gp_t [N-1:0] grp;    // group pairs of spans [i:0]
  logic [N:0]  carry;  // carry[i] = carry into bit i

  gp_precompute #(.N(N)) u_pre (.a(a), .b(b), .gp(gp));

  prefix_cell u_cin (
    .hi (gp[0]),
    .lo ('{g: cin, p: 1'b0}),
    .out(gp_c[0])
  );
  if (N > 1) begin : g_upper
    assign gp_c[N-1:1] = gp[N-1:1];
  end

  ks_prefix_tree #(.N(N)) u_tree (.gp_in(gp_c), .grp(grp));

  assign carry[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_sum
    assign carry[i+1] = grp[i].g;
    assign sum[i]     = gp[i].p ^ carry[i];
  end
  assign cout = carry[N];

endmodule
