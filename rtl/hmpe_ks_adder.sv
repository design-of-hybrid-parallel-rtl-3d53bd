// hmpe_ks_adder: hybrid modular parallel prefix excess-1 adder (HMPE)
// built on a Kogge-Stone prefix structure.
//
// Adds two N-bit residues modulo 2^N-1 with a single representation of zero:
//   sum = (a + b) mod (2^N - 1)      for a, b in 0 .. 2^N-2
// A plain end-around-carry adder of this modulus can return all ones as a
// second zero; this structure avoids it without a separate zero detector.
// Two units:
//  * a regular Kogge-Stone prefix adder (gp_precompute, ks_prefix_tree, XOR
//    post-processing) forms the plain sum a+b and the group signals
//    P(N-1:0) (all bits propagate) and G(N-1:0) (carry out);
//  * the modified excess-1 unit (excess_one_unit) increments the plain sum
//    when P(N-1:0) OR G(N-1:0) is set, dropping the carry out.
// Purely combinational. The carry path is the prefix tree (log2(N) cells)
// followed by one OR and N AND gates of the excess-1 unit.
// The two-unit structure and the control signal follow the HMPE design;
// the default N = 8 follows its 8-bit example. The example waveforms of
// this adder show a+b+1 for every listed input pair, none of which carries
// out or sums to all ones; this design follows the described control
// (increment only on P OR G), which is what makes it a modulo 2^N-1 adder.
module hmpe_ks_adder
  import prefix_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum
);

  gp_t  [N-1:0] gp;
  gp_t  [N-1:0] grp;
  logic [N-1:0] carry;     // carry[i] = carry into bit i
  logic [N-1:0] sum_plain; // (a + b) mod 2^N

  gp_precompute #(.N(N)) u_pre (.a(a), .b(b), .gp(gp));
  ks_prefix_tree #(.N(N)) u_tree (.gp_in(gp), .grp(grp));

  assign carry[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_sum
    if (i + 1 < N) begin : g_carry
      assign carry[i+1] = grp[i].g;
    end
    assign sum_plain[i] = gp[i].p ^ carry[i];
  end

  excess_one_unit #(.N(N)) u_exc (
    .s_in (sum_plain),
    .p_all(grp[N-1].p),
    .g_all(grp[N-1].g),
    .s_out(sum)
  );

endmodule
