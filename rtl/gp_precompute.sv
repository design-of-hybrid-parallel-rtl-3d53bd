// gp_precompute: pre-processing stage of a parallel prefix adder.
//
// For each bit position i it forms the single-bit generate and propagate
//   G_i = a_i AND b_i      P_i = a_i XOR b_i
// which feed the carry tree; P_i is also reused by the post-processing stage
// to form the sum bit. Purely combinational, one gate level. N is the
// operand width (8, the width of the example adders).
module gp_precompute
  import prefix_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output gp_t  [N-1:0] gp
);

  for (genvar i = 0; i < N; i++) begin : g_bit
    assign gp[i].g = a[i] & b[i];
    assign gp[i].p = a[i] ^ b[i];
  end

endmodule
