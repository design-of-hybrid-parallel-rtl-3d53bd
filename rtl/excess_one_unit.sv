// excess_one_unit: the modified excess-1 unit of the HMPE adders.
//
// Turns the plain n-bit sum of a prefix adder into a modulo 2^n-1 sum with
// a single representation of zero. The control signal
//   inc = P(n-1:0) OR G(n-1:0)
// is set when the addition carried out of the top bit (G) or when every bit
// propagates, i.e. the plain sum is all ones (P). In both cases the result
// is incremented: an end-around carry for G, and all ones (the second zero
// of the modulus) wrapping to 0 for P. The increment is a ripple of AND
// gates, c_0 = inc, c_(i+1) = s_i AND c_i, with S'_i = s_i XOR c_i; the
// carry out of the top bit is dropped. This needs fewer gates than an n-bit
// adder. Purely combinational; delay is the OR gate plus n AND gates.
// The OR of the two group signals, the AND chain and the XOR row follow the
// excess-1 unit as described; the width parameter is this library's.
module excess_one_unit #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] s_in,    // plain sum from the prefix adder
  input  logic         p_all,   // group propagate P(n-1:0)
  input  logic         g_all,   // group generate G(n-1:0), the carry out
  output logic [N-1:0] s_out    // corrected sum S'
);

  logic [N-1:0] c;  // increment carry, c[i] enters bit i

  assign c[0] = p_all | g_all;
  for (genvar i = 0; i < N; i++) begin : g_bit
    assign s_out[i] = s_in[i] ^ c[i];
    if (i + 1 < N) begin : g_carry
      assign c[i+1] = s_in[i] & c[i];
    end
  end

endmodule
