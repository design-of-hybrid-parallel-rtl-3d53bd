// xnor_or_rca: the ripple part of the HRPX hybrid adder.
//
// In the HRPX adder only the wide operand has bits above the prefix part,
// so each upper position adds one operand bit a_i and the ripple carry: a
// half adder, not a full adder. Each cell is built from one XNOR and one OR
// gate by carrying the ripple carry in active-low form, k_i = NOT c_i:
//   s_i     = a_i XNOR k_i           (= a_i XOR c_i)
//   k_(i+1) = (NOT a_i) OR k_i       (= NOT (a_i AND c_i))
// The input cin is the carry out of the prefix part (active high); it is
// inverted once at the entry of the chain. The carry out of the top cell is
// dropped: the sum has the width of the wide operand. Purely combinational;
// delay grows linearly with W, one OR gate per bit.
// That the upper part is a ripple chain of XNOR/OR cells follows the HRPX
// structure; the active-low carry that makes the cells XNOR/OR gates, and
// the dropped top carry, are this design's reading of it. W = 10 covers bits
// 8..17 of the 18-bit example.
module xnor_or_rca #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] a,     // upper bits of the wide operand
  input  logic         cin,   // carry from the prefix part, active high
  output logic [W-1:0] sum
);

  logic [W-1:0] k;  // active-low ripple carry, k[i] enters cell i

  assign k[0] = ~cin;
  for (genvar i = 0; i < W; i++) begin : g_cell
    assign sum[i] = ~(a[i] ^ k[i]);
    if (i + 1 < W) begin : g_carry
      assign k[i+1] = ~a[i] | k[i];
    end
  end

endmodule
