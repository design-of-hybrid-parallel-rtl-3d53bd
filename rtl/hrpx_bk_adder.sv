// hrpx_bk_adder: hybrid regular parallel prefix XNOR/OR adder (HRPX).
//
// Adds a WIDTH-bit operand a and a PREFIX_WIDTH-bit operand b, the shape of
// addition met in residue-to-binary converters, where one operand is much
// narrower than the other:
//   sum = (a + b) mod 2^WIDTH
// The low PREFIX_WIDTH bits, where both operands have bits, go through a
// Brent-Kung parallel prefix adder (gp_precompute, bk_prefix_tree, XOR
// post-processing). Its carry out, `mid`, enters a ripple chain over the
// upper WIDTH-PREFIX_WIDTH bits of a, in which each full adder is replaced
// by an XNOR/OR cell (xnor_or_rca), since those bits have only one operand.
// Purely combinational. The carry path is the Brent-Kung tree
// (2*log2(PREFIX_WIDTH)-1 cells) followed by one OR gate per upper bit.
// The defaults follow the 18-bit example (a[17:0], b[7:0], sum[17:0], with
// an internal signal `mid`). The prose of the source gives the width as
// 4n+1 = 17 bits for n = 4; the printed example and its bit labels (a17 ..
// a8, s17 .. s0) give 18, which is used here. Exposing `mid` as the carry
// from the prefix part into the ripple part is this design's choice.
module hrpx_bk_adder
  import prefix_pkg::*;
#(
  parameter int unsigned WIDTH        = 18,
  parameter int unsigned PREFIX_WIDTH = 8
) (
  input  logic [WIDTH-1:0]        a,
  input  logic [PREFIX_WIDTH-1:0] b,
  output logic [WIDTH-1:0]        sum,
  output logic                    mid   // carry from the prefix part
);

  localparam int unsigned RW = WIDTH - PREFIX_WIDTH;  // ripple part width

  gp_t  [PREFIX_WIDTH-1:0] gp;
  gp_t  [PREFIX_WIDTH-1:0] grp;
  logic [PREFIX_WIDTH-1:0] carry;  // carry[i] = carry into bit i

  gp_precompute #(.N(PREFIX_WIDTH)) u_pre (
    .a (a[PREFIX_WIDTH-1:0]),
    .b (b),
    .gp(gp)
  );
  bk_prefix_tree #(.N(PREFIX_WIDTH)) u_tree (.gp_in(gp), .grp(grp));

  assign carry[0] = 1'b0;
  for (genvar i = 0; i < PREFIX_WIDTH; i++) begin : g_sum
    if (i + 1 < PREFIX_WIDTH) begin : g_carry
      assign carry[i+1] = grp[i].g;
    end
    assign sum[i] = gp[i].p ^ carry[i];
  end
  assign mid = grp[PREFIX_WIDTH-1].g;

  xnor_or_rca #(.W(RW)) u_rca (
    .a  (a[WIDTH-1:PREFIX_WIDTH]),
    .cin(mid),
    .sum(sum[WIDTH-1:PREFIX_WIDTH])
  );

endmodule
