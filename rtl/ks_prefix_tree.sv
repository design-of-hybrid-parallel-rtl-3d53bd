// ks_prefix_tree: Kogge-Stone carry calculation stage.
//
// Input: the bitwise (g,p) pairs. Output: for every position i the group
// pair of the span [i:0], so grp[i].g is the carry out of bit i and
// grp[i].p says that all bits 0..i propagate.
//
// The graph has ceil(log2 N) rows. In row l (stride s = 2^l) every position
// i >= s combines its own value with that of position i-s through a
// prefix_cell; positions below s are forwarded by a buffer node. Every
// position therefore has a cell in almost every row: minimum depth, the most
// cells and the longest wires of the prefix adders. Purely combinational;
// carry path is ceil(log2 N) cell delays. The row structure follows the
// Kogge-Stone graph of the 8-bit example; other widths are this library's
// generalisation of it.
module ks_prefix_tree
  import prefix_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  gp_t [N-1:0] gp_in,
  output gp_t [N-1:0] grp
);

  localparam int unsigned L = (N > 1) ? $clog2(N) : 0;

  // row[l] holds the value of every column after l rows of the graph
  gp_t [N-1:0] row [L+1];

  assign row[0] = gp_in;

  for (genvar l = 0; l < L; l++) begin : g_row
    localparam int unsigned S = 1 << l;
    for (genvar i = 0; i < N; i++) begin : g_col
      if (i >= S) begin : g_cell
        prefix_cell u_cell (
          .hi (row[l][i]),
          .lo (row[l][i-S]),
          .out(row[l+1][i])
        );
      end else begin : g_buf
        assign row[l+1][i] = row[l][i];
      end
    end
  end

  assign grp = row[L];

endmodule
