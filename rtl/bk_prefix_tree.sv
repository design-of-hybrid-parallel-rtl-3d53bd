// bk_prefix_tree: Brent-Kung carry calculation stage.
//
// Input: the bitwise (g,p) pairs. Output: for every position i the group
// pair of the span [i:0] (grp[i].g is the carry out of bit i, grp[i].p is
// the group propagate of bits 0..i).
//
// The graph is a binary tree followed by its inverse:
//  * up-sweep, rows l = 0 .. L-1 (stride s = 2^l): position i with
//    (i+1) mod 2s == 0 combines with position i-s. For 8 bits this forms
//    [1:0], [3:2], [5:4], [7:6], then [3:0], [7:4], then [7:0].
//  * down-sweep, rows l = L-2 .. 0: position i with (i+1) mod 2s == s and
//    i+1 > 2s combines with position i-s, which is already a full prefix.
//    For 8 bits this forms [5:0], then [2:0], [4:0], [6:0].
// All other nodes of a row are buffers. With L = ceil(log2 N) the carry path
// is 2L-1 cell delays, against L for Kogge-Stone, but with about 2N cells
// and a fan-out of two. The 8-bit graph is the textbook one; other widths
// are this library's generalisation of it.
module bk_prefix_tree
  import prefix_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  gp_t [N-1:0] gp_in,
  output gp_t [N-1:0] grp
);

  localparam int unsigned L = (N > 1) ? $clog2(N) : 0;
  // number of rows: L up-sweep rows, L-1 down-sweep rows
  localparam int unsigned R = (L > 0) ? 2 * L - 1 : 0;

  gp_t [N-1:0] row [R+1];

  assign row[0] = gp_in;

  // up-sweep
  for (genvar l = 0; l < L; l++) begin : g_up
    localparam int unsigned S = 1 << l;
    for (genvar i = 0; i < N; i++) begin : g_col
      if (((i + 1) % (2 * S)) == 0) begin : g_cell
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

  // down-sweep: row index L+j uses stride 2^(L-2-j)
  for (genvar j = 0; j + 1 < L; j++) begin : g_down
    localparam int unsigned S = 1 << (L - 2 - j);
    for (genvar i = 0; i < N; i++) begin : g_col
      if ((((i + 1) % (2 * S)) == S) && ((i + 1) > 2 * S)) begin : g_cell
        prefix_cell u_cell (
          .hi (row[L+j][i]),
          .lo (row[L+j][i-S]),
          .out(row[L+j+1][i])
        );
      end else begin : g_buf
        assign row[L+j+1][i] = row[L+j][i];
      end
    end
  end

  assign grp = row[R];

endmodule
