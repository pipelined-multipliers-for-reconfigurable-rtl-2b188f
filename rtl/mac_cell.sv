// m-bit multiply-accumulate cell, y = a * b + c + d.
//
// The cell is an M x M array of 1-bit elements (mac_element) in the same arrangement as
// the word-level MAC array (see pmac_pkg): element (i, j) forms a[i] & b[j] plus two bits
// of weight i + j, and passes its low bit on at weight i + j and its high bit at weight
// i + j + 1. The array has no adder row: the left column (i = M-1) takes the leftover high
// bits, so M*M elements suffice and the longest path is 2M-1 elements.
//
// The kind input selects one of the eight operand formats (pmac_pkg::kind_e). In a kind
// with signed operands the top bit of a, b, c or d has weight -2^(M-1), and the two halves
// of y are read as 2^M * y[2M-1:M] + y[M-1:0], each half signed or unsigned as the kind
// says (for kind B, y = {2, -7} means 2*16 - 7 = 25 when M = 4). The function of every
// element for every kind is worked out at elaboration by propagating operand signedness;
// at run time the kind input only steers an 8-way choice per element, which models the
// configuration of a reconfigurable cell.
//
// Purely combinational. The element arrangement, the kinds and the element functions
// follow the source design; the run-time kind input and its encoding are this design's own.
module mac_cell
  import pmac_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  input  logic [M-1:0]   c,
  input  logic [M-1:0]   d,
  input  kind_e          kind,
  output logic [2*M-1:0] y
);

  logic [M-1:0][M-1:0] hi;  // high output bit of element (i, j), indexed [i][j]
  logic [M-1:0][M-1:0] lo;  // low output bit of element (i, j)

  for (genvar i = 0; i < M; i++) begin : g_col
    for (genvar j = 0; j < M; j++) begin : g_row
      localparam logic [15:0] FNS = cell_elem_fns(M, i, j);
      logic     gam, del;
      elem_fn_e fn;

      if (j == 0) begin : g_top
        assign gam = c[i];
        assign del = d[i];
      end else if (i + j <= M - 1) begin : g_upper
        assign gam = hi[i][j-1];
        assign del = lo[i+1][j-1];
      end else if (i < M - 1) begin : g_lower
        assign gam = hi[i-1][j];
        assign del = lo[i+1][j-1];
      end else begin : g_left
        assign gam = hi[i][j-1];
        assign del = hi[i-1][j];
      end

      always_comb fn = elem_fn_e'(FNS[2*kind+:2]);

      mac_element u_elem (
        .alpha(a[i]),
        .beta (b[j]),
        .gamma(gam),
        .delta(del),
        .fn   (fn),
        .psi1 (hi[i][j]),
        .psi0 (lo[i][j])
      );
    end
  end

  // Result bits: low bits of the right column and of the bottom row, then the high bit of
  // the last element.
  for (genvar w = 0; w < 2 * M; w++) begin : g_out
    if (w < M) begin : g_right
      assign y[w] = lo[0][w];
    end else if (w < 2 * M - 1) begin : g_bottom
      assign y[w] = lo[w-M+1][M-1];
    end else begin : g_last
      assign y[w] = hi[M-1][M-1];
    end
  end

endmodule
