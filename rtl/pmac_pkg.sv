// Shared types and elaboration-time functions of the pipelined MAC unit.
//
// The MAC unit is a K x K array of m-bit multiply-accumulate cells (K = ceil(n/m)), and each
// cell is itself an m x m array of 1-bit elements wired the same way. Position (i, j) of
// either array multiplies portion i of the multiplicand with portion j of the multiplier, so
// it works at weight i + j. Column i = K-1 is the most significant one; it is called the
// left column below.
//
// Wiring of both levels (c and d are the two addends of a cell or element):
//   row 0                 : c = C portion i,           d = D portion i
//   i + j <= K-1, j >= 1  : c = high half of (i, j-1), d = low half of (i+1, j-1)
//   i + j >= K, i < K-1   : c = high half of (i-1, j), d = low half of (i+1, j-1)
//   i = K-1, j >= 1       : c = high half of (K-1, j-1), d = high half of (K-2, j)
// A low half whose position has i = 0 or j = K-1 is result portion i + j, and the high
// half of (K-1, K-1) is result portion 2K-1. Position (i, j) is evaluated in step
// j + max(0, i + j - K + 1) (critical path 2K-1 positions); with every internal line
// registered it is evaluated in step i + 2j instead (3K-2 steps).
//
// Two's-complement operation needs eight kinds of cells, A to H, that differ only in which
// operands are signed. The kind of each position follows from the signedness of its
// inputs, so it is derived here by propagating signedness through the array in evaluation
// order. The same derivation gives the kind of every element inside a cell. Elements of the
// eight kinds reduce to four distinct logic functions (elem_fn_e).
package pmac_pkg;

  // Kinds of cell (and of element): operand formats, '+' unsigned, '-' two's complement.
  //   kind  a b c d -> yH yL
  //   A     + + + +    + +
  //   B     - + - -    - -
  //   C     + + + -    + -
  //   D     - + - +    - +
  //   E     + - - +    - +
  //   F     + - + -    - +
  //   G     + + - +    + -
  //   H     - - - -    - +
  typedef enum logic [2:0] {
    KIND_A, KIND_B, KIND_C, KIND_D, KIND_E, KIND_F, KIND_G, KIND_H
  } kind_e;

  // The four distinct 1-bit element functions; only the high output bit differs.
  typedef enum logic [1:0] {
    FN_A,  // psi1 = MAJ(p, g, d)
    FN_C,  // psi1 = MAJ(p, g, ~d)
    FN_F,  // psi1 = MAJ(p, ~g, d)
    FN_H   // psi1 = ~MAJ(p, ~g, ~d)
  } elem_fn_e;

  // Signedness of the inputs of a kind: {a, b, c, d}.
  function automatic logic [3:0] kind_in_fmt(kind_e k);
    case (k)
      KIND_A:  return 4'b0000;
      KIND_B:  return 4'b1011;
      KIND_C:  return 4'b0001;
      KIND_D:  return 4'b1010;
      KIND_E:  return 4'b0110;
      KIND_F:  return 4'b0101;
      KIND_G:  return 4'b0010;
      default: return 4'b1111;
    endcase
  endfunction

  // Signedness of the outputs of a kind: {yH, yL}.
  function automatic logic [1:0] kind_out_fmt(kind_e k);
    case (k)
      KIND_A:  return 2'b00;
      KIND_B:  return 2'b11;
      KIND_C:  return 2'b01;
      KIND_D:  return 2'b10;
      KIND_E:  return 2'b10;
      KIND_F:  return 2'b10;
      KIND_G:  return 2'b01;
      default: return 2'b10;
    endcase
  endfunction

  // The kind whose inputs have the given signedness {a, b, c, d}. Combinations that no
  // position of the array produces map to A.
  function automatic kind_e kind_of_fmt(logic [3:0] f);
    case (f)
      4'b1011: return KIND_B;
      4'b0001: return KIND_C;
      4'b1010: return KIND_D;
      4'b0110: return KIND_E;
      4'b0101: return KIND_F;
      4'b0010: return KIND_G;
      4'b1111: return KIND_H;
      default: return KIND_A;
    endcase
  endfunction

  // Element logic function used by an element of kind k.
  function automatic elem_fn_e elem_fn_of(kind_e k);
    case (k)
      KIND_A, KIND_B:         return FN_A;
      KIND_C, KIND_D, KIND_E: return FN_C;
      KIND_F, KIND_G:         return FN_F;
      default:                return FN_H;
    endcase
  endfunction

  // Evaluation step of position (i, j) in a K x K array.
  // bcast = 1: operand portions of B are broadcast along a row (critical path 2K-1).
  // bcast = 0: every internal line is registered (latency 3K-2).
  function automatic int unsigned pos_step(int unsigned k, bit bcast, int unsigned i,
                                           int unsigned j);
    if (bcast) return (i + j + 1 > k) ? j + (i + j + 1 - k) : j;
    return i + 2 * j;
  endfunction

  // Step in which result portion w (0 .. 2K-1) is registered by its position.
  function automatic int unsigned out_step(int unsigned k, bit bcast, int unsigned w);
    if (w >= 2 * k - 1) return pos_step(k, bcast, k - 1, k - 1);
    if (w < k) return pos_step(k, bcast, 0, w);
    return pos_step(k, bcast, w - (k - 1), k - 1);
  endfunction

  localparam int unsigned MAXK = 32;

  // Kind of position (i, j) of a K x K array whose operands have the signedness
  // {a, b, c, d} given by fmt (the most significant portion of a signed operand is signed,
  // the other portions are unsigned). Signedness is propagated in evaluation order.
  function automatic kind_e array_kind(int unsigned k, logic [3:0] fmt, int unsigned i,
                                       int unsigned j);
    logic [MAXK*MAXK-1:0] hs;  // high half of (x, y) is signed, bit x*MAXK + y
    logic [MAXK*MAXK-1:0] ls;  // low half of (x, y) is signed
    logic [1:0]           of;
    logic                 sc, sd;
    kind_e                kd, res;
    hs  = '0;
    ls  = '0;
    res = KIND_A;
    for (int t = 0; t <= 2 * int'(k) - 2; t++) begin
      for (int y = 0; y < int'(k); y++) begin
        for (int x = 0; x < int'(k); x++) begin
          if (pos_step(k, 1'b1, x, y) == t) begin
            if (y == 0) begin
              sc = fmt[1] && (x == int'(k) - 1);
              sd = fmt[0] && (x == int'(k) - 1);
            end else if (x + y <= int'(k) - 1) begin
              sc = hs[x*MAXK+y-1];
              sd = ls[(x+1)*MAXK+y-1];
            end else if (x < int'(k) - 1) begin
              sc = hs[(x-1)*MAXK+y];
              sd = ls[(x+1)*MAXK+y-1];
            end else begin
              sc = hs[x*MAXK+y-1];
              sd = hs[(x-1)*MAXK+y];
            end
            kd = kind_of_fmt({fmt[3] && (x == int'(k) - 1),
                              fmt[2] && (y == int'(k) - 1), sc, sd});
            of = kind_out_fmt(kd);
            hs[x*MAXK+y] = of[1];
            ls[x*MAXK+y] = of[0];
            if (x == int'(i) && y == int'(j)) res = kd;
          end
        end
      end
    end
    return res;
  endfunction

  // Element function at position (i, j) of an m x m cell, for all eight cell kinds, packed
  // two bits per kind (kind A in bits 1:0).
  function automatic logic [15:0] cell_elem_fns(int unsigned m, int unsigned i,
                                                int unsigned j);
    logic [15:0] r;
    kind_e       ek;
    r = '0;
    for (int c = 0; c < 8; c++) begin
      ek = array_kind(m, kind_in_fmt(kind_e'(c)), i, j);
      r[2*c+:2] = elem_fn_of(ek);
    end
    return r;
  endfunction

endpackage
