// Superpipelined n-bit multiply-accumulate array, Y = A * B + C + D.
//
// The operands are split into K = ceil(N/M) portions of M bits. Cell (i, j) of a K x K
// array of mac_cell instances multiplies portion i of A with portion j of B and adds two
// M-bit terms of weight i + j; its 2M-bit result is registered, so every cell is one
// pipeline stage. The interconnect (see pmac_pkg) has no final adder row: the left column
// (i = K-1) adds the leftover high halves, which is what keeps the array at K*K cells. The
// top row adds the portions of C and D.
//
// Timing, with step 0 the cycle in which tc, A, C and D are presented (a new operation may
// start every cycle):
//   PIPE_LINES = 0: cell (i, j) works in step j + max(0, i + j - K + 1). Portion j of B is
//     used by several cells of row j in the same step (a broadcast). Latency 2K-1.
//   PIPE_LINES = 1: every internal line is registered and cell (i, j) works in step i + 2j;
//     portions of B travel along the rows. Latency 3K-2.
// B is presented in portions, staggered: portion j in step pos_step(K, !PIPE_LINES, 0, j).
// Result portion w is valid in the cycle after step out_step(K, !PIPE_LINES, w), least
// significant first. A pipeline register is placed on every line wherever the producing
// and consuming steps differ by more than one.
//
// tc selects two's-complement operands and result for the operation presented with it; it
// travels with A down the columns, so the mode may change from one operation to the next.
// In that mode the most significant portions of A, B, C and D are signed and each cell is
// configured as the kind (A to H) that its position requires; otherwise every cell is kind A.
//
// The array shape, the interconnect, the two pipelining schemes and the cell kinds follow
// the source design. The exact wiring was reconstructed from its cell counts, path lengths
// and data formats; the staggered timing of B and Y follows the source design, and the
// choice to present A, C, D and tc together in step 0 is this design's own. Datapath
// registers have no reset.
module pmac_array
  import pmac_pkg::*;
#(
  parameter int unsigned N          = 20,
  parameter int unsigned M          = 4,
  parameter bit          PIPE_LINES = 1'b1,
  localparam int unsigned K         = (N + M - 1) / M
) (
  input  logic                       clk,
  input  logic                       tc,
  input  logic [K-1:0][M-1:0]        a,
  input  logic [K-1:0][M-1:0]        b,
  input  logic [K-1:0][M-1:0]        c,
  input  logic [K-1:0][M-1:0]        d,
  output logic [2*K-1:0][M-1:0]      y
);

  localparam bit BC = !PIPE_LINES;

  // Registered cell results, [i][j], high half in [2M-1:M].
  logic [K-1:0][K-1:0][2*M-1:0] yq;

  for (genvar i = 0; i < K; i++) begin : g_col
    for (genvar j = 0; j < K; j++) begin : g_row
      localparam int unsigned ST   = pos_step(K, BC, i, j);
      localparam kind_e       KTC  = array_kind(K, 4'b1111, i, j);
      logic [M-1:0] a_here, b_here, c_here, d_here;
      logic         tc_here;
      logic [2*M-1:0] y_cell;
      kind_e        kind;

      // Multiplicand portion and mode travel down column i.
      if (j == 0) begin : g_a_in
        delay_line #(.W(M + 1), .DEPTH(ST)) u_a (
          .clk(clk), .din({tc, a[i]}), .dout({tc_here, a_here}));
      end else begin : g_a_down
        delay_line #(.W(M + 1), .DEPTH(ST - pos_step(K, BC, i, j - 1))) u_a (
          .clk(clk), .din({g_row[j-1].tc_here, g_row[j-1].a_here}),
          .dout({tc_here, a_here}));
      end

      // Multiplier portion travels along row j from column 0.
      if (i == 0) begin : g_b_in
        assign b_here = b[j];
      end else begin : g_b_along
        delay_line #(.W(M), .DEPTH(ST - pos_step(K, BC, i - 1, j))) u_b (
          .clk(clk), .din(g_col[i-1].g_row[j].b_here), .dout(b_here));
      end

      // Addends.
      if (j == 0) begin : g_top
        delay_line #(.W(2 * M), .DEPTH(ST)) u_cd (
          .clk(clk), .din({c[i], d[i]}), .dout({c_here, d_here}));
      end else if (i + j <= K - 1) begin : g_upper
        delay_line #(.W(M), .DEPTH(ST - pos_step(K, BC, i, j - 1) - 1)) u_c (
          .clk(clk), .din(yq[i][j-1][2*M-1:M]), .dout(c_here));
        delay_line #(.W(M), .DEPTH(ST - pos_step(K, BC, i + 1, j - 1) - 1)) u_d (
          .clk(clk), .din(yq[i+1][j-1][M-1:0]), .dout(d_here));
      end else if (i < K - 1) begin : g_lower
        delay_line #(.W(M), .DEPTH(ST - pos_step(K, BC, i - 1, j) - 1)) u_c (
          .clk(clk), .din(yq[i-1][j][2*M-1:M]), .dout(c_here));
        delay_line #(.W(M), .DEPTH(ST - pos_step(K, BC, i + 1, j - 1) - 1)) u_d (
          .clk(clk), .din(yq[i+1][j-1][M-1:0]), .dout(d_here));
      end else begin : g_left
        delay_line #(.W(M), .DEPTH(ST - pos_step(K, BC, i, j - 1) - 1)) u_c (
          .clk(clk), .din(yq[i][j-1][2*M-1:M]), .dout(c_here));
        delay_line #(.W(M), .DEPTH(ST - pos_step(K, BC, i - 1, j) - 1)) u_d (
          .clk(clk), .din(yq[i-1][j][2*M-1:M]), .dout(d_here));
      end

      always_comb kind = tc_here ? KTC : KIND_A;

      mac_cell #(.M(M)) u_cell (
        .a   (a_here),
        .b   (b_here),
        .c   (c_here),
        .d   (d_here),
        .kind(kind),
        .y   (y_cell)
      );

      always_ff @(posedge clk) yq[i][j] <= y_cell;
    end
  end

  // Result portions: low halves of the right column and of the bottom row, then the high
  // half of the last cell.
  for (genvar w = 0; w < 2 * K; w++) begin : g_out
    if (w < K) begin : g_right
      assign y[w] = yq[0][w][M-1:0];
    end else if (w < 2 * K - 1) begin : g_bottom
      assign y[w] = yq[w-K+1][K-1][M-1:0];
    end else begin : g_last
      assign y[w] = yq[K-1][K-1][2*M-1:M];
    end
  end

endmodule
