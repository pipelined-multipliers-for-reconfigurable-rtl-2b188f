// Pipelined n-bit multiply-accumulate unit, Y = A * B + C + D, with aligned operands.
//
// The core is pmac_array: a ceil(N/M) x ceil(N/M) array of M-bit MAC cells, one pipeline
// stage per cell, which accepts one operation per clock cycle. The array takes the
// multiplier B and returns the result Y in M-bit portions staggered over successive cycles,
// least significant first. This wrapper presents all operands in one cycle: it skews B
// into that staggered order with registers, realigns the result portions, widens N-bit
// operands to whole portions (zero or sign extension) and carries a valid bit and the mode
// alongside each operation.
//
// Interface: an operation is taken in every cycle with in_valid high. in_tc = 1 treats A,
// B, C, D and Y as two's-complement numbers, in_tc = 0 as unsigned; the mode belongs to the
// operation and may change from one cycle to the next. The result appears on y with
// out_valid (and the operation's mode on out_tc) exactly LATENCY cycles later:
//   PIPE_LINES = 1 (default, every internal line registered, no broadcast): 3K-2 cycles,
//   PIPE_LINES = 0 (multiplier portions broadcast along the rows):           2K-1 cycles,
// with K = ceil(N/M); 13 and 9 cycles for the default N = 20, M = 4. A vector of V
// operations therefore takes V + LATENCY - 1 cycles.
//
// The array, its timing and both pipelining schemes follow the source design; the skew and
// deskew registers, the valid/mode pipeline and the synchronous active-low reset (which
// clears only the valid pipeline) are this design's own.
module pmac_top
  import pmac_pkg::*;
#(
  parameter int unsigned N          = 20,
  parameter int unsigned M          = 4,
  parameter bit          PIPE_LINES = 1'b1,
  localparam int unsigned K         = (N + M - 1) / M,
  localparam int unsigned LATENCY   = pos_step(K, !PIPE_LINES, K - 1, K - 1) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_tc,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   c,
  input  logic [N-1:0]   d,
  output logic           out_valid,
  output logic           out_tc,
  output logic [2*N-1:0] y
);

  localparam bit          BC = !PIPE_LINES;
  localparam int unsigned KM = K * M;

  logic [K-1:0][M-1:0]   a_p, b_p, c_p, d_p, b_skew;
  logic [2*K-1:0][M-1:0] y_stag, y_al;

  // Widen to whole portions: sign extension in two's-complement mode.
  always_comb begin
    a_p = KM'({{KM{in_tc & a[N-1]}}, a});
    b_p = KM'({{KM{in_tc & b[N-1]}}, b});
    c_p = KM'({{KM{in_tc & c[N-1]}}, c});
    d_p = KM'({{KM{in_tc & d[N-1]}}, d});
  end

  // Stagger the multiplier: portion j waits until row j of the array needs it.
  for (genvar j = 0; j < K; j++) begin : g_bskew
    delay_line #(.W(M), .DEPTH(pos_step(K, BC, 0, j))) u_skew (
      .clk(clk), .din(b_p[j]), .dout(b_skew[j]));
  end

  pmac_array #(.N(KM), .M(M), .PIPE_LINES(PIPE_LINES)) u_array (
    .clk(clk),
    .tc (in_tc),
    .a  (a_p),
    .b  (b_skew),
    .c  (c_p),
    .d  (d_p),
    .y  (y_stag)
  );

  // Realign the result: portion w is ready after step out_step(w), the last one after
  // step LATENCY-1.
  for (genvar w = 0; w < 2 * K; w++) begin : g_deskew
    delay_line #(.W(M), .DEPTH(LATENCY - 1 - out_step(K, BC, w))) u_deskew (
      .clk(clk), .din(y_stag[w]), .dout(y_al[w]));
  end

  logic [2*KM-1:0] y_flat;
  assign y_flat = y_al;
  assign y      = y_flat[2*N-1:0];

  // Valid and mode of each operation, LATENCY cycles deep.
  logic [LATENCY-1:0] vld_q, tc_q;
  always_ff @(posedge clk) begin
    vld_q[0] <= rst_n && in_valid;
    tc_q[0]  <= in_tc;
    for (int s = 1; s < int'(LATENCY); s++) begin
      vld_q[s] <= rst_n && vld_q[s-1];
      tc_q[s]  <= tc_q[s-1];
    end
  end
  assign out_valid = vld_q[LATENCY-1];
  assign out_tc    = tc_q[LATENCY-1];

endmodule
