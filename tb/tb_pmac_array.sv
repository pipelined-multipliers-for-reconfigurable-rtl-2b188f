// Self-checking test of pmac_array in both pipelining schemes (N = 20, M = 4, K = 5).
// A random operation (random mode, A, B, C, D) starts every cycle. The test applies the
// portions of B in the staggered order and checks every result portion in the cycle it is
// due, against A * B + C + D computed here with 64-bit integers. The timing is stated here
// independently of the design: with broadcast, B portion j is applied in step j and result
// portion w appears after step min(w, 2K-2); with registered internal lines, B portion j is
// applied in step 2j and result portion w appears after step 2w (w < K), w + K - 1
// (w <= 2K-2) or 3K-3 (w = 2K-1). This fixes the latencies at 2K-1 and 3K-2 cycles.
module tb_pmac_array;
  localparam int N = 20, M = 4, K = 5, OPS = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  typedef struct {
    logic                tc;
    logic [K-1:0][M-1:0] a, b, c, d;
    logic [2*N-1:0]      y;
  } op_t;
  op_t ops [OPS];

  logic [1:0]            tc;
  logic [1:0][K-1:0][M-1:0]   a, b, c, d;
  logic [1:0][2*K-1:0][M-1:0] y;

  for (genvar p = 0; p < 2; p++) begin : g_dut
    pmac_array #(.N(N), .M(M), .PIPE_LINES(p)) dut (
      .clk(clk), .tc(tc[p]), .a(a[p]), .b(b[p]), .c(c[p]), .d(d[p]), .y(y[p]));
  end

  function automatic int b_step(int p, int j);
    return p ? 2 * j : j;
  endfunction

  function automatic int y_step(int p, int w);
    if (!p) return (w < 2 * K - 1) ? w : 2 * K - 2;
    if (w < K) return 2 * w;
    if (w <= 2 * K - 2) return w + K - 1;
    return 3 * K - 3;
  endfunction

  function automatic logic [2*N-1:0] mac(logic tcm, logic [N-1:0] av, logic [N-1:0] bv,
                                          logic [N-1:0] cv, logic [N-1:0] dv);
    longint x, yv, z, u;
    if (tcm) begin
      x  = longint'(signed'(av)); yv = longint'(signed'(bv));
      z  = longint'(signed'(cv)); u  = longint'(signed'(dv));
    end else begin
      x  = longint'(av); yv = longint'(bv); z = longint'(cv); u = longint'(dv);
    end
    return (2*N)'(x * yv + z + u);
  endfunction

  initial begin
    repeat (OPS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < OPS; n++) begin
      ops[n].tc = 1'($urandom);
      ops[n].a  = N'($urandom); ops[n].b = N'($urandom);
      ops[n].c  = N'($urandom); ops[n].d = N'($urandom);
      case (n % 8)  // corner operands
        1: begin ops[n].a = '1; ops[n].b = '1; ops[n].c = '1; ops[n].d = '1; end
        2: begin ops[n].a = N'(1 << (N-1)); ops[n].b = N'(1 << (N-1));
                 ops[n].c = N'(1 << (N-1)); ops[n].d = N'(1 << (N-1)); end
        3: begin ops[n].a = '0; ops[n].c = '1; end
        default: ;
      endcase
      ops[n].y = mac(ops[n].tc, ops[n].a, ops[n].b, ops[n].c, ops[n].d);
    end
    for (int cyc = 0; cyc < OPS + 3 * K; cyc++) begin
      @(posedge clk);
      #1;
      for (int p = 0; p < 2; p++) begin
        // Operands of the operation starting now; B portions of earlier operations.
        if (cyc < OPS) begin
          tc[p] = ops[cyc].tc; a[p] = ops[cyc].a; c[p] = ops[cyc].c; d[p] = ops[cyc].d;
        end else begin
          tc[p] = 1'b0; a[p] = '0; c[p] = '0; d[p] = '0;
        end
        for (int j = 0; j < K; j++) begin
          int o;
          o = cyc - b_step(p, j);
          b[p][j] = (o >= 0 && o < OPS) ? ops[o].b[j] : '0;
        end
        // Result portions due now.
        for (int w = 0; w < 2 * K; w++) begin
          int o;
          o = cyc - y_step(p, w) - 1;
          if (o >= 0 && o < OPS) begin
            checks++;
            if (y[p][w] !== ops[o].y[w*M+:M]) begin
              failures++;
              if (failures < 10)
                $display("FAIL scheme %0d op %0d portion %0d: got %h want %h", p, o, w,
                         y[p][w], ops[o].y[w*M+:M]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
