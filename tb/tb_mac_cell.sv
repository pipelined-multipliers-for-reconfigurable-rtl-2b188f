// Self-checking test of mac_cell for M = 4 (every input combination of all eight kinds)
// and M = 3 (random inputs). For each kind the operands a, b, c, d are read as signed or
// unsigned according to the kind's formats, and the result must satisfy
// 2^M * y[2M-1:M] + y[M-1:0] = a * b + c + d with each half read in its own format. The
// worked 4-bit examples for kind B (25, 60, -25, -60, 119, -136) are checked explicitly.
module tb_mac_cell;
  import pmac_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Formats {a, b, c, d, yH, yL} of the eight kinds, 1 = two's complement.
  localparam logic [5:0] FMT [8] = '{6'b000000, 6'b101111, 6'b000101, 6'b101010,
                                      6'b011010, 6'b010110, 6'b001001, 6'b111110};

  logic [3:0] a4, b4, c4, d4;
  logic [7:0] y4;
  logic [2:0] a3, b3, c3, d3;
  logic [5:0] y3;
  kind_e      kind;

  mac_cell #(.M(4)) dut4 (.a(a4), .b(b4), .c(c4), .d(d4), .kind(kind), .y(y4));
  mac_cell #(.M(3)) dut3 (.a(a3), .b(b3), .c(c3), .d(d3), .kind(kind), .y(y3));

  function automatic int val(int unsigned x, int m, logic s);
    return (s && x[m-1]) ? int'(x) - (1 << m) : int'(x);
  endfunction

  function automatic int want_of(int k, int m, int unsigned a, int unsigned b,
                                 int unsigned c, int unsigned d);
    return val(a, m, FMT[k][5]) * val(b, m, FMT[k][4]) + val(c, m, FMT[k][3])
         + val(d, m, FMT[k][2]);
  endfunction

  task automatic check4(int k, int unsigned a, int unsigned b, int unsigned c,
                        int unsigned d);
    int want, got;
    kind = kind_e'(k);
    a4 = 4'(a); b4 = 4'(b); c4 = 4'(c); d4 = 4'(d);
    #1;
    want = want_of(k, 4, a, b, c, d);
    got  = 16 * val(y4[7:4], 4, FMT[k][1]) + val(y4[3:0], 4, FMT[k][0]);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10)
        $display("FAIL M=4 kind %0d a=%0d b=%0d c=%0d d=%0d: got %0d want %0d",
                 k, a, b, c, d, got, want);
    end
  endtask

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, got;
    // Worked examples of kind B, M = 4: {a, b, c, d, y[7:4], y[3:0], value}.
    int ex [6][7] = '{'{5, 5, 5, -5, 2, -7, 25}, '{5, 10, 5, 5, 4, -4, 60},
                      '{-5, 5, 5, -5, -2, 7, -25}, '{-5, 10, -5, -5, -4, 4, -60},
                      '{7, 15, 7, 7, 7, 7, 119}, '{-8, 15, -8, -8, -8, -8, -136}};
    for (int e = 0; e < 6; e++) begin
      kind = KIND_B;
      a4 = 4'(ex[e][0]); b4 = 4'(ex[e][1]); c4 = 4'(ex[e][2]); d4 = 4'(ex[e][3]);
      #1;
      checks++;
      if (y4 != {4'(ex[e][4]), 4'(ex[e][5])} ||
          16 * ex[e][4] + ex[e][5] != ex[e][6]) begin
        failures++;
        $display("FAIL kind B example %0d: y=%h", e, y4);
      end
    end
    // Every input combination of every kind, M = 4.
    for (int k = 0; k < 8; k++)
      for (int v = 0; v < 65536; v++)
        check4(k, v[15:12], v[11:8], v[7:4], v[3:0]);
    // Random inputs, M = 3.
    for (int n = 0; n < 4000; n++) begin
      int k;
      k = int'($urandom_range(7));
      kind = kind_e'(k);
      {a3, b3, c3, d3} = 12'($urandom);
      #1;
      want = want_of(k, 3, a3, b3, c3, d3);
      got  = 8 * val(y3[5:3], 3, FMT[k][1]) + val(y3[2:0], 3, FMT[k][0]);
      checks++;
      if (got != want) begin
        failures++;
        if (failures < 10) $display("FAIL M=3 kind %0d: got %0d want %0d", k, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
