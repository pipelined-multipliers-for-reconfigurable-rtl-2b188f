// Test driver for one pmac_top configuration, used by tb_pmac_top_sizes. It issues OPS
// random operations (random mode, operands and addends, occasional gaps and corner values)
// and compares every result with A * B + C + D computed with 64-bit integers, and its
// latency with the expected value for the schedule: 3K-2 cycles with registered lines,
// 2K-1 with broadcast, K = ceil(N/M). done rises once all results are checked.
module pmac_size_run #(
  parameter int N          = 8,
  parameter int M          = 2,
  parameter bit PIPE_LINES = 1'b1,
  parameter int OPS        = 500
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int K   = (N + M - 1) / M;
  localparam int LAT = PIPE_LINES ? 3 * K - 2 : 2 * K - 1;

  logic           rst_n = 1'b0, in_valid = 1'b0, in_tc = 1'b0, out_valid, out_tc;
  logic [N-1:0]   a = '0, b = '0, c = '0, d = '0;
  logic [2*N-1:0] y;
  int             cyc = 0;

  pmac_top #(.N(N), .M(M), .PIPE_LINES(PIPE_LINES)) dut (.*);

  typedef struct {
    logic           tc;
    logic [2*N-1:0] y;
    int             issued;
  } exp_t;
  exp_t exp_q [$];

  function automatic logic [2*N-1:0] mac(logic tcm, logic [N-1:0] av, logic [N-1:0] bv,
                                          logic [N-1:0] cv, logic [N-1:0] dv);
    longint x, yv, z, u;
    x  = longint'(av); yv = longint'(bv); z = longint'(cv); u = longint'(dv);
    if (tcm) begin
      if (av[N-1]) x  -= longint'(1) << N;
      if (bv[N-1]) yv -= longint'(1) << N;
      if (cv[N-1]) z  -= longint'(1) << N;
      if (dv[N-1]) u  -= longint'(1) << N;
    end
    return (2*N)'(x * yv + z + u);
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) failures++;
      else begin
        e = exp_q.pop_front();
        if (y !== e.y || out_tc !== e.tc || cyc - e.issued != LAT) begin
          failures++;
          if (failures < 5)
            $display("FAIL N=%0d M=%0d PIPE_LINES=%0d: y=%h want %h, latency %0d want %0d",
                     N, M, PIPE_LINES, y, e.y, cyc - e.issued, LAT);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < OPS; k++) begin
      exp_t e;
      if ($urandom_range(4) == 0) begin
        in_valid = 1'b0;
        @(posedge clk);
        #1;
      end
      in_valid = 1'b1;
      in_tc = 1'($urandom);
      a = N'($urandom); b = N'($urandom); c = N'($urandom); d = N'($urandom);
      case (k % 8)
        1: begin a = '1; b = '1; c = '1; d = '1; end
        2: begin a = N'(1) << (N-1); b = a; c = a; d = a; end
        default: ;
      endcase
      e.tc = in_tc; e.y = mac(in_tc, a, b, c, d); e.issued = cyc;
      exp_q.push_back(e);
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    done = 1'b1;
  end
endmodule
