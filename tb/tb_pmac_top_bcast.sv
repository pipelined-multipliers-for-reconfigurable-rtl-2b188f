// End-to-end test of pmac_top in the broadcast configuration (PIPE_LINES = 0, latency 2K-1 = 9), N = 20, M = 4.
//
// Phase 1 multiplies two vectors of 1000 random 20-bit elements, one element per cycle,
// unsigned, with C = D = 0, and checks that the whole vector takes 1000 + 9 - 1 cycles
// from the cycle the first operand is applied to the cycle the last
// result is on the outputs. Phase 2 issues 3000 random operations with
// random C and D, random gaps (in_valid low) and the mode changing between neighbouring
// operations, plus corner operands (all ones, most negative values). Every result is
// compared with A * B + C + D computed here with 64-bit integers, its mode with the mode
// issued, and its latency with 9 cycles. Each mechanism (back-to-back issue, gaps,
// mode changes in both directions, two's-complement and unsigned operations, non-zero
// addends, negative results) is counted and must occur at least once.
module tb_pmac_top_bcast;
  localparam int N = 20, LAT = 9, VEC = 1000, RND = 3000;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           in_valid = 1'b0, in_tc = 1'b0, out_valid, out_tc;
  logic [N-1:0]   a = '0, b = '0, c = '0, d = '0;
  logic [2*N-1:0] y;

  always #5 clk = ~clk;

  pmac_top #(.PIPE_LINES(1'b0)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_b2b = 0, n_gap = 0, n_u2s = 0, n_s2u = 0, n_signed = 0, n_unsigned = 0;
  int n_addend = 0, n_negative = 0;

  typedef struct {
    logic           tc;
    logic [2*N-1:0] y;
    int             issued;
  } exp_t;
  exp_t exp_q [$];

  int first_in = -1, last_out = -1, vec_outs = 0;

  function automatic logic [2*N-1:0] mac(logic tcm, logic [N-1:0] av, logic [N-1:0] bv,
                                          logic [N-1:0] cv, logic [N-1:0] dv);
    longint x, yv, z, u;
    if (tcm) begin
      x = longint'(signed'(av)); yv = longint'(signed'(bv));
      z = longint'(signed'(cv)); u  = longint'(signed'(dv));
    end else begin
      x = longint'(av); yv = longint'(bv); z = longint'(cv); u = longint'(dv);
    end
    return (2*N)'(x * yv + z + u);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  // Scoreboard: results arrive in issue order.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result in cycle %0d", cyc);
      end else begin
        e = exp_q.pop_front();
        if (y !== e.y || out_tc !== e.tc || cyc - e.issued != LAT) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d: y=%h tc=%b want y=%h tc=%b latency %0d", cyc, y,
                     out_tc, e.y, e.tc, cyc - e.issued);
        end
        if (vec_outs < VEC) begin
          vec_outs++;
          last_out = cyc;
        end
      end
    end
  end

  task automatic issue(logic tcm, logic [N-1:0] av, logic [N-1:0] bv, logic [N-1:0] cv,
                       logic [N-1:0] dv);
    exp_t e;
    in_valid = 1'b1; in_tc = tcm; a = av; b = bv; c = cv; d = dv;
    e.tc = tcm; e.y = mac(tcm, av, bv, cv, dv); e.issued = cyc;
    exp_q.push_back(e);
    if (tcm) n_signed++; else n_unsigned++;
    if (cv != '0 || dv != '0) n_addend++;
    if (tcm && e.y[2*N-1]) n_negative++;
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (VEC + 2 * RND + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_tc, prev_v;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    // Phase 1: vector multiply, one element per cycle.
    first_in = cyc;
    for (int k = 0; k < VEC; k++) begin
      issue(1'b0, N'($urandom), N'($urandom), '0, '0);
      if (k > 0) n_b2b++;
    end
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    #1;
    checks++;
    if (last_out - first_in != VEC + LAT - 1) begin
      failures++;
      $display("FAIL vector of %0d took %0d cycles, want %0d", VEC, last_out - first_in,
               VEC + LAT - 1);
    end else begin
      $display("vector of %0d elements: %0d cycles", VEC, last_out - first_in);
    end
    // Phase 2: random operations, gaps and mode changes.
    prev_tc = 1'b0;
    prev_v  = 1'b0;
    for (int k = 0; k < RND; k++) begin
      logic          tcm;
      logic [N-1:0]  av, bv, cv, dv;
      if ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        a = N'($urandom);  // ignored while in_valid is low
        n_gap++;
        prev_v = 1'b0;
        @(posedge clk);
        #1;
      end
      tcm = ($urandom_range(2) == 0) ? ~prev_tc : prev_tc;
      av = N'($urandom); bv = N'($urandom); cv = N'($urandom); dv = N'($urandom);
      case (k % 16)
        1: begin av = '1; bv = '1; cv = '1; dv = '1; end
        2: begin av = N'(1 << (N-1)); bv = N'(1 << (N-1)); cv = av; dv = av; end
        3: begin av = N'(1 << (N-1)); bv = N'((1 << (N-1)) - 1); cv = '1; dv = '0; end
        default: ;
      endcase
      if (k > 0 && tcm && !prev_tc) n_u2s++;
      if (k > 0 && !tcm && prev_tc) n_s2u++;
      if (prev_v) n_b2b++;
      issue(tcm, av, bv, cv, dv);
      prev_tc = tcm;
      prev_v  = 1'b1;
    end
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("back-to-back %0d, gaps %0d, unsigned->signed %0d, signed->unsigned %0d",
             n_b2b, n_gap, n_u2s, n_s2u);
    $display("signed ops %0d, unsigned ops %0d, non-zero addends %0d, negative results %0d",
             n_signed, n_unsigned, n_addend, n_negative);
    checks += 8;
    if (n_b2b == 0)      begin failures++; $display("FAIL no back-to-back issue"); end
    if (n_gap == 0)      begin failures++; $display("FAIL no gap"); end
    if (n_u2s == 0)      begin failures++; $display("FAIL no unsigned->signed change"); end
    if (n_s2u == 0)      begin failures++; $display("FAIL no signed->unsigned change"); end
    if (n_signed == 0)   begin failures++; $display("FAIL no signed operation"); end
    if (n_unsigned == 0) begin failures++; $display("FAIL no unsigned operation"); end
    if (n_addend == 0)   begin failures++; $display("FAIL no non-zero addend"); end
    if (n_negative == 0) begin failures++; $display("FAIL no negative result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
