// Runs pmac_top at other sizes than the default, in both schedules: operand widths that
// are not a multiple of the cell width (18/4, 7/3), single-bit cells (6/1, where a cell is
// one element), 2-bit cells (8/2) and 8-bit cells (16/8). Each configuration is driven and
// checked by a pmac_size_run instance; the totals are reported here.
module tb_pmac_top_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int R = 6;
  logic [R-1:0] done;
  int           ck [R];
  int           fl [R];

  pmac_size_run #(.N(18), .M(4), .PIPE_LINES(1'b1)) r0 (.clk, .done(done[0]), .checks(ck[0]), .failures(fl[0]));
  pmac_size_run #(.N(18), .M(4), .PIPE_LINES(1'b0)) r1 (.clk, .done(done[1]), .checks(ck[1]), .failures(fl[1]));
  pmac_size_run #(.N(6),  .M(1), .PIPE_LINES(1'b1)) r2 (.clk, .done(done[2]), .checks(ck[2]), .failures(fl[2]));
  pmac_size_run #(.N(8),  .M(2), .PIPE_LINES(1'b0)) r3 (.clk, .done(done[3]), .checks(ck[3]), .failures(fl[3]));
  pmac_size_run #(.N(16), .M(8), .PIPE_LINES(1'b1)) r4 (.clk, .done(done[4]), .checks(ck[4]), .failures(fl[4]));
  pmac_size_run #(.N(7),  .M(3), .PIPE_LINES(1'b0)) r5 (.clk, .done(done[5]), .checks(ck[5]), .failures(fl[5]));

  int checks, failures;

  task automatic report(bit timeout);
    checks = 0;
    failures = timeout ? 1 : 0;
    for (int r = 0; r < R; r++) begin
      checks += ck[r];
      $display("configuration %0d: checks=%0d failures=%0d", r, ck[r], fl[r]);
      failures += fl[r];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    report(1'b1);
  end

  initial begin
    wait (&done);
    #1;
    report(1'b0);
  end
endmodule
