// Fixed delay of DEPTH clock cycles on a W-bit signal (a chain of registers without reset).
// DEPTH = 0 gives a plain wire (clk is then unused, which lint reports). Used for the
// pipeline registers on the lines between the cells of the MAC array and for the input skew
// and output deskew of the top level.
module delay_line #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [DEPTH-1:0][W-1:0] stage;
    always_ff @(posedge clk) begin
      stage[0] <= din;
      for (int s = 1; s < int'(DEPTH); s++) stage[s] <= stage[s-1];
    end
    assign dout = stage[DEPTH-1];
  end

endmodule
