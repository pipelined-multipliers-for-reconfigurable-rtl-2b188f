// Self-checking test of mac_element: all 16 input combinations for each of the eight
// element kinds A..H. The expected result is worked out arithmetically from the operand
// formats of each kind (a signed bit of value 1 counts as -1): the outputs must satisfy
// sH * 2 * psi1 + sL * psi0 = sa*sb*(alpha & beta) + sc*gamma + sd*delta.
module tb_mac_element;
  import pmac_pkg::*;

  logic     clk = 1'b0;
  logic     alpha, beta, gamma, delta, psi1, psi0;
  elem_fn_e fn;
  int       checks = 0, failures = 0;

  mac_element dut (.*);

  always #5 clk = ~clk;

  // Formats of the eight kinds {a, b, c, d, yH, yL}, 1 = two's complement, and the logic
  // function each uses.
  localparam logic [5:0] FMT [8] = '{6'b000000, 6'b101111, 6'b000101, 6'b101010,
                                      6'b011010, 6'b010110, 6'b001001, 6'b111110};
  localparam elem_fn_e   FNK [8] = '{FN_A, FN_A, FN_C, FN_C, FN_C, FN_F, FN_F, FN_H};

  function automatic int sgn(logic s);
    return s ? -1 : 1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, got;
    for (int k = 0; k < 8; k++) begin
      for (int v = 0; v < 16; v++) begin
        fn = FNK[k];
        {alpha, beta, gamma, delta} = v[3:0];
        #1;
        want = sgn(FMT[k][5]) * sgn(FMT[k][4]) * int'(alpha & beta)
             + sgn(FMT[k][3]) * int'(gamma) + sgn(FMT[k][2]) * int'(delta);
        got  = 2 * sgn(FMT[k][1]) * int'(psi1) + sgn(FMT[k][0]) * int'(psi0);
        checks++;
        if (got !== want) begin
          failures++;
          $display("FAIL kind %0d inputs %b: got %0d want %0d", k, v[3:0], got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
