// 1-bit multiply-accumulate element.
//
// Computes psi = (alpha & beta) + gamma + delta as a 2-bit result {psi1, psi0}. The low
// bit is always the three-input XOR. The high bit is a majority function whose inputs are
// complemented according to which operands are two's-complement bits (a signed bit of value
// 1 stands for -1), so that the same element serves every operand format:
//   FN_A  psi1 =  MAJ(p,  gamma,  delta)   all unsigned (element kinds A, B)
//   FN_C  psi1 =  MAJ(p,  gamma, ~delta)   delta signed  (kinds C, D, E)
//   FN_F  psi1 =  MAJ(p, ~gamma,  delta)   gamma signed  (kinds F, G)
//   FN_H  psi1 = ~MAJ(p, ~gamma, ~delta)   all signed    (kind H)
// with p = alpha & beta. The four functions are those of the reduction of element kinds in
// the source design. The function is chosen by the fn input, which stands for the
// configuration of a reconfigurable element; its encoding is this design's own.
//
// Purely combinational.
module mac_element
  import pmac_pkg::*;
(
  input  logic     alpha,
  input  logic     beta,
  input  logic     gamma,
  input  logic     delta,
  input  elem_fn_e fn,
  output logic     psi1,
  output logic     psi0
);

  logic p, g, d;

  always_comb begin
    p    = alpha & beta;
    g    = gamma ^ (fn == FN_F || fn == FN_H);
    d    = delta ^ (fn == FN_C || fn == FN_H);
    psi1 = ((p & g) | (p & d) | (g & d)) ^ (fn == FN_H);
    psi0 = p ^ gamma ^ delta;
  end

endmodule
