// gf3m_add4: four-input signed adder over GF(3^m).
//
// y = s0*a0 + s1*a1 + s2*a2 + s3*a3, where each sign s_k is 0, +1 or -1
// (gf3_pkg::sign_t). Coefficient-wise GF(3) arithmetic, so there is no carry
// and the adder is a tree of three trit adders per coefficient. It covers the
// additions, subtractions and accumulations of the final exponentiation.
//
// Interface: purely combinational.
//
// A four-input adder is named by the accelerator's description; the sign
// encoding is this design's choice.
module gf3m_add4
  import gf3_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic [3:0][M-1:0][1:0] a,
  input  sign_t                  sgn [4],
  output logic [M-1:0][1:0]      y
);

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      trit_t acc;
      acc = '0;
      for (int unsigned k = 0; k < 4; k++)
        acc = f3_add(acc, f3_mul(trit_t'(sgn[k]), a[k][i]));
      y[i] = acc;
    end
  end

endmodule
