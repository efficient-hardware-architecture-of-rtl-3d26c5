// gf3m_cube: combinational cubing over GF(3^m), c = a^3 mod (x^M - x^N + 1).
//
// In characteristic three the Frobenius map is linear, so a^3 =
// sum a_i x^(3i): the trits are spread to every third position and the
// degrees M .. 3M-3 are folded back from the top down with x^k = x^(k-M+N) -
// x^(k-M). For a trinomial the whole operation is a fixed network of GF(3)
// additions with no multiplier, so it finishes in one cycle; the coprocessors
// register its output.
//
// Interface: purely combinational, a in, c out.
//
// The one-cycle cubing unit follows the accelerator's description; the
// top-down folding is this design's way of writing the addition network.
module gf3m_cube
  import gf3_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT,
  parameter int unsigned N = N_DEFAULT
) (
  input  logic [M-1:0][1:0] a,
  output logic [M-1:0][1:0] c
);

  localparam int unsigned W = 3 * M - 2;

  always_comb begin
    logic [W-1:0][1:0] w;
    w = '0;
    for (int unsigned i = 0; i < M; i++) w[3*i] = a[i];
    for (int k = W - 1; k >= int'(M); k--) begin
      w[k-M+N] = f3_add(w[k-M+N], w[k]);
      w[k-M]   = f3_sub(w[k-M],   w[k]);
    end
    c = w[M-1:0];
  end

endmodule
