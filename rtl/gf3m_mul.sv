// gf3m_mul: fully pipelined digit-serial (parallel-serial) multiplier over
// GF(3^m), c = a*b mod (x^M - x^N + 1).
//
// Operand a is consumed most-significant digit first, D trits per stage; b
// enters whole. Stage k takes the partial result s of the stage before it
// and forms s*x^D + (sum_j a[D*i+j] x^j) * b, then folds the D top
// coefficients back with x^M = x^N - 1. One fold per stage is enough because
// N + D - 1 < M, so no coefficient moves above degree M-1 again. With
// M = 97 and D = 14 there are ceil(97/14) = 7 stages, one pipeline register
// each, so a new product can start every cycle and comes out 7 cycles later.
//
// Interface: in_valid/in_a/in_b/in_tag are sampled on a rising clock edge;
// out_valid/out_c/out_tag show the result STAGES cycles after the cycle in
// which the operands were presented. The tag rides with the operands and lets
// a controller route the result. Only the valid bits are reset.
//
// The digit-serial algorithm and the seven-stage pipeline follow the
// accelerator's description; the digit size, the tag and the reset scheme are
// choices of this design.
module gf3m_mul
  import gf3_pkg::*;
#(
  parameter int unsigned M    = M_DEFAULT,
  parameter int unsigned N    = N_DEFAULT,
  parameter int unsigned D    = D_DEFAULT,
  parameter int unsigned TAGW = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [M-1:0][1:0]     in_a,
  input  logic [M-1:0][1:0]     in_b,
  input  logic [TAGW-1:0]       in_tag,
  output logic                  out_valid,
  output logic [M-1:0][1:0]     out_c,
  output logic [TAGW-1:0]       out_tag
);

  localparam int unsigned STAGES = (M + D - 1) / D;
  localparam int unsigned APAD   = STAGES * D;   // a padded to whole digits

  typedef logic [M-1:0][1:0]    elem_t;
  typedef logic [APAD-1:0][1:0] apad_t;

  // One stage: s*x^D + digit*b, reduced back to M coefficients.
  function automatic elem_t stage_step(elem_t s, logic [D-1:0][1:0] dig, elem_t b);
    logic [M+D-1:0][1:0] w;
    w = '0;
    for (int unsigned i = 0; i < M; i++) w[i+D] = s[i];
    for (int unsigned j = 0; j < D; j++)
      for (int unsigned i = 0; i < M; i++)
        w[i+j] = f3_add(w[i+j], f3_mul(dig[j], b[i]));
    // fold degrees M+D-1 .. M: x^k = x^(k-M+N) - x^(k-M)
    for (int k = M + D - 1; k >= int'(M); k--) begin
      w[k-M+N] = f3_add(w[k-M+N], w[k]);
      w[k-M]   = f3_sub(w[k-M],   w[k]);
    end
    return w[M-1:0];
  endfunction

  elem_t           s_q   [STAGES];
  apad_t           a_q   [STAGES];
  elem_t           b_q   [STAGES];
  logic [TAGW-1:0] tag_q [STAGES];
  logic            vld_q [STAGES];

  apad_t a_in;
  always_comb begin
    a_in = '0;
    a_in[M-1:0] = in_a;
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    elem_t           s_prev, b_prev;
    apad_t           a_prev;
    logic [TAGW-1:0] tag_prev;
    logic            vld_prev;
    if (k == 0) begin : g_first
      assign s_prev   = '0;
      assign a_prev   = a_in;
      assign b_prev   = in_b;
      assign tag_prev = in_tag;
      assign vld_prev = in_valid;
    end else begin : g_next
      assign s_prev   = s_q[k-1];
      assign a_prev   = a_q[k-1];
      assign b_prev   = b_q[k-1];
      assign tag_prev = tag_q[k-1];
      assign vld_prev = vld_q[k-1];
    end

    // digit STAGES-1-k of a
    logic [D-1:0][1:0] dig;
    assign dig = a_prev[(STAGES-1-k)*D +: D];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_q[k] <= 1'b0;
      else        vld_q[k] <= vld_prev;
    end
    always_ff @(posedge clk) begin
      s_q[k]   <= stage_step(s_prev, dig, b_prev);
      a_q[k]   <= a_prev;
      b_q[k]   <= b_prev;
      tag_q[k] <= tag_prev;
    end
  end

  assign out_valid = vld_q[STAGES-1];
  assign out_c     = s_q[STAGES-1];
  assign out_tag   = tag_q[STAGES-1];

  initial begin
    assert (N + D - 1 < M) else $error("gf3m_mul: N + D - 1 must be below M");
    assert (N > 0 && N < M) else $error("gf3m_mul: need 0 < N < M");
  end

endmodule
