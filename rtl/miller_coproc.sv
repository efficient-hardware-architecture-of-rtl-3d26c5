// miller_coproc: Miller's loop of the eta_T pairing over GF(3^m), without
// cube roots, at one loop iteration every 17 clock cycles.
//
// Function. From P = (xp, yp) and Q = (xq, yq) it computes
//   xp += b, yp = -yp, xq = xq^3, yq = yq^3, t = xp + xq,
//   F  = (-yp t + yq s + yp r) * (-t^2 + yp yq s - t r - r^2)
// and then (m-1)/2 times
//   xq = xq^9 - b, yq = -yq^9, t = xp + xq, u = yp yq,
//   F  = F^3 * (-t^2 + u s - t r - r^2)
// in GF(3^6m) = GF(3^m)[s, r] with s^2 = -1, r^3 = r + b, coefficients
// F = f0 + f1 s + f2 r + f3 s r + f4 r^2 + f5 s r^2 (f_out[j] holds fj).
//
// Datapath. One seven-stage pipelined multiplier (gf3m_mul), one one-cycle
// cubing unit (gf3m_cube) and coefficient-wise adders. The cubed
// coefficients c_j = f_j^3 are kept in registers; A = F^3 follows from them
// with the basis mapped as well (s^3 = -s, r^3 = r + b, (r^2)^3 = r^2 - b r
// + 1): a0 = c0 + b c2 + c4, a2 = c2 - b c4, a4 = c4, a1 = -c1 - b c3 - c5,
// a3 = -c3 + b c5, a5 = -c5. Write A = P + Q s, P = (a0,a2,a4), Q =
// (a1,a3,a5), X = -t^2 and Y = u. The sparse product F^3*G is split as
//   A*(X + Y s)    : real_i = X p_i - Y q_i,
//                    imag_i = (X+Y)(p_i+q_i) - X p_i - Y q_i   (Karatsuba)
//   A*(-t r - r^2) : r^0: -b t p_2 - b p_1 ; r^1: -t p_0 - t p_2 - p_1 - b p_2 ;
//                    r^2: -t p_1 - p_0 - p_2   (the same for Q)
// which needs 15 multiplications; with t*t and yp*yq that is 17 per
// iteration, one per cycle. Each product carries a tag through the
// multiplier; when it comes out, the tag says which accumulator(s) it goes
// into. The last product of a coefficient completes it: the value is stored
// uncubed in f_out and, through the cubing unit, as c_j for the next
// iteration.
//
// Schedule of one iteration (cycle: multiplier input):
//   0 t*t, 1 yp*yq, 2..7 t*a_j (j = 4,2,0,5,3,1), 8..10 X*p_i (i = 2,1,0),
//   11..13 Y*q_i, 14..16 (X+Y)(p_i+q_i).
// Products return 7 cycles later, so the new coefficients complete in the
// order f4, f2, f0, f5, f3, f1 in cycles 1..6 of the following iteration,
// each one cycle before the t*a_j that needs it (a_j only depends on
// coefficients completed earlier in that order). The cubing unit serves those
// six completions and, in cycles 9..12, the two double cubings of xq and yq.
// The first iteration uses A = L = (-yp t, yq, yp, 0, 0, 0) directly; -yp t
// is multiplied in a prologue cycle and arrives in cycle 6, so that
// iteration issues t*a_j in the order 4,2,5,3,1,0. The linear terms of the
// accumulators are loaded in cycle 8.
//
// Timing: start is taken when busy is low and samples xp..yq. done pulses
// 17*(M+1)/2 + 10 cycles later (843 for M = 97): one capture cycle, two
// prologue cycles, (M+1)/2 iterations of 17 cycles, seven cycles to drain the
// multiplier. f_out is valid from done until the first iteration of the next
// run completes.
//
// Follows the accelerator's description: the cube-free loop, a single
// seven-stage multiplier kept busy 17 cycles per iteration, a one-cycle
// cubing unit shared with the xq/yq updates, 17 multiplications per
// iteration. This design's own: the exact split of the sparse product (the
// Karatsuba form over s above), the order of issue, the tag-routed
// accumulators in place of one four-input adder, and the prologue/drain.
// The assertion on the shared cubing unit is disabled during reset; lint
// therefore reports rst_n as used both asynchronously and synchronously,
// which concerns only that check, not the circuit.
module miller_coproc
  import gf3_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT,
  parameter int unsigned N = N_DEFAULT,
  parameter int          B = B_DEFAULT,
  parameter int unsigned D = D_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [M-1:0][1:0]     xp,
  input  logic [M-1:0][1:0]     yp,
  input  logic [M-1:0][1:0]     xq,
  input  logic [M-1:0][1:0]     yq,
  output logic                  busy,
  output logic                  done,
  output logic [5:0][M-1:0][1:0] f_out
);

  localparam int unsigned ITER = (M + 1) / 2;
  localparam int unsigned ITW  = $clog2(ITER + 1);
  localparam int unsigned LAT  = (M + D - 1) / D;   // multiplier latency

  typedef logic [M-1:0][1:0] elem_t;

  typedef enum logic [2:0] {S_IDLE, S_PRO0, S_PRO1, S_LOOP, S_DRAIN} state_t;
  typedef enum logic [2:0] {T_TT, T_U, T_PT, T_TA, T_XP, T_YQ, T_K} op_t;
  typedef struct packed {
    op_t        op;
    logic [2:0] idx;
  } tag_t;

  // ---------------------------------------------------------------- helpers
  function automatic elem_t e_add(elem_t a, elem_t b);
    elem_t c;
    for (int unsigned i = 0; i < M; i++) c[i] = f3_add(a[i], b[i]);
    return c;
  endfunction
  function automatic elem_t e_neg(elem_t a);
    elem_t c;
    for (int unsigned i = 0; i < M; i++) c[i] = f3_neg(a[i]);
    return c;
  endfunction
  function automatic elem_t e_sub(elem_t a, elem_t b);
    return e_add(a, e_neg(b));
  endfunction
  // multiply by the curve constant b = +1 / -1
  function automatic elem_t e_b(elem_t a);
    return (B < 0) ? e_neg(a) : a;
  endfunction
  // add c*b to the constant coefficient, c = +1 / -1
  function automatic elem_t e_addb(elem_t a, int c);
    elem_t r;
    r = a;
    r[0] = f3_add(a[0], ((B * c) < 0) ? 2'b10 : 2'b01);
    return r;
  endfunction

  // order of the t*a_j products in cycles 2..7
  function automatic logic [2:0] ta_order(logic first, logic [2:0] k);
    logic [2:0] ord_n [6];
    logic [2:0] ord_f [6];
    ord_n = '{3'd4, 3'd2, 3'd0, 3'd5, 3'd3, 3'd1};
    ord_f = '{3'd4, 3'd2, 3'd5, 3'd3, 3'd1, 3'd0};
    return first ? ord_f[k] : ord_n[k];
  endfunction

  // ------------------------------------------------------------------ state
  state_t          st;
  logic [4:0]      cyc;
  logic [ITW-1:0]  it;
  elem_t           xp_q, yp_q, xq_q, yq_q, x_q, y_q;
  elem_t           a_q   [6];
  elem_t           acc_q [6];
  elem_t           t;

  assign t = e_add(xp_q, xq_q);

  // A = F^3. a_q holds the cubed coefficients c_j = f_j^3; the basis is
  // mapped as well (s^3 = -s, r^3 = r + b, (r^2)^3 = r^2 - b r + 1):
  //   a0 = c0 + b c2 + c4,  a2 = c2 - b c4,  a4 = c4,
  //   a1 = -c1 - b c3 - c5, a3 = -c3 + b c5, a5 = -c5.
  // In the first iteration a_q holds L itself and is used as it is.
  elem_t a_eff [6];
  always_comb begin
    if (it == '0) begin
      for (int j = 0; j < 6; j++) a_eff[j] = a_q[j];
    end else begin
      a_eff[4] = a_q[4];
      a_eff[2] = e_sub(a_q[2], e_b(a_q[4]));
      a_eff[0] = e_add(e_add(a_q[0], e_b(a_q[2])), a_q[4]);
      a_eff[5] = e_neg(a_q[5]);
      a_eff[3] = e_add(e_neg(a_q[3]), e_b(a_q[5]));
      a_eff[1] = e_neg(e_add(e_add(a_q[1], e_b(a_q[3])), a_q[5]));
    end
  end

  // ------------------------------------------------------------ multiplier
  logic  mul_v, mo_v;
  elem_t mul_a, mul_b, mo_c;
  tag_t  mul_tag, mo_tag;

  always_comb begin
    logic [2:0] i3;
    mul_v   = 1'b0;
    mul_a   = t;
    mul_b   = t;
    mul_tag = '{op: T_TT, idx: 3'd0};
    i3      = 3'd0;
    if (st == S_PRO1) begin
      mul_v   = 1'b1;
      mul_a   = yp_q;
      mul_tag = '{op: T_PT, idx: 3'd0};
    end else if (st == S_LOOP) begin
      mul_v = 1'b1;
      if (cyc == 5'd0) begin
        mul_tag = '{op: T_TT, idx: 3'd0};
      end else if (cyc == 5'd1) begin
        mul_a   = yp_q;
        mul_b   = yq_q;
        mul_tag = '{op: T_U, idx: 3'd0};
      end else if (cyc <= 5'd7) begin
        i3      = ta_order(it == '0, 3'(cyc - 5'd2));
        mul_b   = a_eff[i3];
        mul_tag = '{op: T_TA, idx: i3};
      end else if (cyc <= 5'd10) begin
        i3      = 3'(5'd10 - cyc);
        mul_a   = x_q;
        mul_b   = a_eff[2*i3];
        mul_tag = '{op: T_XP, idx: i3};
      end else if (cyc <= 5'd13) begin
        i3      = 3'(5'd13 - cyc);
        mul_a   = y_q;
        mul_b   = a_eff[2*i3+1];
        mul_tag = '{op: T_YQ, idx: i3};
      end else begin
        i3      = 3'(5'd16 - cyc);
        mul_a   = e_add(x_q, y_q);
        mul_b   = e_add(a_eff[2*i3], a_eff[2*i3+1]);
        mul_tag = '{op: T_K, idx: i3};
      end
    end
  end

  gf3m_mul #(.M(M), .N(N), .D(D), .TAGW($bits(tag_t))) u_mul (
    .clk(clk), .rst_n(rst_n),
    .in_valid(mul_v), .in_a(mul_a), .in_b(mul_b), .in_tag(mul_tag),
    .out_valid(mo_v), .out_c(mo_c), .out_tag(mo_tag)
  );

  tag_t rt;
  assign rt = mo_tag;

  // -------------------------------------------------------------- cube unit
  // Completed coefficient (if this cycle's product completes one).
  elem_t done_val;
  logic  completes;
  always_comb begin
    completes = mo_v && (rt.op == T_YQ || rt.op == T_K);
    if (rt.op == T_YQ) done_val = e_sub(acc_q[2*rt.idx], mo_c);
    else               done_val = e_add(acc_q[2*rt.idx+1], mo_c);
  end

  elem_t cube_in, cube_out;
  always_comb begin
    cube_in = done_val;
    if (st == S_PRO0)                                     cube_in = xq_q;
    else if (st == S_PRO1)                                cube_in = yq_q;
    else if (st == S_LOOP && (cyc == 5'd9 || cyc == 5'd10))  cube_in = xq_q;
    else if (st == S_LOOP && (cyc == 5'd11 || cyc == 5'd12)) cube_in = yq_q;
  end

  gf3m_cube #(.M(M), .N(N)) u_cube (.a(cube_in), .c(cube_out));

  // -------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      cyc  <= '0;
      it   <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE:  if (start) st <= S_PRO0;
        S_PRO0:  st <= S_PRO1;
        S_PRO1:  begin st <= S_LOOP; cyc <= '0; it <= '0; end
        S_LOOP:  if (cyc == 5'd16) begin
                   cyc <= '0;
                   if (it == ITW'(ITER - 1)) st <= S_DRAIN;
                   else                      it <= it + 1'b1;
                 end else cyc <= cyc + 1'b1;
        S_DRAIN: if (cyc == 5'(LAT - 1)) begin
                   st   <= S_IDLE;
                   cyc  <= '0;
                   done <= 1'b1;
                 end else cyc <= cyc + 1'b1;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  // --------------------------------------------------------------- datapath
  always_ff @(posedge clk) begin
    // operand capture and prologue
    if (st == S_IDLE && start) begin
      xp_q <= xp;
      yp_q <= yp;
      xq_q <= xq;
      yq_q <= yq;
    end
    if (st == S_PRO0) begin
      xp_q <= e_addb(xp_q, 1);        // xp + b
      yp_q <= e_neg(yp_q);            // -yp
      xq_q <= cube_out;               // xq^3
    end
    if (st == S_PRO1) begin
      yq_q   <= cube_out;             // yq^3
      a_q[1] <= cube_out;             // L = (-yp t, yq, yp, 0, 0, 0)
      a_q[2] <= yp_q;
      a_q[3] <= '0;
      a_q[4] <= '0;
      a_q[5] <= '0;
    end
    // point update for the next iteration: xq^9 - b, -yq^9
    if (st == S_LOOP) begin
      if (cyc == 5'd9)  xq_q <= cube_out;
      if (cyc == 5'd10) xq_q <= e_addb(cube_out, -1);
      if (cyc == 5'd11) yq_q <= cube_out;
      if (cyc == 5'd12) yq_q <= e_neg(cube_out);
    end
    // linear terms of A*(-t r - r^2)
    if (st == S_LOOP && cyc == 5'd8) begin
      for (int s = 0; s < 2; s++) begin
        acc_q[s]   <= e_neg(e_b(a_eff[2+s]));
        acc_q[2+s] <= e_sub(e_neg(a_eff[2+s]), e_b(a_eff[4+s]));
        acc_q[4+s] <= e_neg(e_add(a_eff[s], a_eff[4+s]));
      end
    end
    // products leaving the multiplier
    if (mo_v) begin
      unique case (rt.op)
        T_TT: x_q <= e_neg(mo_c);
        T_U:  y_q <= mo_c;
        T_PT: a_q[0] <= e_neg(mo_c);
        T_TA: begin
          // rt.idx = 2i + s: t * a_(2i+s)
          unique case (rt.idx[2:1])
            2'd0: acc_q[2+rt.idx[0]] <= e_sub(acc_q[2+rt.idx[0]], mo_c);
            2'd1: acc_q[4+rt.idx[0]] <= e_sub(acc_q[4+rt.idx[0]], mo_c);
            default: begin
              acc_q[3'(rt.idx[0])] <= e_sub(acc_q[3'(rt.idx[0])], e_b(mo_c));
              acc_q[2+rt.idx[0]] <= e_sub(acc_q[2+rt.idx[0]], mo_c);
            end
          endcase
        end
        T_XP: begin
          acc_q[2*rt.idx]   <= e_add(acc_q[2*rt.idx], mo_c);
          acc_q[2*rt.idx+1] <= e_sub(acc_q[2*rt.idx+1], mo_c);
        end
        T_YQ: begin
          acc_q[2*rt.idx+1] <= e_sub(acc_q[2*rt.idx+1], mo_c);
          f_out[2*rt.idx]   <= done_val;
          a_q[2*rt.idx]     <= cube_out;
        end
        T_K: begin
          f_out[2*rt.idx+1] <= done_val;
          a_q[2*rt.idx+1]   <= cube_out;
        end
        default: ;
      endcase
    end
  end

  // the cubing unit serves one client per cycle
  a_cube_free: assert property (@(posedge clk) disable iff (!rst_n)
    completes |-> (st == S_LOOP ? (cyc >= 5'd1 && cyc <= 5'd6) : st == S_DRAIN))
    else $error("miller_coproc: cubing unit conflict");

endmodule
