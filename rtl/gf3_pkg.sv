// gf3_pkg: shared types, constants and GF(3) primitives for the eta_T pairing
// accelerator.
//
// A GF(3) element (a trit) is held in two bits {h,l} with 0=00, 1=01, 2=10
// (11 never occurs). Addition uses the seven-gate OR/XOR expression that goes
// with this encoding; multiplication is two AND-OR pairs. A GF(3^m) element is
// a packed array of m trits, coefficient i of the polynomial basis at index i.
// Reduction is by the trinomial x^m - x^n + 1 (so x^m = x^n - 1).
//
// The default field is m = 97, n = 12, b = +1, the test-chip field. The
// 126-bit-security field m = 709, n = 117, b = -1 is selected by overriding
// the module parameters. The digit size D = 14 (seven digits for m = 97, one
// per multiplier stage) is this design's reading of "seven-stage
// parallel-serial multiplier".
package gf3_pkg;

  typedef logic [1:0] trit_t;

  localparam int unsigned M_DEFAULT = 97;   // extension degree of the test chip
  localparam int unsigned N_DEFAULT = 12;   // middle exponent of x^97 - x^12 + 1
  localparam int          B_DEFAULT = 1;    // curve y^2 = x^3 - x + b, b = +1 for m = 97
  localparam int unsigned D_DEFAULT = 14;   // digit size: ceil(97/14) = 7 pipeline stages

  // GF(3) addition, seven OR/XOR operations.
  function automatic trit_t f3_add(trit_t a, trit_t b);
    logic t;
    t = (a[0] | b[1]) ^ (a[1] | b[0]);
    return {(a[0] | b[0]) ^ t, (a[1] | b[1]) ^ t};
  endfunction

  // GF(3) negation swaps the two bits.
  function automatic trit_t f3_neg(trit_t a);
    return {a[0], a[1]};
  endfunction

  function automatic trit_t f3_sub(trit_t a, trit_t b);
    return f3_add(a, f3_neg(b));
  endfunction

  // GF(3) multiplication: c_l = ah&bh | al&bl, c_h = ah&bl | al&bh.
  function automatic trit_t f3_mul(trit_t a, trit_t b);
    return {(a[1] & b[0]) | (a[0] & b[1]), (a[1] & b[1]) | (a[0] & b[0])};
  endfunction

  // Sign of one adder operand.
  typedef enum logic [1:0] {
    SGN_ZERO = 2'b00,   // operand not used
    SGN_POS  = 2'b01,   // +operand
    SGN_NEG  = 2'b10    // -operand
  } sign_t;

  // ---------------------------------------------------------------------
  // Instruction word of the final-exponentiation coprocessor (32 bits).
  //   MUL : mem[dst] = mem[srca] * mem[srcb] on multiplier `unit` (0..2)
  //   ADD : mem[dst] = ACC = sA*mem[srca] + sB*mem[srcb] + sC*ACC + sD*1,
  //         imm[7:0] = {sD, sC, sB, sA} (sign_t each)
  //   CUBE: mem[dst] = mem[srca]^(3^(imm+1)), imm+1 cubings in a row
  //   NOP : nothing; END: wait for all results, then stop
  localparam int unsigned FE_AW = 6;     // 64 data words
  localparam int unsigned FE_PW = 10;    // 1024 instructions

  typedef enum logic [2:0] {
    FE_NOP  = 3'd0,
    FE_MUL  = 3'd1,
    FE_ADD  = 3'd2,
    FE_CUBE = 3'd3,
    FE_END  = 3'd7
  } fe_op_t;

  typedef struct packed {
    fe_op_t           op;
    logic [1:0]       unit;
    logic [FE_AW-1:0] dst;
    logic [FE_AW-1:0] srca;
    logic [FE_AW-1:0] srcb;
    logic [8:0]       imm;
  } fe_instr_t;

endpackage
