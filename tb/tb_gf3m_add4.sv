// tb_gf3m_add4: self-checking test of the four-input signed GF(3^m) adder.
//
// Drives random operands with every combination of the three signs on each
// of the four inputs (81 combinations, several rounds) and compares with a
// reference sum.
`timescale 1ns/1ps
module tb_gf3m_add4;
  import gf3_ref_pkg::*;
  import gf3_pkg::*;

  localparam int M = 97;
  typedef gf3_ref#(M, 12, 1) R;

  logic [3:0][M-1:0][1:0] a;
  sign_t sgn [4];
  logic [M-1:0][1:0] y;
  int checks = 0, failures = 0;

  gf3m_add4 #(.M(M)) dut (.a(a), .sgn(sgn), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    R::el_t x [4];
    R::el_t e;
    for (int round = 0; round < 4; round++)
      for (int combo = 0; combo < 81; combo++) begin
        int cc;
        cc = combo;
        e = R::zero();
        for (int k = 0; k < 4; k++) begin
          int s;
          s = cc % 3; cc = cc / 3;
          x[k] = R::rnd();
          a[k] = R::pack(x[k]);
          sgn[k] = (s == 0) ? SGN_ZERO : (s == 1) ? SGN_POS : SGN_NEG;
          e = R::add(e, R::scal((s == 2) ? -1 : s, x[k]));
        end
        #1;
        checks++;
        if (y !== R::pack(e)) begin failures++; $display("sum mismatch combo %0d", combo); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
