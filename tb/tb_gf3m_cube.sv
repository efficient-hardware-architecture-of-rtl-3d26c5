// tb_gf3m_cube: self-checking test of the GF(3^97) cubing network.
//
// Applies random elements and the corner cases 0, 1, x^(M-1) and the
// all-twos element, and compares a^3 with the reference a*a*a. The unit is
// combinational; the bench applies one input per clock.
`timescale 1ns/1ps
module tb_gf3m_cube;
  import gf3_ref_pkg::*;

  localparam int M = 97, N = 12, NV = 200;
  typedef gf3_ref#(M, N, 1) R;

  logic clk = 0;
  logic [M-1:0][1:0] a, c;
  int checks = 0, failures = 0;

  gf3m_cube #(.M(M), .N(N)) dut (.a(a), .c(c));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    R::el_t x;
    for (int k = 0; k < NV; k++) begin
      @(negedge clk);
      case (k)
        0: x = R::zero();
        1: x = R::konst(1);
        2: begin x = R::zero(); x[M-1] = 1; end
        3: for (int i = 0; i < M; i++) x[i] = 2;
        default: x = R::rnd();
      endcase
      a = R::pack(x);
      #1;
      checks++;
      if (c !== R::pack(R::cube(x))) begin failures++; $display("cube mismatch at vector %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
