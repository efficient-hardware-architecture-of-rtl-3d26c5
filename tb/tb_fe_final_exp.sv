// tb_fe_final_exp: the final exponentiation of the eta_T pairing over
// GF(3^97) run as a program on the final-exponentiation coprocessor.
//
// The program comes from gf3_ref_pkg::fe_fexp; the bench loads it, writes a
// Miller-loop output F into words 0..5, runs it and compares the six result
// words with the reference. The program raises an element
// F of GF(3^6m) to M = (3^6m - 1)/N, N = 3^m + 1 + mu b 3^((m+1)/2), using the
// factorisation M = (3^3m - 1)(3^m + 1)(3^m + 1 - mu b 3^((m+1)/2)):
//   U = conj(F) / F                   (F^(3^3m) is the conjugate over s)
//   V = U^(3^m) * U
//   W = V^(3^m) * V * conj(V^(3^((m+1)/2)))^(mu b)
// Powers 3^k are Frobenius maps: every coefficient is cubed k times by the
// iterating cubing unit and the basis is mapped with s -> (-1)^k s,
// r -> r + k b, r^2 -> r^2 - k b r + k^2. Writing F = A0 + A1 s with A0, A1
// in GF(3^3m), the first factor is taken in one step,
//   U = (A0 - A1 s)^2 / (A0^2 + A1^2) = ((A0^2 - A1^2) + A0 A1 s) / (A0^2 + A1^2),
// with the GF(3^3m) inverse of a0 + a1 r + a2 r^2 formed from its cofactors
//   b0 = (a0 + a2)^2 - a1^2 - b a1 a2, b1 = b a2^2 - a0 a1,
//   b2 = a1^2 - a0 a2 - a2^2,  w = a0 b0 + b (a2 b1 + a1 b2) in GF(3^m),
// and 1/w by Fermat's little theorem (a chain of cube runs and products).
// U, V and W are unitary, so their inverses are conjugates. GF(3^6m)
// products use Karatsuba over s (three GF(3^3m) products of nine each).
// The reference raises F to M by plain square-and-multiply on big integers,
// sharing nothing with the program. F is the Miller-loop output for random
// inputs. The run time and the operation counts are printed.
// The torus form of the first factor, the cofactor inversion and the
// Frobenius formulas follow the pairing accelerator's description; the
// 3^m + 1 powers by Frobenius and one product (instead of a dedicated
// torus formula) and the instruction order are this bench's own.
`timescale 1ns/1ps
module tb_fe_final_exp;
  import gf3_pkg::*;
  import gf3_ref_pkg::*;

  localparam int M = 97, N = 12, B = 1, MU = 1;
  typedef gf3_ref#(M, N, B) R;

  logic clk = 0, rst_n = 0, start = 0, busy, done, stall;
  logic host_re = 0, host_we = 0, prog_we = 0;
  logic [FE_AW-1:0] host_addr = '0;
  logic [M-1:0][1:0] host_wdata = '0, host_rdata;
  logic [FE_PW-1:0] prog_addr = '0;
  fe_instr_t prog_wdata;
  int checks = 0, failures = 0, cyc = 0;

  fe_coproc #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef fe_fexp#(M, N, B, MU) G;
  G gen;

  task automatic wr(int a, R::el_t v);
    @(negedge clk); host_we = 1; host_addr = FE_AW'(a); host_wdata = R::pack(v);
    @(negedge clk); host_we = 0;
  endtask
  task automatic rd(int a, output R::el_t v);
    @(negedge clk); host_re = 1; host_addr = FE_AW'(a);
    @(negedge clk); host_re = 0; v = R::unpack(host_rdata);
  endtask

  initial begin
    R::f6_t fin, ref_r;
    R::el_t x;
    int t0, nm, na, nc;
    prog_wdata = '0;
    gen = new();
    gen.build();
    gen.counts(nm, na, nc);
    $display("final-exponentiation program: %0d instructions, %0d multiplications, %0d additions, %0d cubings",
             gen.pq.size(), nm, na, nc);
    if (gen.pq.size() > (1 << FE_PW)) $fatal(1, "program too long");

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < gen.pq.size(); k++) begin
      @(negedge clk); prog_we = 1; prog_addr = FE_PW'(k); prog_wdata = gen.pq[k];
    end
    @(negedge clk); prog_we = 0;

    // ---- input: a Miller-loop value of random points
    fin = R::miller(R::rnd(), R::rnd(), R::rnd(), R::rnd());
    for (int j = 0; j < 6; j++) wr(j, fin[j]);
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    $display("final exponentiation: %0d cycles", cyc - t0);

    // ---- reference: F^((3^6m - 1)/N)
    ref_r = G::pow6(fin, G::exponent());
    for (int j = 0; j < 6; j++) begin
      rd(gen.res[j], x);
      checks++;
      if (!R::eq(x, ref_r[j])) begin failures++; $display("coefficient %0d of F^M wrong", j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
