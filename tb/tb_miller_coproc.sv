// tb_miller_coproc: self-checking test of the Miller's loop coprocessor at
// the full size, GF(3^97), b = +1.
//
// For several random input quadruples (xp, yp, xq, yq) it runs the
// coprocessor and compares all six GF(3^97) coefficients of the result with
// a reference Miller loop that does the whole GF(3^6m) arithmetic
// generically (no sparse tricks). It also checks the run time: done must come
// 17*(M+1)/2 + 10 cycles after start, one loop iteration every 17 cycles.
// Two runs are started back to back to check that busy/done behave.
`timescale 1ns/1ps
module tb_miller_coproc;
  import gf3_ref_pkg::*;

  localparam int M = 97, N = 12, B = 1, NRUN = 3;
  localparam int EXP_CYC = 17 * (M + 1) / 2 + 10;
  typedef gf3_ref#(M, N, B) R;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0][1:0] xp, yp, xq, yq;
  logic [5:0][M-1:0][1:0] f_out;
  int checks = 0, failures = 0;
  int cyc = 0;

  miller_coproc #(.M(M), .N(N), .B(B)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    R::el_t a, b, c, d;
    R::f6_t ref_f;
    int t0;
    xp = '0; yp = '0; xq = '0; yq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NRUN; r++) begin
      a = R::rnd(); b = R::rnd(); c = R::rnd(); d = R::rnd();
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy before start"); end
      xp = R::pack(a); yp = R::pack(b); xq = R::pack(c); yq = R::pack(d);
      start = 1;
      t0 = cyc;
      @(negedge clk);
      start = 0;
      xp = '0; yp = '0; xq = '0; yq = '0;   // inputs are only sampled at start
      ref_f = R::miller(a, b, c, d);
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != EXP_CYC) begin
        failures++; $display("run %0d took %0d cycles, expected %0d", r, cyc - t0, EXP_CYC);
      end
      for (int j = 0; j < 6; j++) begin
        checks++;
        if (f_out[j] !== R::pack(ref_f[j])) begin failures++; $display("run %0d: f%0d mismatch", r, j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
