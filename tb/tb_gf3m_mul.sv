// tb_gf3m_mul: self-checking test of the pipelined GF(3^97) multiplier.
//
// Streams random operand pairs (plus the corner cases 0, 1 and x^(M-1)) into
// the multiplier back to back, one per cycle, and compares each product with
// a schoolbook reference. Also checks that every result appears exactly
// STAGES = 7 cycles after its operands and that the tag comes back with it.
`timescale 1ns/1ps
module tb_gf3m_mul;
  import gf3_ref_pkg::*;

  localparam int M = 97, N = 12, D = 14, STAGES = 7, NV = 300;
  typedef gf3_ref#(M, N, 1) R;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [M-1:0][1:0] in_a, in_b, out_c;
  logic [15:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  int cyc = 0;

  gf3m_mul #(.M(M), .N(N), .D(D), .TAGW(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  R::pk_t exp_q [$];
  int     exp_t [$];
  int     issue_cyc [$];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    R::pk_t e;
    int t, ic;
    e = exp_q.pop_front(); t = exp_t.pop_front(); ic = issue_cyc.pop_front();
    checks++;
    if (out_c !== e) begin failures++; $display("mismatch product tag %0d", out_tag); end
    checks++;
    if (out_tag != 16'(t)) begin failures++; $display("tag %0d expected %0d", out_tag, t); end
    checks++;
    if (cyc - ic != STAGES) begin failures++; $display("latency %0d", cyc - ic); end
  end

  initial begin
    R::el_t a, b;
    in_a = '0; in_b = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NV; k++) begin
      @(negedge clk);
      if (k == 0) begin a = R::zero(); b = R::rnd(); end
      else if (k == 1) begin a = R::konst(1); b = R::rnd(); end
      else if (k == 2) begin a = R::zero(); a[M-1] = 2; b = R::zero(); b[M-1] = 1; end
      else begin a = R::rnd(); b = R::rnd(); end
      in_valid = (k % 17 != 5);   // an occasional bubble
      in_a = R::pack(a); in_b = R::pack(b); in_tag = 16'(k);
      if (in_valid) begin
        exp_q.push_back(R::pack(R::mul(a, b)));
        exp_t.push_back(k);
        issue_cyc.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (STAGES + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
