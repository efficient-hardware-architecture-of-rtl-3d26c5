// tb_fe_coproc: self-checking test of the programmable final-exponentiation
// coprocessor over GF(3^97).
//
// Part 1 loads random words, runs a short program that mixes independent
// and dependent multiplications on all three multipliers, signed four-input
// additions with accumulation and the constant one, and multi-step cubings,
// and compares every result word with a reference model. It checks that a
// lone multiplication takes its 8-cycle issue-to-write latency and that
// independent products are issued back to back.
// Part 2 runs a field inversion by Fermat's little theorem, a^(3^m - 2),
// built from multiplications and cubings only (an Itoh-Tsujii style chain
// generated by the bench), and checks a * a^-1 = 1 for several a.
`timescale 1ns/1ps
module tb_fe_coproc;
  import gf3_pkg::*;
  import gf3_ref_pkg::*;

  localparam int M = 97, N = 12;
  typedef gf3_ref#(M, N, 1) R;

  logic clk = 0, rst_n = 0, start = 0, busy, done, stall;
  logic host_re = 0, host_we = 0, prog_we = 0;
  logic [FE_AW-1:0] host_addr = '0;
  logic [M-1:0][1:0] host_wdata = '0, host_rdata;
  logic [FE_PW-1:0] prog_addr = '0;
  fe_instr_t prog_wdata;
  int checks = 0, failures = 0, cyc = 0, stalls = 0;

  fe_coproc #(.M(M), .N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stall) stalls <= stalls + 1;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fe_instr_t pq [$];
  function automatic fe_instr_t mk(fe_op_t op, int dst, int a, int b, int imm, int unit = 0);
    fe_instr_t i;
    i.op = op; i.unit = 2'(unit); i.dst = FE_AW'(dst); i.srca = FE_AW'(a); i.srcb = FE_AW'(b);
    i.imm = 9'(imm);
    return i;
  endfunction
  // ADD signs: 0 none, 1 plus, 2 minus, for A, B, ACC, ONE
  function automatic int sg(int sa, int sb, int sc, int sd);
    return sa | (sb << 2) | (sc << 4) | (sd << 6);
  endfunction

  task automatic load_prog();
    for (int k = 0; k < pq.size(); k++) begin
      @(negedge clk); prog_we = 1; prog_addr = FE_PW'(k); prog_wdata = pq[k];
    end
    @(negedge clk); prog_we = 0;
  endtask
  task automatic wr(int a, R::el_t v);
    @(negedge clk); host_we = 1; host_addr = FE_AW'(a); host_wdata = R::pack(v);
    @(negedge clk); host_we = 0;
  endtask
  task automatic rd(int a, output R::el_t v);
    @(negedge clk); host_re = 1; host_addr = FE_AW'(a);
    @(negedge clk); host_re = 0; v = R::unpack(host_rdata);
  endtask
  task automatic run(output int ncyc);
    int t0;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    ncyc = cyc - t0;
  endtask

  R::el_t mem_ref [64];

  initial begin
    R::el_t v, acc;
    int n, st0;
    prog_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- part 0: one multiplication, latency
    for (int k = 0; k < 4; k++) begin mem_ref[k] = R::rnd(); wr(k, mem_ref[k]); end
    pq.delete();
    pq.push_back(mk(FE_MUL, 10, 0, 1, 0, 0));
    pq.push_back(mk(FE_END, 0, 0, 0, 0));
    load_prog();
    run(n);
    // start edge, issue, 8 cycles to the write, END sees all idle one cycle later
    checks++;
    if (n != 11) begin failures++; $display("single MUL program took %0d cycles", n); end
    rd(10, v);
    checks++;
    if (!R::eq(v, R::mul(mem_ref[0], mem_ref[1]))) begin failures++; $display("single MUL wrong"); end

    // ---------------- part 1: mixed program
    for (int k = 0; k < 8; k++) begin mem_ref[k] = R::rnd(); wr(k, mem_ref[k]); end
    pq.delete();
    pq.push_back(mk(FE_MUL, 10, 0, 1, 0, 0));            // r10 = r0 r1
    pq.push_back(mk(FE_MUL, 11, 2, 3, 0, 1));            // r11 = r2 r3
    pq.push_back(mk(FE_MUL, 12, 4, 5, 0, 2));            // r12 = r4 r5
    pq.push_back(mk(FE_MUL, 13, 10, 11, 0, 0));          // r13 = r10 r11 (waits)
    pq.push_back(mk(FE_ADD, 14, 6, 7, sg(1, 2, 0, 1)));  // r14 = r6 - r7 + 1
    pq.push_back(mk(FE_ADD, 15, 12, 13, sg(2, 1, 1, 0))); // r15 = -r12 + r13 + acc
    pq.push_back(mk(FE_CUBE, 16, 15, 0, 4));             // r16 = r15^(3^5)
    pq.push_back(mk(FE_MUL, 17, 16, 14, 0, 1));          // r17 = r16 r14
    pq.push_back(mk(FE_CUBE, 18, 0, 0, 0));              // r18 = r0^3
    pq.push_back(mk(FE_ADD, 19, 18, 17, sg(1, 1, 2, 2))); // r19 = r18 + r17 - acc - 1
    pq.push_back(mk(FE_NOP, 0, 0, 0, 0));
    pq.push_back(mk(FE_MUL, 20, 19, 19, 0, 2));          // r20 = r19^2
    pq.push_back(mk(FE_END, 0, 0, 0, 0));
    load_prog();
    st0 = stalls;
    run(n);
    mem_ref[10] = R::mul(mem_ref[0], mem_ref[1]);
    mem_ref[11] = R::mul(mem_ref[2], mem_ref[3]);
    mem_ref[12] = R::mul(mem_ref[4], mem_ref[5]);
    mem_ref[13] = R::mul(mem_ref[10], mem_ref[11]);
    mem_ref[14] = R::add(R::sub(mem_ref[6], mem_ref[7]), R::konst(1));
    acc = mem_ref[14];
    mem_ref[15] = R::add(R::add(R::neg(mem_ref[12]), mem_ref[13]), acc);
    acc = mem_ref[15];
    v = mem_ref[15];
    for (int k = 0; k < 5; k++) v = R::cube(v);
    mem_ref[16] = v;
    mem_ref[17] = R::mul(mem_ref[16], mem_ref[14]);
    mem_ref[18] = R::cube(mem_ref[0]);
    mem_ref[19] = R::sub(R::sub(R::add(mem_ref[18], mem_ref[17]), acc), R::konst(1));
    mem_ref[20] = R::mul(mem_ref[19], mem_ref[19]);
    for (int k = 10; k <= 20; k++) begin
      rd(k, v);
      checks++;
      if (!R::eq(v, mem_ref[k])) begin failures++; $display("part 1: r%0d wrong", k); end
    end
    checks++;
    if (stalls - st0 == 0) begin failures++; $display("part 1: no hazard stall seen"); end
    $display("part 1: %0d cycles, %0d stall cycles", n, stalls - st0);

    // ---------------- part 2: inversion a^(3^m - 2)
    begin
      int k, nb, bits [$];
      pq.delete();
      // r1 = beta_k = a^((3^k - 1)/2), k from 1 up to m-1 by doubling / +1
      pq.push_back(mk(FE_ADD, 1, 0, 0, sg(1, 0, 0, 0)));    // r1 = a
      nb = M - 1;
      while (nb > 0) begin bits.push_front(nb & 1); nb = nb >> 1; end
      k = 1;
      for (int i = 1; i < bits.size(); i++) begin
        pq.push_back(mk(FE_CUBE, 2, 1, 0, k - 1));           // r2 = beta_k^(3^k)
        pq.push_back(mk(FE_MUL, 1, 2, 1, 0, i % 3));         // beta_2k
        k = 2 * k;
        if (bits[i]) begin
          pq.push_back(mk(FE_CUBE, 2, 1, 0, 0));
          pq.push_back(mk(FE_MUL, 1, 2, 0, 0, (i + 1) % 3)); // beta_(k+1)
          k = k + 1;
        end
      end
      pq.push_back(mk(FE_MUL, 2, 1, 1, 0, 0));     // a^(3^(m-1) - 1)
      pq.push_back(mk(FE_CUBE, 2, 2, 0, 0));       // a^(3^m - 3)
      pq.push_back(mk(FE_MUL, 3, 2, 0, 0, 1));     // a^(3^m - 2) = a^-1
      pq.push_back(mk(FE_END, 0, 0, 0, 0));
      load_prog();
      for (int r = 0; r < 3; r++) begin
        R::el_t a;
        a = R::rnd();
        if (r == 0) a = R::konst(2);
        wr(0, a);
        run(n);
        rd(3, v);
        checks++;
        if (!R::eq(R::mul(a, v), R::konst(1))) begin failures++; $display("inversion %0d wrong", r); end
        if (r == 0) $display("inversion: %0d instructions, %0d cycles", pq.size(), n);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
