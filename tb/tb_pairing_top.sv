// tb_pairing_top: end-to-end test of the pairing accelerator through its
// AHB-Lite port, with every parameter at its default (GF(3^97)).
//
// The bench loads the final-exponentiation program (gf3_ref_pkg::fe_fexp),
// writes three pairs of points and issues three starts back to back, so it
// computes three complete eta_T pairings. The final exponentiation (about
// 2200 cycles) is longer than the Miller loop (843), so the run exercises:
//   - pipelining: Miller loop of pairing k+1 during the FE run of pairing k,
//   - start waiting for a pending hand-off,
//   - the hand-off copy of F into FE data words 0..5,
//   - FE hazard stalls (the program has dependent operations).
// Each Miller result is checked against a reference Miller loop, each
// pairing value F^M against a square-and-multiply reference, the Miller time
// (843 cycles from start to done) is checked, and every mechanism must occur
// at least once. A second phase turns the automatic hand-off off, runs the
// Miller unit alone, reads F over AHB, writes it into FE data words through
// the staging buffer, runs the final exponentiation by hand and reads the
// pairing value back over AHB.
// The checks and the register map used are this design's; the two-stage
// pipelining they exercise follows the accelerator's description.
`timescale 1ns/1ps
module tb_pairing_top;
  import gf3_pkg::*;
  import gf3_ref_pkg::*;

  localparam int M = 97, N = 12, B = 1, EW = 7, NP = 3;
  localparam int ML_CYC = 17 * (M + 1) / 2 + 10;
  typedef gf3_ref#(M, N, B) R;

  logic HCLK = 0, HRESETn = 0, HSEL = 0, HWRITE = 0, HREADY;
  logic [31:0] HADDR = '0, HWDATA = '0, HRDATA;
  logic [1:0] HTRANS = '0;
  logic [2:0] HSIZE = 3'b010;
  logic HREADYOUT, HRESP, miller_done, fe_done, start_wait, overlap, fe_stall;
  assign HREADY = HREADYOUT;

  pairing_top dut (.*);

  always #5 HCLK = ~HCLK;

  int checks = 0, failures = 0, cyc = 0;
  int n_wait = 0, n_overlap = 0, n_stall = 0, n_copy = 0, n_mdone = 0, n_fdone = 0;
  always @(posedge HCLK) begin
    cyc <= cyc + 1;
    if (start_wait) n_wait++;
    if (overlap) n_overlap++;
    if (fe_stall) n_stall++;
    if (dut.u_ctrl.copying && dut.u_ctrl.copy_cnt == 3'd0) n_copy++;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ AHB BFM
  task automatic ahb_wr(logic [31:0] a, logic [31:0] d);
    @(negedge HCLK); HSEL = 1; HTRANS = 2'b10; HWRITE = 1; HADDR = a;
    @(negedge HCLK); HTRANS = 2'b00; HSEL = 0; HWRITE = 0; HWDATA = d;
  endtask
  task automatic ahb_rd(logic [31:0] a, output logic [31:0] d);
    @(negedge HCLK); HSEL = 1; HTRANS = 2'b10; HWRITE = 0; HADDR = a;
    @(negedge HCLK); HTRANS = 2'b00; HSEL = 0;
    #1 d = HRDATA;
  endtask
  task automatic wr_elem(logic [31:0] base, R::el_t v);
    logic [EW*32-1:0] w;
    w = '0; w[2*M-1:0] = R::pack(v);
    for (int k = 0; k < EW; k++) ahb_wr(base + 4 * k, w[32*k +: 32]);
  endtask
  task automatic rd_elem(logic [31:0] base, output R::el_t v);
    logic [EW*32-1:0] w;
    logic [31:0] d;
    for (int k = 0; k < EW; k++) begin ahb_rd(base + 4 * k, d); w[32*k +: 32] = d; end
    v = R::unpack(w[2*M-1:0]);
  endtask

  // ------------------------------------------------------------ program
  typedef fe_fexp#(M, N, B, 1) G;
  G gen;
  R::f6_t exp_r [NP];

  R::f6_t exp_f [NP];
  int     t_start [$];

  // each FE completion: compare the result word with the expected one
  always @(negedge HCLK) if (fe_done) begin
    if (n_fdone < NP)
      for (int j = 0; j < 6; j++)
        if (++checks > 0 && !R::eq(R::unpack(dut.u_fe.u_mem.mem[gen.res[j]]), exp_r[n_fdone][j])) begin
          failures++; $display("pairing %0d: final exponentiation f%0d wrong", n_fdone, j);
        end
    n_fdone++;
  end
  always @(negedge HCLK) if (miller_done) begin
    if (n_mdone < NP) begin
      for (int j = 0; j < 6; j++)
        if (++checks > 0 && dut.u_ctrl.ml_f[j] !== R::pack(exp_f[n_mdone][j])) begin
          failures++; $display("pairing %0d: Miller f%0d wrong", n_mdone, j);
        end
    end
    n_mdone++;
  end

  initial begin
    logic [31:0] d;
    R::el_t pts [NP][4];
    R::el_t v;
    int t0;
    repeat (3) @(posedge HCLK);
    HRESETn = 1;

    gen = new();
    gen.build();
    foreach (gen.pq[k]) ahb_wr(32'h4000 + 4 * k, 32'(gen.pq[k]));

    // ---------------- phase 1: three pipelined pairings
    for (int p = 0; p < NP; p++) begin
      for (int i = 0; i < 4; i++) pts[p][i] = R::rnd();
      exp_f[p] = R::miller(pts[p][0], pts[p][1], pts[p][2], pts[p][3]);
      exp_r[p] = G::pow6(exp_f[p], G::exponent());
    end
    for (int p = 0; p < NP; p++) begin
      // new points may be written as soon as the previous start was taken
      do ahb_rd(32'h8, d); while (d[0]);
      for (int i = 0; i < 4; i++) wr_elem(32'h1000 + 32'h100 * i, pts[p][i]);
      ahb_wr(32'h0, 32'h1);
      t_start.push_back(cyc);
    end
    // time of the first Miller run: start write to done
    while (n_fdone < NP) @(negedge HCLK);
    ahb_rd(32'hC, d);
    checks++;
    if (d != NP) begin failures++; $display("COUNT %0d", d); end
    for (int j = 0; j < 6; j++) begin
      rd_elem(32'h10000 + 32'h100 * gen.res[j], v);
      checks++;
      if (!R::eq(v, exp_r[NP-1][j])) begin failures++; $display("AHB read of F^M f%0d wrong", j); end
    end

    // ---------------- phase 2: manual mode
    ahb_wr(32'h4, 32'h0);                      // auto hand-off off
    for (int i = 0; i < 4; i++) pts[0][i] = R::rnd();
    exp_f[0] = R::miller(pts[0][0], pts[0][1], pts[0][2], pts[0][3]);
    for (int i = 0; i < 4; i++) wr_elem(32'h1000 + 32'h100 * i, pts[0][i]);
    t0 = n_mdone;
    ahb_wr(32'h0, 32'h1);
    begin
      int ts;
      ts = cyc;
      while (n_mdone == t0) @(negedge HCLK);
      checks++;
      // CTRL data phase, request register, then the Miller run
      if (cyc - ts != ML_CYC + 2) begin failures++; $display("Miller time %0d", cyc - ts); end
    end
    for (int j = 0; j < 6; j++) begin
      rd_elem(32'h2000 + 32'h100 * j, v);
      checks++;
      if (!R::eq(v, exp_f[0][j])) begin failures++; $display("manual: f%0d read wrong", j); end
    end
    ahb_rd(32'hC, d);
    checks++;
    if (d != NP) begin failures++; $display("FE ran without hand-off"); end
    // load F by hand into FE words 0..5 and run the program
    for (int j = 0; j < 6; j++) wr_elem(32'h10000 + 32'h100 * j, exp_f[0][j]);
    for (int j = 0; j < 6; j++) begin
      rd_elem(32'h10000 + 32'h100 * j, v);
      checks++;
      if (!R::eq(v, exp_f[0][j])) begin failures++; $display("FE word %0d readback wrong", j); end
    end
    ahb_wr(32'h0, 32'h2);
    do ahb_rd(32'h8, d); while (d[3] || n_fdone == NP);
    exp_r[0] = G::pow6(exp_f[0], G::exponent());
    for (int j = 0; j < 6; j++) begin
      rd_elem(32'h10000 + 32'h100 * gen.res[j], v);
      checks++;
      if (!R::eq(v, exp_r[0][j])) begin failures++; $display("manual FE run: f%0d wrong", j); end
    end

    // ---------------- mechanisms
    $display("events: start_wait=%0d overlap=%0d fe_stall=%0d handoffs=%0d miller_done=%0d fe_done=%0d",
             n_wait, n_overlap, n_stall, n_copy, n_mdone, n_fdone);
    checks++; if (n_wait == 0)    begin failures++; $display("no start wait"); end
    checks++; if (n_overlap == 0) begin failures++; $display("no pipelined overlap"); end
    checks++; if (n_stall == 0)   begin failures++; $display("no FE stall"); end
    checks++; if (n_copy != NP)   begin failures++; $display("hand-offs %0d", n_copy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
