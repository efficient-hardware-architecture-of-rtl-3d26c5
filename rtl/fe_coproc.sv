// fe_coproc: programmable coprocessor for the final exponentiation of the
// eta_T pairing over GF(3^m).
//
// Datapath: three seven-stage pipelined multipliers (gf3m_mul), a four-input
// signed adder (gf3m_add4) with an accumulator register, an iterating cubing
// unit (gf3m_cube) for long runs of cubings, and a data memory with two read
// ports (dp_ram, 64 words of GF(3^m)) that holds inputs, constants,
// intermediate values and results. The sequence of field operations comes
// from a program memory of 1024 32-bit instructions (gf3_pkg::fe_instr_t):
// MUL, ADD (four signed inputs: two memory words, the accumulator and the
// constant 1), CUBE (1..512 cubings in a row), NOP and END.
//
// Sequencing: instructions issue in order, at most one per cycle. An
// instruction issues when none of its sources and not its destination is
// waiting for a result (a scoreboard bit per memory word) and when the write
// port is free at the cycle its result will arrive (a reservation shift
// register: a product is written 8 cycles after issue, a sum 2 cycles after
// issue). Products of different multipliers may overlap freely. The cubing
// unit works in the background; its result takes the write port on a cycle
// no product or sum uses it, and a second CUBE waits for it. So a program is
// written as plain sequential code and the hardware finds the overlap.
//
// Interface: when idle, the host reads and writes data words through host_*
// (read data one cycle after host_re) and loads instructions through prog_*.
// start (when busy is low) runs the program from address 0; done pulses once
// END is reached and every result has been written. stall is high in cycles
// where the instruction at pc waits for a hazard.
//
// From the accelerator's description: three seven-stage multipliers, a
// four-input adder, a cubing unit, a dual-read data memory, and a datapath
// that is programmable for any field length. This design's own: the
// instruction set, the scoreboard and write-port reservation, the memory and
// program sizes. The final-exponentiation program itself is software for
// this engine and is not part of the RTL.
// The write-port assertion is disabled during reset; lint therefore reports
// rst_n as used both asynchronously and synchronously, which concerns only
// that check, not the circuit.
module fe_coproc
  import gf3_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT,
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned D = D_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 stall,
  // host access to the data memory (only while idle)
  input  logic                 host_re,
  input  logic                 host_we,
  input  logic [FE_AW-1:0]     host_addr,
  input  logic [M-1:0][1:0]    host_wdata,
  output logic [M-1:0][1:0]    host_rdata,
  // program load
  input  logic                 prog_we,
  input  logic [FE_PW-1:0]     prog_addr,
  input  fe_instr_t            prog_wdata
);

  localparam int unsigned LAT    = (M + D - 1) / D;  // multiplier latency
  localparam int unsigned WB_MUL = LAT + 1;          // issue -> write, product
  localparam int unsigned WB_ADD = 2;                // issue -> write, sum
  localparam int unsigned DEPTH  = 1 << FE_AW;

  typedef logic [M-1:0][1:0] elem_t;

  // ---------------------------------------------------------------- program
  fe_instr_t prog [1 << FE_PW];
  always_ff @(posedge clk) if (prog_we) prog[prog_addr] <= prog_wdata;

  logic             running;
  logic [FE_PW-1:0] pc;
  fe_instr_t        ins;
  assign ins  = prog[pc];
  assign busy = running;

  // ------------------------------------------------------------- scoreboard
  logic [DEPTH-1:0] pending;
  logic [WB_MUL:0]  resv;
  logic             cube_busy;

  logic use_a, use_b, writes, hazard, issue;
  always_comb begin
    use_a  = ins.op inside {FE_MUL, FE_ADD, FE_CUBE};
    use_b  = ins.op inside {FE_MUL, FE_ADD};
    writes = use_a;
    hazard = (use_a && pending[ins.srca]) || (use_b && pending[ins.srcb]) ||
             (writes && pending[ins.dst]) ||
             (ins.op == FE_MUL  && resv[WB_MUL]) ||
             (ins.op == FE_ADD  && resv[WB_ADD]) ||
             (ins.op == FE_CUBE && cube_busy);
    issue  = running && writes && !hazard;
    stall  = running && writes && hazard;
  end

  // ----------------------------------------------------------- data memory
  logic  we;
  logic [FE_AW-1:0] waddr;
  elem_t wdata, rd_a, rd_b;

  dp_ram #(.W(2*M), .DEPTH(DEPTH)) u_mem (
    .clk(clk),
    .re_a(running ? issue : host_re), .addr_a(running ? ins.srca : host_addr), .rdata_a(rd_a),
    .re_b(issue), .addr_b(ins.srcb), .rdata_b(rd_b),
    .we(we), .waddr(waddr), .wdata(wdata)
  );
  assign host_rdata = rd_a;

  // ------------------------------------------------------ execute (E1) stage
  logic            e1_v;
  fe_instr_t       e1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) e1_v <= 1'b0;
    else        e1_v <= issue;
  end
  always_ff @(posedge clk) if (issue) e1 <= ins;

  // multipliers
  logic  [2:0]       mv_in, mv_out;
  elem_t             mc  [3];
  logic [FE_AW-1:0]  mt  [3];
  for (genvar u = 0; u < 3; u++) begin : g_mul
    assign mv_in[u] = e1_v && e1.op == FE_MUL && (e1.unit == 2'(u) || (u == 0 && e1.unit == 2'd3));
    gf3m_mul #(.M(M), .N(N), .D(D), .TAGW(FE_AW)) u_mul (
      .clk(clk), .rst_n(rst_n),
      .in_valid(mv_in[u]), .in_a(rd_a), .in_b(rd_b), .in_tag(e1.dst),
      .out_valid(mv_out[u]), .out_c(mc[u]), .out_tag(mt[u])
    );
  end

  // four-input adder: memory A, memory B, accumulator, constant one
  elem_t acc_q, add_y, one;
  logic  [3:0][M-1:0][1:0] add_in;
  sign_t add_sgn [4];
  logic  add_v;
  logic [FE_AW-1:0] add_dst;
  always_comb begin
    one     = '0;
    one[0]  = 2'b01;
    add_in  = {one, acc_q, rd_b, rd_a};
    for (int k = 0; k < 4; k++) add_sgn[k] = sign_t'(e1.imm[2*k +: 2]);
  end
  gf3m_add4 #(.M(M)) u_add (.a(add_in), .sgn(add_sgn), .y(add_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) add_v <= 1'b0;
    else        add_v <= e1_v && e1.op == FE_ADD;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       acc_q <= '0;
    else if (e1_v && e1.op == FE_ADD) acc_q <= add_y;
  end
  always_ff @(posedge clk) if (e1_v && e1.op == FE_ADD) add_dst <= e1.dst;

  // iterating cubing unit
  elem_t            cube_q, cube_in, cube_out;
  logic [8:0]       cube_cnt;
  logic             cube_run, cube_rdy, cube_wr;
  logic [FE_AW-1:0] cube_dst;
  assign cube_in = cube_run ? cube_q : rd_a;
  gf3m_cube #(.M(M), .N(N)) u_cube (.a(cube_in), .c(cube_out));
  assign cube_busy = cube_run || cube_rdy || (e1_v && e1.op == FE_CUBE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cube_run <= 1'b0;
      cube_rdy <= 1'b0;
      cube_cnt <= '0;
    end else begin
      if (e1_v && e1.op == FE_CUBE) begin
        cube_cnt <= e1.imm;
        cube_run <= (e1.imm != '0);
        cube_rdy <= (e1.imm == '0);
      end else if (cube_run) begin
        cube_cnt <= cube_cnt - 1'b1;
        if (cube_cnt == 9'd1) begin
          cube_run <= 1'b0;
          cube_rdy <= 1'b1;
        end
      end else if (cube_wr) begin
        cube_rdy <= 1'b0;
      end
    end
  end
  always_ff @(posedge clk) begin
    if ((e1_v && e1.op == FE_CUBE) || cube_run) cube_q <= cube_out;
    if (e1_v && e1.op == FE_CUBE) cube_dst <= e1.dst;
  end

  // ---------------------------------------------------------- write-back
  always_comb begin
    we      = 1'b0;
    waddr   = host_addr;
    wdata   = host_wdata;
    cube_wr = 1'b0;
    if (!running) begin
      we = host_we;
    end
    if (mv_out[0])      begin we = 1'b1; waddr = mt[0];   wdata = mc[0];  end
    else if (mv_out[1]) begin we = 1'b1; waddr = mt[1];   wdata = mc[1];  end
    else if (mv_out[2]) begin we = 1'b1; waddr = mt[2];   wdata = mc[2];  end
    else if (add_v)     begin we = 1'b1; waddr = add_dst; wdata = acc_q;  end
    else if (cube_rdy && running) begin
      we = 1'b1; waddr = cube_dst; wdata = cube_q; cube_wr = 1'b1;
    end
  end

  // ------------------------------------------------------------- sequencer
  logic all_idle;
  assign all_idle = (pending == '0) && !cube_busy && !e1_v && (resv == '0);

  // next state of the scoreboard and of the write-port reservations
  logic [DEPTH-1:0] pend_n;
  logic [WB_MUL:0]  resv_n;
  always_comb begin
    pend_n = pending;
    if (we && running) pend_n[waddr] = 1'b0;
    if (issue)         pend_n[ins.dst] = 1'b1;
    resv_n = resv >> 1;
    if (issue && ins.op == FE_MUL) resv_n[WB_MUL-1] = 1'b1;
    if (issue && ins.op == FE_ADD) resv_n[WB_ADD-1] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      pc      <= '0;
      pending <= '0;
      resv    <= '0;
      done    <= 1'b0;
    end else begin
      done    <= 1'b0;
      pending <= pend_n;
      resv    <= resv_n;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          pc      <= '0;
        end
      end else if (ins.op == FE_END) begin
        if (all_idle) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end else if (ins.op == FE_NOP || issue) begin
        pc <= pc + 1'b1;
      end
    end
  end

  // at most one product or sum reaches the write port per cycle
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    running |-> $countones({mv_out, add_v}) <= 1)
    else $error("fe_coproc: write-port collision");

endmodule
