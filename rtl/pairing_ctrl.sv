// pairing_ctrl: main controller and register map of the pairing accelerator.
//
// It holds the input points written by the host, starts the Miller's-loop
// coprocessor, and hands each Miller result F to the final-exponentiation
// coprocessor: when the latter is idle, the six coefficients of F are copied
// into its data words 0..5 (one per cycle) and its program is started.
// Because the hand-off frees the Miller unit, the next pairing's Miller loop
// runs while the previous one's final exponentiation is still executing. A
// new start waits while a finished Miller result has not been handed off
// yet (the Miller unit would overwrite it).
//
// Register map (byte addresses, 32-bit words, element words little-endian,
// trit i of an element in bits 2i+1:2i of its 2M-bit image):
//   0x00000 CTRL   W  bit0 start a pairing, bit1 run the FE program alone
//   0x00004 CFG    RW bit0 auto hand-off of Miller results to the FE unit
//                     (reset 1)
//   0x00008 STATUS R  bit0 start pending, bit1 Miller busy, bit2 hand-off
//                     pending, bit3 FE busy
//   0x0000C COUNT  R  number of completed FE program runs
//   0x01000 + i*0x100 + 4w  W  input element i (0 xP, 1 yP, 2 xQ, 3 yQ), word w
//   0x02000 + j*0x100 + 4w  R  Miller result coefficient f_j, word w
//   0x04000 + 4k            W  FE program word k
//   0x10000 + a*0x100 + 4w  RW FE data word a, 32-bit word w. Writes go to a
//                     staging buffer; writing word EW-1 stores it into the
//                     FE memory. Reads return the word from the FE memory.
//                     Both only while the FE unit is idle and no hand-off
//                     runs; otherwise writes are dropped and reads are
//                     undefined.
// Reads of the register bus are answered in the next cycle (AHB data phase).
//
// The split into a Miller unit and a final-exponentiation unit working as
// a two-stage pipeline follows the accelerator's description. The register
// map, the hand-off by copying and the stall rule are this design's choices.
module pairing_ctrl
  import gf3_pkg::*;
#(
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned AW = 20
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // register bus
  input  logic                   rd_en,
  input  logic [AW-1:0]          rd_addr,
  output logic [31:0]            rdata,
  input  logic                   wr_en,
  input  logic [AW-1:0]          wr_addr,
  input  logic [31:0]            wr_data,
  // Miller coprocessor
  output logic                   ml_start,
  output logic [M-1:0][1:0]      ml_xp,
  output logic [M-1:0][1:0]      ml_yp,
  output logic [M-1:0][1:0]      ml_xq,
  output logic [M-1:0][1:0]      ml_yq,
  input  logic                   ml_busy,
  input  logic                   ml_done,
  input  logic [5:0][M-1:0][1:0] ml_f,
  // final-exponentiation coprocessor
  output logic                   fe_start,
  input  logic                   fe_busy,
  input  logic                   fe_done,
  output logic                   fe_host_re,
  output logic                   fe_host_we,
  output logic [FE_AW-1:0]       fe_host_addr,
  output logic [M-1:0][1:0]      fe_host_wdata,
  input  logic [M-1:0][1:0]      fe_host_rdata,
  output logic                   fe_prog_we,
  output logic [FE_PW-1:0]       fe_prog_addr,
  output fe_instr_t              fe_prog_wdata,
  // events, for monitoring
  output logic                   ev_start_wait,
  output logic                   ev_overlap
);

  localparam int unsigned EB = 2 * M;          // bits per element
  localparam int unsigned EW = (EB + 31) / 32; // 32-bit words per element

  typedef logic [EW*32-1:0] ewide_t;

  // ------------------------------------------------------------- registers
  ewide_t     opnd  [4];
  ewide_t     stage;
  logic       auto_fe, start_req, handoff, copying, fe_go;
  logic [2:0] copy_cnt;
  logic [31:0] count;

  // address fields
  function automatic logic [7:0] fld_word(logic [AW-1:0] a);
    return {2'b0, a[7:2]};
  endfunction
  // element index inside a region: 16 entries in the 4 KiB regions,
  // 64 entries (the FE data words) in the 64 KiB region
  function automatic logic [7:0] fld_idx(logic [AW-1:0] a);
    return (a[AW-1:16] == '0) ? {4'b0, a[11:8]} : {2'b0, a[13:8]};
  endfunction
  function automatic logic [3:0] fld_reg(logic [AW-1:0] a);
    return a[AW-1:16] == '0 ? a[15:12] : 4'hF;
  endfunction

  logic fe_free;
  assign fe_free = !fe_busy && !copying && !fe_go;

  logic wr_ctrl, wr_cfg, wr_opnd, wr_prog, wr_fedata;
  always_comb begin
    wr_ctrl   = wr_en && wr_addr == AW'('h0);
    wr_cfg    = wr_en && wr_addr == AW'('h4);
    wr_opnd   = wr_en && fld_reg(wr_addr) == 4'h1 && fld_idx(wr_addr) < 8'd4 &&
                fld_word(wr_addr) < 8'(EW);
    wr_prog   = wr_en && fld_reg(wr_addr) == 4'h4;
    wr_fedata = wr_en && wr_addr[AW-1:16] == 4'h1 && fld_word(wr_addr) < 8'(EW);
  end

  logic [7:0] wr_idx, rd_idx;
  assign wr_idx = fld_idx(wr_addr);

  always_ff @(posedge clk) begin
    if (wr_opnd) opnd[wr_idx[1:0]][32*fld_word(wr_addr) +: 32] <= wr_data;
    if (wr_fedata) stage[32*fld_word(wr_addr) +: 32] <= wr_data;
  end

  assign ml_xp = opnd[0][EB-1:0];
  assign ml_yp = opnd[1][EB-1:0];
  assign ml_xq = opnd[2][EB-1:0];
  assign ml_yq = opnd[3][EB-1:0];

  assign fe_prog_we    = wr_prog;
  assign fe_prog_addr  = wr_addr[FE_PW+1:2];
  assign fe_prog_wdata = fe_instr_t'(wr_data);

  // ------------------------------------------------------------ sequencing
  assign ml_start      = start_req && !ml_busy && !ml_done && !handoff;
  assign ev_start_wait = start_req && (handoff || ml_done);
  assign ev_overlap    = ml_busy && fe_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      auto_fe   <= 1'b1;
      start_req <= 1'b0;
      handoff   <= 1'b0;
      copying   <= 1'b0;
      copy_cnt  <= '0;
      fe_go     <= 1'b0;
      count     <= '0;
    end else begin
      fe_go <= 1'b0;
      if (wr_cfg) auto_fe <= wr_data[0];
      if (wr_ctrl && wr_data[0]) start_req <= 1'b1;
      else if (ml_start)         start_req <= 1'b0;
      if (wr_ctrl && wr_data[1] && fe_free && !handoff) fe_go <= 1'b1;
      if (ml_done) handoff <= auto_fe;
      if (handoff && !copying && fe_free) begin
        copying  <= 1'b1;
        copy_cnt <= '0;
      end
      if (copying) begin
        copy_cnt <= copy_cnt + 1'b1;
        if (copy_cnt == 3'd5) begin
          copying <= 1'b0;
          handoff <= 1'b0;
          fe_go   <= 1'b1;
        end
      end
      if (fe_done) count <= count + 1'b1;
    end
  end
  assign fe_start = fe_go;

  // FE host port: hand-off copy, else the bus
  logic fe_bus_rd, fe_bus_wr;
  assign fe_bus_rd = rd_en && rd_addr[AW-1:16] == 4'h1;
  assign fe_bus_wr = wr_fedata && fld_word(wr_addr) == 8'(EW - 1);
  always_comb begin
    ewide_t w;
    w             = stage;
    w[32*(EW-1) +: 32] = wr_data;
    fe_host_re    = fe_bus_rd && fe_free;
    fe_host_we    = 1'b0;
    fe_host_addr  = FE_AW'(fld_idx(rd_addr));
    fe_host_wdata = ml_f[copy_cnt];
    if (copying) begin
      fe_host_we   = 1'b1;
      fe_host_addr = FE_AW'(copy_cnt);
    end else if (fe_bus_wr && fe_free) begin
      fe_host_we    = 1'b1;
      fe_host_addr  = FE_AW'(wr_idx);
      fe_host_wdata = w[EB-1:0];
    end
  end

  // ------------------------------------------------------------ read data
  logic [AW-1:0] ra_q;
  always_ff @(posedge clk) if (rd_en) ra_q <= rd_addr;
  assign rd_idx = fld_idx(ra_q);

  always_comb begin
    ewide_t w;
    rdata = '0;
    w     = '0;
    if (ra_q[AW-1:16] == 4'h1) begin
      w[EB-1:0] = fe_host_rdata;
      rdata = w[32*fld_word(ra_q) +: 32];
    end else begin
      unique case (fld_reg(ra_q))
        4'h0: begin
          unique case (ra_q[11:0])
            12'h004: rdata = {31'b0, auto_fe};
            12'h008: rdata = {28'b0, fe_busy, handoff, ml_busy, start_req};
            12'h00C: rdata = count;
            default: rdata = '0;
          endcase
        end
        4'h2: if (rd_idx < 8'd6) begin
          w[EB-1:0] = ml_f[rd_idx[2:0]];
          rdata = w[32*fld_word(ra_q) +: 32];
        end
        default: rdata = '0;
      endcase
    end
  end

endmodule
