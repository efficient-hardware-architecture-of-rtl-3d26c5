// pairing_top: eta_T pairing accelerator over GF(3^m) with an AHB-Lite slave
// interface.
//
// A pairing is computed in two stages that form a pipeline: the Miller's-loop
// coprocessor (miller_coproc, one iteration every 17 cycles, 843 cycles for
// m = 97) produces the unreduced pairing value F in GF(3^6m); the main
// controller (pairing_ctrl) copies F into the final-exponentiation
// coprocessor (fe_coproc), which runs the program loaded by the host to
// raise F to the final exponent, while the Miller unit already starts on the
// next pair of points. The host writes the points and the program and reads
// results through the AHB slave (ahb_slave); see pairing_ctrl for the
// register map.
//
// Ports: AHB-Lite slave signals; miller_done and fe_done pulse when the
// respective stage finishes (usable as interrupts); start_wait and overlap
// are high in cycles where a start waits for the hand-off, and where both
// stages are busy at once; fe_stall is high in cycles where the
// final-exponentiation unit holds an instruction back for a data or
// write-port hazard.
//
// Defaults: m = 97, trinomial x^97 - x^12 + 1, curve y^2 = x^3 - x + 1, the
// field of the accelerator's test chip. The 126-bit-security configuration
// is M = 709, N = 117, B = -1 (D = 102 keeps seven multiplier stages).
module pairing_top
  import gf3_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT,
  parameter int unsigned N = N_DEFAULT,
  parameter int          B = B_DEFAULT,
  parameter int unsigned D = D_DEFAULT
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [2:0]  HSIZE,
  input  logic [31:0] HWDATA,
  input  logic        HREADY,
  output logic        HREADYOUT,
  output logic        HRESP,
  output logic [31:0] HRDATA,
  output logic        miller_done,
  output logic        fe_done,
  output logic        start_wait,
  output logic        overlap,
  output logic        fe_stall
);

  localparam int unsigned AW = 20;

  logic          rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [31:0]   rdata, wr_data;

  ahb_slave #(.AW(AW)) u_ahb (
    .HCLK, .HRESETn, .HSEL, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HWDATA, .HREADY,
    .HREADYOUT, .HRESP, .HRDATA,
    .rd_en, .rd_addr, .rdata, .wr_en, .wr_addr, .wr_data
  );

  logic                   ml_start, ml_busy, ml_done;
  logic [M-1:0][1:0]      ml_xp, ml_yp, ml_xq, ml_yq;
  logic [5:0][M-1:0][1:0] ml_f;
  logic                   fe_start, fe_busy;
  logic                   fe_host_re, fe_host_we, fe_prog_we;
  logic [FE_AW-1:0]       fe_host_addr;
  logic [M-1:0][1:0]      fe_host_wdata, fe_host_rdata;
  logic [FE_PW-1:0]       fe_prog_addr;
  fe_instr_t              fe_prog_wdata;

  pairing_ctrl #(.M(M), .AW(AW)) u_ctrl (
    .clk(HCLK), .rst_n(HRESETn),
    .rd_en, .rd_addr, .rdata, .wr_en, .wr_addr, .wr_data,
    .ml_start, .ml_xp, .ml_yp, .ml_xq, .ml_yq, .ml_busy, .ml_done, .ml_f,
    .fe_start, .fe_busy, .fe_done,
    .fe_host_re, .fe_host_we, .fe_host_addr, .fe_host_wdata, .fe_host_rdata,
    .fe_prog_we, .fe_prog_addr, .fe_prog_wdata,
    .ev_start_wait(start_wait), .ev_overlap(overlap)
  );

  miller_coproc #(.M(M), .N(N), .B(B), .D(D)) u_miller (
    .clk(HCLK), .rst_n(HRESETn), .start(ml_start),
    .xp(ml_xp), .yp(ml_yp), .xq(ml_xq), .yq(ml_yq),
    .busy(ml_busy), .done(ml_done), .f_out(ml_f)
  );

  fe_coproc #(.M(M), .N(N), .D(D)) u_fe (
    .clk(HCLK), .rst_n(HRESETn), .start(fe_start), .busy(fe_busy), .done(fe_done),
    .stall(fe_stall),
    .host_re(fe_host_re), .host_we(fe_host_we), .host_addr(fe_host_addr),
    .host_wdata(fe_host_wdata), .host_rdata(fe_host_rdata),
    .prog_we(fe_prog_we), .prog_addr(fe_prog_addr), .prog_wdata(fe_prog_wdata)
  );

  assign miller_done = ml_done;

endmodule
