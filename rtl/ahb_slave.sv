// ahb_slave: AMBA AHB-Lite slave front end of the pairing accelerator.
//
// Turns AHB-Lite transfers into a simple register bus for pairing_ctrl.
// Zero wait states: HREADYOUT is always high and HRESP always OKAY. For a
// read, rd_en/rd_addr are given in the address phase so that a synchronous
// memory behind the decoder can answer in the data phase; rdata from the
// decoder is passed to HRDATA in the data phase. For a write, the address is
// held from the address phase and wr_en/wr_addr/wr_data are given in the data
// phase, when HWDATA is valid. Only 32-bit word transfers are meant to be
// used (an assertion flags other sizes); IDLE and BUSY transfers are ignored.
//
// The AHB interface is named in the accelerator's description; its register
// bus, the zero-wait-state timing and the word-only access are this design's
// choices.
module ahb_slave #(
  parameter int unsigned AW = 20
) (
  input  logic          HCLK,
  input  logic          HRESETn,
  input  logic          HSEL,
  input  logic [31:0]   HADDR,
  input  logic [1:0]    HTRANS,
  input  logic          HWRITE,
  input  logic [2:0]    HSIZE,
  input  logic [31:0]   HWDATA,
  input  logic          HREADY,
  output logic          HREADYOUT,
  output logic          HRESP,
  output logic [31:0]   HRDATA,
  // register bus
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [31:0]   rdata,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [31:0]   wr_data
);

  logic active;
  assign active = HSEL && HREADY && HTRANS[1];   // NONSEQ or SEQ

  logic          wr_pend;
  logic [AW-1:0] wr_addr_q;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      wr_pend   <= 1'b0;
      wr_addr_q <= '0;
    end else begin
      wr_pend <= active && HWRITE;
      if (active && HWRITE) wr_addr_q <= HADDR[AW-1:0];
    end
  end

  assign rd_en     = active && !HWRITE;
  assign rd_addr   = HADDR[AW-1:0];
  assign wr_en     = wr_pend;
  assign wr_addr   = wr_addr_q;
  assign wr_data   = HWDATA;
  assign HRDATA    = rdata;
  assign HREADYOUT = 1'b1;
  assign HRESP     = 1'b0;

  always_ff @(posedge HCLK) begin
    if (active)
      assert (HSIZE == 3'b010 && HADDR[1:0] == 2'b00)
        else $error("ahb_slave: only aligned 32-bit transfers are supported");
  end

endmodule
