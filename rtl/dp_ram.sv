// dp_ram: data memory of the final-exponentiation coprocessor.
//
// DEPTH words of W bits with two read ports that can be used in the same
// cycle, so both operands of a multiplication are fetched at once, and one
// write port. Reads are synchronous: the word addressed in one cycle appears
// on rdata the next cycle. A read and a write of the same address in one
// cycle return the old word (read-first). No reset; the contents are
// undefined until written.
//
// Two simultaneous reads follow the accelerator's description; the separate
// write port, the synchronous read and the read-first behaviour are this
// design's choices. On silicon this array would be a memory macro.
module dp_ram #(
  parameter int unsigned W     = 194,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          re_a,
  input  logic [AW-1:0] addr_a,
  output logic [W-1:0]  rdata_a,
  input  logic          re_b,
  input  logic [AW-1:0] addr_b,
  output logic [W-1:0]  rdata_b,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re_a) rdata_a <= mem[addr_a];
    if (re_b) rdata_b <= mem[addr_b];
    if (we)   mem[waddr] <= wdata;
  end

endmodule
