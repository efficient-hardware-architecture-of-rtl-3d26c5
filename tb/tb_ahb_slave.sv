// tb_ahb_slave: self-checking test of the AHB-Lite slave front end.
//
// A small register file model sits behind the register bus (32 words,
// answered one cycle after rd_en). The bench issues single and pipelined
// (back-to-back) AHB reads and writes, IDLE cycles and transfers with HSEL
// low, and checks that writes land at the address of their own address
// phase with the data of their data phase, that reads return the right word
// in the data phase, and that IDLE or unselected transfers change nothing.
`timescale 1ns/1ps
module tb_ahb_slave;
  localparam int AW = 20;

  logic HCLK = 0, HRESETn = 0, HSEL = 0, HWRITE = 0, HREADY;
  logic [31:0] HADDR = '0, HWDATA = '0, HRDATA;
  logic [1:0] HTRANS = '0;
  logic [2:0] HSIZE = 3'b010;
  logic HREADYOUT, HRESP;
  logic rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [31:0] rdata, wr_data;
  assign HREADY = HREADYOUT;

  ahb_slave #(.AW(AW)) dut (.*);

  // register file behind the bus
  logic [31:0] regs [32];
  logic [4:0]  ra_q;
  always_ff @(posedge HCLK) begin
    if (wr_en) regs[wr_addr[6:2]] <= wr_data;
    if (rd_en) ra_q <= rd_addr[6:2];
  end
  assign rdata = regs[ra_q];

  logic [31:0] model [32];
  int checks = 0, failures = 0;

  always #5 HCLK = ~HCLK;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin regs[i] = '0; model[i] = '0; end
    ra_q = '0;
    repeat (2) @(posedge HCLK);
    HRESETn = 1;
    // pipelined writes: address phase k overlaps data phase k-1
    for (int k = 0; k < 40; k++) begin
      @(negedge HCLK);
      if (k > 0) HWDATA = 32'(k * 32'h01010101 + 7);
      if (k < 39) begin
        HSEL = 1; HTRANS = (k % 5 == 4) ? 2'b00 : 2'b10; HWRITE = 1;
        HADDR = 32'((k % 32) * 4);
      end else begin
        HSEL = 0; HTRANS = 2'b00;
      end
      // data phase of transfer k-1 is this cycle
      if (k > 0 && ((k - 1) % 5 != 4)) model[(k - 1) % 32] = 32'(k * 32'h01010101 + 7);
    end
    // unselected transfer must not write
    @(negedge HCLK); HSEL = 0; HTRANS = 2'b10; HWRITE = 1; HADDR = 32'h8;
    @(negedge HCLK); HWDATA = 32'hdeadbeef; HTRANS = 2'b00;
    // pipelined reads
    for (int k = 0; k <= 32; k++) begin
      @(negedge HCLK);
      if (k > 0) begin
        checks++;
        if (HRDATA !== model[k - 1]) begin
          failures++; $display("read %0d: %h expected %h", k - 1, HRDATA, model[k - 1]);
        end
      end
      if (k < 32) begin HSEL = 1; HTRANS = 2'b10; HWRITE = 0; HADDR = 32'(k * 4); end
      else begin HSEL = 0; HTRANS = 2'b00; end
    end
    checks++;
    if (HREADYOUT !== 1'b1 || HRESP !== 1'b0) begin failures++; $display("bad response"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
