// tb_dp_ram: self-checking test of the dual-read-port data memory.
//
// Fills the memory with random words, then reads random address pairs on
// both ports at once while writing other words, and compares against a
// model array. Checks the one-cycle read latency, that a port keeps its
// output while its read enable is low, and read-first behaviour when a word
// is read and written in the same cycle.
`timescale 1ns/1ps
module tb_dp_ram;
  localparam int W = 194, DEPTH = 64, AW = 6;

  logic clk = 0;
  logic re_a = 0, re_b = 0, we = 0;
  logic [AW-1:0] addr_a = '0, addr_b = '0, waddr = '0;
  logic [W-1:0] rdata_a, rdata_b, wdata = '0;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  dp_ram #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rndw();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    logic [W-1:0] ea, eb, hold_b;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = rndw(); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    hold_b = rdata_b;               // port B keeps this until it is read
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      re_a = 1; re_b = ($urandom_range(3) != 0);
      addr_a = AW'($urandom_range(DEPTH - 1));
      addr_b = (k % 10 == 0) ? addr_a : AW'($urandom_range(DEPTH - 1));
      we = ($urandom_range(1) == 1);
      waddr = (k % 7 == 0) ? addr_a : AW'($urandom_range(DEPTH - 1));
      wdata = rndw();
      ea = model[addr_a];
      eb = re_b ? model[addr_b] : hold_b;
      if (we) model[waddr] = wdata;
      @(negedge clk);
      re_a = 0; re_b = 0; we = 0;
      checks++;
      if (rdata_a !== ea) begin failures++; $display("port A wrong at %0d", k); end
      checks++;
      if (rdata_b !== eb) begin failures++; $display("port B wrong at %0d", k); end
      hold_b = rdata_b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
