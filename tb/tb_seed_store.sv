`timescale 1ns/1ps
// tb_seed_store: writes every seed location, reads them back through the
// asynchronous port in random order, overwrites one and reads it again.
module tb_seed_store;
  logic clk = 0, we = 0;
  logic [1:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] ref_mem [4];
  int checks = 0, failures = 0;

  seed_store dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int a = 0; a < 4; a++) begin
      @(negedge clk); we = 1; waddr = 2'(a); wdata = 16'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 40; i++) begin
      raddr = 2'($urandom); #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
    end
    @(negedge clk); we = 1; waddr = 2; wdata = 16'h1234; ref_mem[2] = wdata;
    @(negedge clk); we = 0;
    for (int a = 0; a < 4; a++) begin
      raddr = 2'(a); #1; checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("FAIL addr %0d after rewrite", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
