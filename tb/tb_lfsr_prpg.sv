`timescale 1ns/1ps
// tb_lfsr_prpg: checks the reseedable LFSR against an independent model.
// The model steps the x^16+x^14+x^13+x^11+1 Galois register by explicit
// taps; the test also checks that the sequence has the maximal period
// 2^16-1, that 'step' low holds the state, that 'load' wins over 'step',
// that a zero seed is replaced by 1 and that an injected variable is XORed
// into the MSB of the next state.
module tb_lfsr_prpg;
  logic clk = 0, rst_n = 0, load = 0, step = 0, inject = 0;
  logic [15:0] seed = '0, q, model;
  int checks = 0, failures = 0;

  lfsr_prpg dut (.*);
  always #5 clk = ~clk;

  function automatic logic [15:0] nxt(input logic [15:0] s);
    logic fb = s[0];
    logic [15:0] r = {1'b0, s[15:1]};
    if (fb) begin r[15] ^= 1'b1; r[13] ^= 1'b1; r[12] ^= 1'b1; r[10] ^= 1'b1; end
    return r;
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s q=%h model=%h", what, q, model); end
  endtask

  initial begin
    int period;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); chk(q == 16'h0001, "reset value");
    // load a seed
    seed = 16'hACE1; load = 1; step = 1;
    @(negedge clk); load = 0; model = 16'hACE1; chk(q == model, "load priority");
    // step and compare for 2000 cycles
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk); model = nxt(model); chk(q == model, "step");
    end
    // extra-variable injection
    for (int i = 0; i < 200; i++) begin
      inject = 1'($urandom);
      @(negedge clk); model = nxt(model); model[15] ^= inject; chk(q == model, "inject");
    end
    inject = 0;
    // hold
    step = 0; repeat (3) @(negedge clk); chk(q == model, "hold");
    // zero seed
    seed = '0; load = 1; @(negedge clk); load = 0; chk(q == 16'h0001, "zero seed");
    // period
    step = 1; period = 0;
    do begin @(negedge clk); period++; end while (q != 16'h0001 && period < 70000);
    checks++; if (period != 65535) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
