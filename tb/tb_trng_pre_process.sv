`timescale 1ns/1ps
// tb_trng_pre_process: drives the two oscillator clocks and two PLL clocks
// from the testbench with random timing; each sampler must hold the PLL
// clock value seen at the rising edge of its oscillator, and the raw bit
// must be the XOR of the two samples. Also checks the asynchronous reset.
module tb_trng_pre_process;
  logic rst_n = 1, osc1 = 0, osc2 = 0, pll_clk0 = 0, pll_clk1 = 0;
  logic smp1, smp2, rnd_out;
  logic e1 = 0, e2 = 0;
  int checks = 0, failures = 0, ones = 0;

  trng_pre_process dut (.*);

  initial begin
    #1 rst_n = 0;
    #1; checks++; if (smp1 !== 0 || smp2 !== 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      pll_clk0 = 1'($urandom); pll_clk1 = 1'($urandom); #1;
      if ($urandom % 2) begin osc1 = 1; e1 = pll_clk0; end
      if ($urandom % 2) begin osc2 = 1; e2 = pll_clk1; end
      #1;
      checks++;
      if (smp1 !== e1 || smp2 !== e2 || rnd_out !== (e1 ^ e2)) begin
        failures++; if (failures < 10) $display("FAIL i=%0d smp=%b%b exp=%b%b", i, smp1, smp2, e1, e2);
      end
      if (rnd_out) ones++;
      osc1 = 0; osc2 = 0; #1;
    end
    checks++; if (ones < 300 || ones > 700) begin failures++; $display("FAIL ones=%0d", ones); end
    rst_n = 0; #1; checks++; if (rnd_out !== 0) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
