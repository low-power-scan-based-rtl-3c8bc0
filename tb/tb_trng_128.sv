`timescale 1ns/1ps
// tb_trng_128: feeds a known bit sequence (changing at the falling clock
// edge) and checks that each word holds the 128 bits that entered,
// oldest in the MSB, after the two-cycle synchroniser delay, and that
// 'valid' pulses exactly every 128 clocks.
module tb_trng_128;
  logic clk = 0, rst_n = 0, rnd_bit = 0, valid;
  logic [127:0] word;
  logic bits [$];
  int checks = 0, failures = 0, cyc = 0, last_valid = -1, nwords = 0;

  trng_128 dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    bits.push_back(rnd_bit);   // value sampled at this edge
  end

  always @(negedge clk) if (rst_n) rnd_bit <= 1'($urandom);

  always @(negedge clk) if (rst_n && valid) begin
    logic [127:0] exp_w;
    // bit shifted in at edge t was sampled at edge t-2 (two 0s from reset first)
    for (int k = 0; k < 128; k++) begin
      int t;
      t = cyc - k;               // edge index that shifted bit k (1-based)
      exp_w[k] = (t - 2 >= 1) ? bits[t - 3] : 1'b0;
    end
    checks++;
    if (word !== exp_w) begin failures++; if (failures < 5) $display("FAIL word at cycle %0d", cyc); end
    if (last_valid >= 0) begin
      checks++;
      if (cyc - last_valid != 128) begin failures++; $display("FAIL valid spacing %0d", cyc - last_valid); end
    end else begin
      checks++;
      if (cyc != 128) begin failures++; $display("FAIL first valid at %0d", cyc); end
    end
    last_valid = cyc;
    nwords++;
  end

  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    wait (nwords == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
