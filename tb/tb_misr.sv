`timescale 1ns/1ps
// tb_misr: checks the signature register against a bit-serial model of
// "shift one position, feed back x^16+x^12+x^5+1, add the inputs modulo 2",
// plus clear, enable-low hold, and linearity of the compaction
// (signature of a^b equals signature of a XOR signature of b).
module tb_misr;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [3:0] d_in = '0;
  logic [15:0] sig, model;
  int checks = 0, failures = 0;

  misr dut (.*);
  always #5 clk = ~clk;

  function automatic logic [15:0] step(input logic [15:0] s, input logic [3:0] d);
    logic [15:0] r;
    r[0] = s[15] ^ d[0];
    for (int b = 1; b < 16; b++) begin
      r[b] = s[b-1];
      if (b < 4) r[b] ^= d[b];
      if (b == 5 || b == 12) r[b] ^= s[15];
    end
    return r;
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s sig=%h model=%h", what, sig, model); end
  endtask

  logic [3:0] seq_a [64], seq_b [64];
  logic [15:0] sa, sb, sab;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); chk(sig == 0, "reset");
    model = '0; en = 1;
    for (int i = 0; i < 300; i++) begin
      d_in = 4'($urandom);
      en = ($urandom % 4) != 0;
      @(negedge clk);
      if (en) model = step(model, d_in);
      chk(sig == model, "compact");
    end
    clear = 1; en = 1; @(negedge clk); clear = 0; model = '0; chk(sig == 0, "clear");
    // linearity
    for (int i = 0; i < 64; i++) begin seq_a[i] = 4'($urandom); seq_b[i] = 4'($urandom); end
    for (int k = 0; k < 3; k++) begin
      clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < 64; i++) begin
        d_in = (k == 0) ? seq_a[i] : (k == 1) ? seq_b[i] : (seq_a[i] ^ seq_b[i]);
        @(negedge clk);
      end
      if (k == 0) sa = sig; else if (k == 1) sb = sig; else sab = sig;
    end
    checks++; if (sab != (sa ^ sb)) begin failures++; $display("FAIL linearity"); end
    checks++; if (sa == sb) begin failures++; $display("FAIL distinct signatures"); end
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
