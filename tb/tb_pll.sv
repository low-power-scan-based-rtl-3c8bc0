`timescale 1ns/1ps
// tb_pll: checks the PLL model: clocks held low in reset, clk0 and clk1
// periods of 4.0 ns and 3.3 ns, and 'locked' rising on the 8th reference
// edge after reset.
module tb_pll;
  logic ref_clk = 0, rst_n = 0, clk0, clk1, locked;
  int checks = 0, failures = 0;
  int ref_edges = 0;
  realtime t0;

  pll dut (.*);
  always #5 ref_clk = ~ref_clk;
  always @(posedge ref_clk) if (rst_n) ref_edges++;

  task automatic measure(input int which, input real exp_ns);
    realtime a, b;
    if (which == 0) begin @(posedge clk0); a = $realtime; @(posedge clk0); b = $realtime; end
    else            begin @(posedge clk1); a = $realtime; @(posedge clk1); b = $realtime; end
    checks++;
    if ((b - a) < exp_ns - 0.01 || (b - a) > exp_ns + 0.01) begin
      failures++; $display("FAIL clk%0d period %f ns", which, b - a);
    end
  endtask

  initial begin
    #33;
    checks++; if (clk0 !== 0 || clk1 !== 0 || locked !== 0) begin failures++; $display("FAIL reset"); end
    @(negedge ref_clk); rst_n = 1;
    for (int i = 0; i < 5; i++) begin measure(0, 4.0); measure(1, 3.3); end
    wait (locked);
    checks++; if (ref_edges != 8) begin failures++; $display("FAIL locked after %0d edges", ref_edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
