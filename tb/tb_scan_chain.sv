`timescale 1ns/1ps
// tb_scan_chain: checks shift, parallel capture and clock disabling of an
// 8-cell scan chain against an array model, including the bit order
// (scan_in enters cell 0, scan_out is cell 7, i.e. 8 shifts of latency).
module tb_scan_chain;
  logic clk = 0, rst_n = 0, ce = 0, te = 0, scan_in = 0, scan_out;
  logic [7:0] capture_d = '0, q, model;
  int checks = 0, failures = 0;
  int holds = 0, shifts = 0, captures = 0;

  scan_chain #(.LEN(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ce = ($urandom % 3) != 0; te = ($urandom % 4) != 0;
      scan_in = 1'($urandom); capture_d = 8'($urandom);
      @(posedge clk);
      if (ce && te) begin model = {model[6:0], scan_in}; shifts++; end
      else if (ce)  begin model = capture_d; captures++; end
      else holds++;
      #1;
      checks++;
      if (q !== model || scan_out !== model[7]) begin
        failures++; if (failures < 10) $display("FAIL i=%0d q=%h model=%h", i, q, model);
      end
    end
    checks++;
    if (holds == 0 || shifts == 0 || captures == 0) failures++;
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
