`timescale 1ns/1ps
// tb_bist_input_mux: random functional and test inputs in both modes; the
// output must follow the functional inputs in normal mode and the pattern
// generator's bits in test mode.
module tb_bist_input_mux;
  logic test_mode;
  logic [7:0] normal_in, test_in, out;
  int checks = 0, failures = 0;

  bist_input_mux dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      test_mode = 1'($urandom); normal_in = 8'($urandom); test_in = 8'($urandom);
      #1;
      checks++;
      if (out !== (test_mode ? test_in : normal_in)) begin
        failures++; if (failures < 10) $display("FAIL mode=%b out=%h", test_mode, out);
      end
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
