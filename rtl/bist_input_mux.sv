`timescale 1ns/1ps
// bist_input_mux: primary-input multiplexer of the BIST architecture.
//
// In normal operation (test_mode = 0) the circuit under test sees its
// functional inputs; while the BIST runs it sees the pattern generator's
// bits. The select comes from the test controller. Combinational.
module bist_input_mux #(
  parameter int unsigned W = lpbist_pkg::PI_W_D
) (
  input  logic         test_mode,
  input  logic [W-1:0] normal_in,
  input  logic [W-1:0] test_in,
  output logic [W-1:0] out
);

  always_comb out = test_mode ? test_in : normal_in;

endmodule
