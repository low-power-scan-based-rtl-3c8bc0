`timescale 1ns/1ps
// misr: multiple-input signature register.
//
// Each enabled cycle the register shifts one position towards the MSB, the
// bit leaving the MSB is fed back into the positions set in POLY, and the
// IN_W parallel inputs are added modulo 2 into the low bits. After the last
// input word the contents are the signature. 'clear' (priority) zeroes it.
// Default feedback x^16+x^12+x^5+1 is this design's choice.
module misr #(
  parameter int unsigned W    = lpbist_pkg::MISR_W_D,
  parameter int unsigned IN_W = lpbist_pkg::NUM_CHAINS_D,
  parameter logic [W-1:0] POLY = W'(lpbist_pkg::MISR_POLY_D)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  input  logic [IN_W-1:0] d_in,
  output logic [W-1:0]    sig
);

  logic [W-1:0] next_sig;

  always_comb begin
    next_sig = {sig[W-2:0], 1'b0} ^ W'(d_in);
    if (sig[W-1]) next_sig = next_sig ^ POLY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= next_sig;
  end

  initial assert (IN_W <= W) else $error("misr: IN_W must not exceed W");

endmodule
