`timescale 1ns/1ps
// lfsr_prpg: reseedable pseudorandom pattern generator.
//
// A W-bit Galois LFSR shifting right: the bit leaving at position 0 is XORed
// back into the positions set in POLY. With the default primitive polynomial
// x^16+x^14+x^13+x^11+1 it runs through all 2^16-1 non-zero states. 'load'
// (priority) writes 'seed' in the next cycle; a zero seed is replaced by 1
// so the register never locks up. 'step' advances one state per clock; on a
// step, 'inject' is XORed into the MSB of the next state, which is how extra
// variables enter the LFSR during deterministic reseeding.
// Reseeding and variable injection follow the published low-power BIST
// scheme; the polynomial, the Galois form and the injection point are this
// design's choices.
module lfsr_prpg #(
  parameter int unsigned W    = lpbist_pkg::LFSR_W_D,
  parameter logic [W-1:0] POLY = W'(lpbist_pkg::LFSR_POLY_D)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         step,
  input  logic         inject,
  output logic [W-1:0] q
);

  logic [W-1:0] next_q;

  always_comb begin
    next_q = q >> 1;
    if (q[0]) next_q = next_q ^ POLY;
    next_q[W-1] = next_q[W-1] ^ inject;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= W'(1);
    else if (load) q <= (seed == '0) ? W'(1) : seed;
    else if (step) q <= next_q;
  end

endmodule
