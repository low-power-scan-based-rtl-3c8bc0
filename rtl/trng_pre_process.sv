`timescale 1ns/1ps
// trng_pre_process: entropy extraction of the true random number generator.
//
// Two D flip-flops sample the two PLL clocks; each is clocked by the rising
// edge of its own multistage feedback ring oscillator. Oscillator jitter
// makes the sampled PLL phase unpredictable. Because one sampler alone
// produces many repeated values, the two sampled bits are XORed into the raw
// random bit rnd_out (combinational after the flip-flops). The structure
// follows the published TRNG; the asynchronous reset to 0 is this design's.
// rnd_out is asynchronous to any system clock and must be synchronised by
// the consumer.
module trng_pre_process (
  input  logic rst_n,
  input  logic osc1,
  input  logic osc2,
  input  logic pll_clk0,
  input  logic pll_clk1,
  output logic smp1,
  output logic smp2,
  output logic rnd_out
);

  always_ff @(posedge osc1 or negedge rst_n) begin
    if (!rst_n) smp1 <= 1'b0;
    else        smp1 <= pll_clk0;
  end

  always_ff @(posedge osc2 or negedge rst_n) begin
    if (!rst_n) smp2 <= 1'b0;
    else        smp2 <= pll_clk1;
  end

  assign rnd_out = smp1 ^ smp2;

endmodule
