`timescale 1ns/1ps
// weighted_te_gen: weighted test-enable signals, one per scan chain.
//
// For chain i with weight code w (k = w+1) the capture condition is the AND
// of k LFSR bits, rnd[(4i+j) mod LFSR_W] for j = 0..k-1. The chain therefore
// captures with probability 2^-k and shifts (te = 1) otherwise, so the number
// of shift and capture cycles per test cycle is not fixed, as in the
// weighted test-enable scheme. Purely combinational. The 2^-k weight set and
// the bit selection are this design's choices.
module weighted_te_gen #(
  parameter int unsigned NUM_CHAINS = lpbist_pkg::NUM_CHAINS_D,
  parameter int unsigned LFSR_W     = lpbist_pkg::LFSR_W_D
) (
  input  logic [LFSR_W-1:0]                rnd,
  input  lpbist_pkg::te_weight_t [NUM_CHAINS-1:0] weight,
  output logic [NUM_CHAINS-1:0]            te
);

  always_comb begin
    for (int i = 0; i < NUM_CHAINS; i++) begin
      logic capture;
      capture = 1'b1;
      for (int j = 0; j < 4; j++) begin
        if (j <= int'(weight[i])) capture &= rnd[(4*i + j) % LFSR_W];
      end
      te[i] = ~capture;
    end
  end

endmodule
