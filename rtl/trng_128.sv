`timescale 1ns/1ps
// trng_128: collects raw TRNG bits into BITS-bit words (default 128).
//
// rnd_bit is asynchronous; two flip-flops bring it into the clk domain. Each
// clock the synchronised bit is shifted into the LSB of a shift register.
// After BITS shifts the register is copied to 'word' and 'valid' pulses for
// one cycle, so a fresh word appears every BITS clocks, the first BITS
// clocks after reset (its two oldest bits are the synchroniser's reset
// zeros). The word width
// follows the published 128-bit TRNG; the collection scheme is this design's.
module trng_128 #(
  parameter int unsigned BITS = lpbist_pkg::TRNG_BITS_D,
  localparam int unsigned CW  = $clog2(BITS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rnd_bit,
  output logic [BITS-1:0] word,
  output logic            valid
);

  logic [1:0]      sync;
  logic [BITS-1:0] shreg;
  logic [CW-1:0]   cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= '0;
      shreg <= '0;
      cnt   <= '0;
      word  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rnd_bit};
      shreg <= {shreg[BITS-2:0], sync[1]};
      cnt   <= cnt + 1'b1;
      valid <= 1'b0;
      if (cnt == CW'(BITS - 1)) begin
        word  <= {shreg[BITS-2:0], sync[1]};
        valid <= 1'b1;
        cnt   <= '0;
      end
    end
  end

endmodule
