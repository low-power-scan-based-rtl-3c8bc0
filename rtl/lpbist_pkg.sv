`timescale 1ns/1ps
// lpbist_pkg: types and constants shared by the low-power scan BIST.
//
// The controller walks through the states below. Sizes here are this
// design's defaults (four scan chains of eight cells, 16-bit LFSR and MISR,
// four degraded sub-circuits of 64 cycles, four seeds with four extra
// variables each); only the 128-bit TRNG word width follows the published
// design.
package lpbist_pkg;

  // Default sizes
  localparam int unsigned NUM_CHAINS_D = 4;
  localparam int unsigned CHAIN_LEN_D  = 8;
  localparam int unsigned PI_W_D       = 8;
  localparam int unsigned LFSR_W_D     = 16;
  localparam int unsigned MISR_W_D     = 16;
  localparam int unsigned NUM_SEEDS_D  = 4;
  localparam int unsigned NUM_SUBCKTS_D = 4;   // degraded sub-circuits
  localparam int unsigned PR_CYCLES_D  = 64;    // per sub-circuit
  localparam int unsigned NUM_EXTRA_D  = 4;     // extra variables per seed
  localparam int unsigned TRNG_BITS_D  = 128;

  // Galois LFSR, x^16+x^14+x^13+x^11+1 (primitive), right-shifting form
  localparam logic [15:0] LFSR_POLY_D = 16'hB400;
  // MISR feedback, x^16+x^12+x^5+1, left-shifting form
  localparam logic [15:0] MISR_POLY_D = 16'h1021;

  // Test-enable weight code: k-1, capture probability 2^-k
  typedef logic [1:0] te_weight_t;

  typedef enum logic [3:0] {
    ST_IDLE,       // functional operation, all chains capture
    ST_SEED,       // load the PRPG seed (TRNG or configuration)
    ST_PR,         // low-power weighted pseudorandom phase
    ST_DET_LOAD,   // reseed the PRPG from the seed store
    ST_DET_SHIFT,  // shift one chain at a time from the PRPG
    ST_DET_CAPT,   // one capture cycle, all chains
    ST_UNLOAD,     // shift all chains into the MISR
    ST_COMPARE,    // signature against golden value
    ST_DONE        // status valid, normal inputs reconnected
  } bist_state_e;

endpackage
