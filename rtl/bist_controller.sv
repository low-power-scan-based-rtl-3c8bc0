`timescale 1ns/1ps
// bist_controller: central test controller of the low-power scan BIST.
//
// A rising edge on 'start' (from IDLE or DONE) runs one BIST session:
//   SEED       1 cycle (or until trng_valid when use_trng_seed = 1): clear
//              the MISR and load the LFSR with the configuration or TRNG seed.
//   PR         NUM_SUBCKTS degraded sub-circuits of PR_CYCLES cycles each,
//              sub_idx = 0, 1, ...: low-power weighted pseudorandom testing
//              in which only the chains in chain_mask (the top selects the
//              mask and weights of sub-circuit sub_idx) get their clock
//              enabled, each shifting or capturing according to its weighted
//              test enable.
//   per seed   DET_LOAD (1 cycle, reseed LFSR from the seed store),
//              DET_SHIFT (NUM_CHAINS*CHAIN_LEN cycles, one chain enabled at a
//              time, CHAIN_LEN cycles each; in the first NUM_EXTRA cycles the
//              seed's extra variables seed_extra[0..] are injected into the
//              LFSR), DET_CAPT (1 cycle, all chains capture).
//   UNLOAD     CHAIN_LEN cycles, all chains shift zeros in, responses out.
//   COMPARE    1 cycle, bist_fault <= (signature != golden_sig).
//   DONE       bist_done = 1 until the next start.
// With the configuration seed, bist_done rises on the
// (2 + NUM_SUBCKTS*PR_CYCLES + NUM_SEEDS*(2 + NUM_CHAINS*CHAIN_LEN) + CHAIN_LEN)-th
// clock edge after the edge that samples the start rise (402 at defaults).
// Outside a session (IDLE, DONE) test_mode = 0 and every chain captures each
// cycle, i.e. the scan cells work as the circuit's functional flip-flops.
// The MISR compacts every cycle of PR, DET_SHIFT and UNLOAD; the top masks
// its inputs to the chains that actually shift.
// The two phases, the degraded sub-circuits, the extra variables, the
// status line and the input-mux control follow the published architecture;
// the schedules of both phases, the start-edge handshake and the TRNG
// seeding are this design's choices.
module bist_controller
  import lpbist_pkg::*;
#(
  parameter int unsigned NUM_CHAINS = NUM_CHAINS_D,
  parameter int unsigned CHAIN_LEN  = CHAIN_LEN_D,
  parameter int unsigned NUM_SEEDS  = NUM_SEEDS_D,
  parameter int unsigned NUM_EXTRA  = NUM_EXTRA_D,
  parameter int unsigned NUM_SUBCKTS = NUM_SUBCKTS_D,
  parameter int unsigned PR_CYCLES  = PR_CYCLES_D,
  parameter int unsigned LFSR_W     = LFSR_W_D,
  parameter int unsigned MISR_W     = MISR_W_D,
  localparam int unsigned SAW       = (NUM_SEEDS > 1) ? $clog2(NUM_SEEDS) : 1,
  localparam int unsigned SUW       = (NUM_SUBCKTS > 1) ? $clog2(NUM_SUBCKTS) : 1,
  localparam int unsigned EXW       = (NUM_EXTRA > 0) ? NUM_EXTRA : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // session control
  input  logic                  start,
  input  logic                  use_trng_seed,
  input  logic [LFSR_W-1:0]     cfg_seed,
  input  logic [NUM_CHAINS-1:0] chain_mask,      // of sub-circuit sub_idx
  output logic [SUW-1:0]        sub_idx,
  input  logic                  trng_valid,
  input  logic [LFSR_W-1:0]     trng_seed,
  // pattern generation
  input  logic [NUM_CHAINS-1:0] te_weighted,
  output logic                  lfsr_load,
  output logic [LFSR_W-1:0]     lfsr_seed,
  output logic                  lfsr_step,
  output logic                  lfsr_inject,
  output logic [SAW-1:0]        seed_raddr,
  input  logic [LFSR_W-1:0]     seed_rdata,
  input  logic [EXW-1:0]        seed_extra,
  // scan chains
  output logic [NUM_CHAINS-1:0] chain_ce,
  output logic [NUM_CHAINS-1:0] chain_te,
  output logic                  scan_in_zero,
  // response compaction
  output logic                  misr_clear,
  output logic                  misr_en,
  input  logic [MISR_W-1:0]     misr_sig,
  input  logic [MISR_W-1:0]     golden_sig,
  // status
  output logic                  test_mode,
  output logic                  bist_done,
  output logic                  bist_fault,
  output logic [LFSR_W-1:0]     prpg_seed,
  output bist_state_e           state
);

  localparam int unsigned CW = $clog2(PR_CYCLES + CHAIN_LEN + 1) + 1;
  localparam int unsigned KW = (NUM_CHAINS > 1) ? $clog2(NUM_CHAINS) : 1;

  bist_state_e      state_d;
  logic [CW-1:0]    cnt, cnt_d;         // PR cycles, bit within chain, unload
  logic [KW-1:0]    chain_idx, chain_idx_d;
  logic [SAW-1:0]   seed_idx, seed_idx_d;
  logic [SUW-1:0]   sub_idx_d;
  logic             start_q;
  logic             start_edge;

  assign start_edge = start && !start_q;
  assign seed_raddr = seed_idx;

  always_comb begin
    state_d      = state;
    cnt_d        = cnt;
    chain_idx_d  = chain_idx;
    seed_idx_d   = seed_idx;
    sub_idx_d    = sub_idx;
    lfsr_load    = 1'b0;
    lfsr_inject  = 1'b0;
    lfsr_seed    = cfg_seed;
    lfsr_step    = 1'b0;
    chain_ce     = '0;
    chain_te     = '0;
    scan_in_zero = 1'b0;
    misr_clear   = 1'b0;
    misr_en      = 1'b0;
    test_mode    = 1'b1;

    unique case (state)
      ST_IDLE, ST_DONE: begin
        test_mode = 1'b0;
        chain_ce  = '1;                     // functional capture
        if (start_edge) state_d = ST_SEED;
      end
      ST_SEED: begin
        misr_clear = 1'b1;
        cnt_d      = '0;
        sub_idx_d  = '0;
        if (!use_trng_seed) begin
          lfsr_load = 1'b1;
          state_d   = ST_PR;
        end else if (trng_valid) begin
          lfsr_load = 1'b1;
          lfsr_seed = trng_seed;
          state_d   = ST_PR;
        end
      end
      ST_PR: begin
        chain_ce  = chain_mask;
        chain_te  = te_weighted;
        lfsr_step = 1'b1;
        misr_en   = 1'b1;
        cnt_d     = cnt + 1'b1;
        if (cnt == CW'(PR_CYCLES - 1)) begin
          cnt_d = '0;
          if (sub_idx == SUW'(NUM_SUBCKTS - 1)) begin
            seed_idx_d = '0;
            state_d    = ST_DET_LOAD;
          end else begin
            sub_idx_d = sub_idx + 1'b1;
          end
        end
      end
      ST_DET_LOAD: begin
        lfsr_load   = 1'b1;
        lfsr_seed   = seed_rdata;
        cnt_d       = '0;
        chain_idx_d = '0;
        state_d     = ST_DET_SHIFT;
      end
      ST_DET_SHIFT: begin
        chain_ce[chain_idx] = 1'b1;
        chain_te  = '1;
        lfsr_step = 1'b1;
        misr_en   = 1'b1;
        for (int e = 0; e < int'(NUM_EXTRA); e++)
          if (chain_idx == '0 && cnt == CW'(e)) lfsr_inject = seed_extra[e];
        cnt_d     = cnt + 1'b1;
        if (cnt == CW'(CHAIN_LEN - 1)) begin
          cnt_d       = '0;
          chain_idx_d = chain_idx + 1'b1;
          if (chain_idx == KW'(NUM_CHAINS - 1)) state_d = ST_DET_CAPT;
        end
      end
      ST_DET_CAPT: begin
        chain_ce   = '1;
        seed_idx_d = seed_idx + 1'b1;
        cnt_d      = '0;
        if (seed_idx == SAW'(NUM_SEEDS - 1)) state_d = ST_UNLOAD;
        else                                 state_d = ST_DET_LOAD;
      end
      ST_UNLOAD: begin
        chain_ce     = '1;
        chain_te     = '1;
        scan_in_zero = 1'b1;
        misr_en      = 1'b1;
        cnt_d        = cnt + 1'b1;
        if (cnt == CW'(CHAIN_LEN - 1)) state_d = ST_COMPARE;
      end
      ST_COMPARE: begin
        state_d = ST_DONE;
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      cnt        <= '0;
      chain_idx  <= '0;
      seed_idx   <= '0;
      sub_idx    <= '0;
      start_q    <= 1'b0;
      bist_done  <= 1'b0;
      bist_fault <= 1'b0;
      prpg_seed  <= '0;
    end else begin
      state     <= state_d;
      cnt       <= cnt_d;
      chain_idx <= chain_idx_d;
      seed_idx  <= seed_idx_d;
      sub_idx   <= sub_idx_d;
      start_q   <= start;
      if ((state == ST_IDLE || state == ST_DONE) && start_edge) begin
        bist_done  <= 1'b0;
        bist_fault <= 1'b0;
      end
      if (state == ST_SEED && lfsr_load) prpg_seed <= lfsr_seed;
      if (state == ST_COMPARE) begin
        bist_done  <= 1'b1;
        bist_fault <= (misr_sig != golden_sig);
      end
    end
  end

  // Deterministic phase: exactly one chain clocked per shift cycle
  a_det_one_chain: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_DET_SHIFT |-> $onehot(chain_ce));
  // Pseudorandom phase: disabled chains stay disabled
  a_pr_mask: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_PR |-> (chain_ce & ~chain_mask) == '0);

  initial begin
    assert (NUM_EXTRA <= CHAIN_LEN)
      else $error("bist_controller: extra variables must fit in the first chain's shift");
  end

endmodule
