`timescale 1ns/1ps
// lp_scan_bist: low-power scan-based BIST seeded by a true random number
// generator built from two multistage feedback ring oscillators.
//
// TRNG path: two ring oscillators (msfro) clock two flip-flops that sample
// the two clocks of a PLL; the XOR of the samples (trng_pre_process) is
// synchronised and collected into 128-bit words (trng_128).
// BIST path: a reseedable LFSR (lfsr_prpg) drives the scan inputs
// (chain i takes LFSR bit i), the circuit's primary inputs through the test
// multiplexer (bist_input_mux, low PI_W LFSR bits) and a weighted
// test-enable generator (weighted_te_gen). NUM_CHAINS scan chains
// (scan_chain) hold the state of the circuit under test, which lies outside
// this module: cut_state/cut_pi go to it and cut_next comes back. A MISR
// compacts the bits leaving the chains that shift in each cycle
// (scan_out & ce & te); bist_controller sequences the session and raises
// bist_fault if the signature differs from golden_sig.
// Low power comes from clocking only part of the chains: during the
// pseudorandom phase the controller walks through NUM_SUBCKTS degraded
// sub-circuits, each clocking only the chains in its chain_mask entry with
// its own test-enable weights; while deterministic patterns are shifted in,
// one chain at a time is clocked. Each seed-store word is
// {extra variables, seed}: the seed is loaded into the LFSR and the
// NUM_EXTRA extra variables are injected during the first shift cycles.
// Timing: see bist_controller; with use_trng_seed the session waits in SEED
// for the next TRNG word and uses its low LFSR_W bits.
module lp_scan_bist
  import lpbist_pkg::*;
#(
  parameter int unsigned NUM_CHAINS = NUM_CHAINS_D,
  parameter int unsigned CHAIN_LEN  = CHAIN_LEN_D,
  parameter int unsigned PI_W       = PI_W_D,
  parameter int unsigned LFSR_W     = LFSR_W_D,
  parameter int unsigned MISR_W     = MISR_W_D,
  parameter int unsigned NUM_SEEDS  = NUM_SEEDS_D,
  parameter int unsigned NUM_EXTRA  = NUM_EXTRA_D,
  parameter int unsigned NUM_SUBCKTS = NUM_SUBCKTS_D,
  parameter int unsigned PR_CYCLES  = PR_CYCLES_D,
  parameter int unsigned TRNG_BITS  = TRNG_BITS_D,
  localparam int unsigned NCELLS    = NUM_CHAINS * CHAIN_LEN,
  localparam int unsigned SAW       = (NUM_SEEDS > 1) ? $clog2(NUM_SEEDS) : 1,
  localparam int unsigned SUW       = (NUM_SUBCKTS > 1) ? $clog2(NUM_SUBCKTS) : 1,
  localparam int unsigned EXW       = (NUM_EXTRA > 0) ? NUM_EXTRA : 1,
  localparam int unsigned SSW       = LFSR_W + NUM_EXTRA
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // BIST session
  input  logic                         start,
  input  logic                         use_trng_seed,
  input  logic [LFSR_W-1:0]            cfg_seed,
  input  logic [NUM_SUBCKTS-1:0][NUM_CHAINS-1:0]       chain_mask,
  input  te_weight_t [NUM_SUBCKTS-1:0][NUM_CHAINS-1:0] te_weight,
  input  logic                         seed_we,
  input  logic [SAW-1:0]               seed_waddr,
  input  logic [SSW-1:0]               seed_wdata,   // {extra variables, seed}
  input  logic [MISR_W-1:0]            golden_sig,
  // circuit under test
  input  logic [PI_W-1:0]              normal_pi,
  output logic [PI_W-1:0]              cut_pi,
  output logic [NCELLS-1:0]            cut_state,
  input  logic [NCELLS-1:0]            cut_next,
  // status
  output logic                         test_mode,
  output logic                         bist_done,
  output logic                         bist_fault,
  output logic [MISR_W-1:0]            signature,
  output logic [LFSR_W-1:0]            prpg_seed,
  output bist_state_e                  bist_state,
  output logic [SUW-1:0]               pr_subckt,
  output logic [TRNG_BITS-1:0]         trng_word,
  output logic                         trng_valid
);

  // ---------------------------------------------------------------- TRNG
  logic osc1, osc2, pll_clk0, pll_clk1, pll_locked;
  logic rnd_bit;

  msfro #(.STAGES(5), .STAGE_DELAY_PS(700), .JITTER_PS(60)) u_osc1 (
    .en(rst_n), .osc_out(osc1));
  msfro #(.STAGES(7), .STAGE_DELAY_PS(530), .JITTER_PS(60)) u_osc2 (
    .en(rst_n), .osc_out(osc2));
  pll u_pll (
    .ref_clk(clk), .rst_n(rst_n), .clk0(pll_clk0), .clk1(pll_clk1), .locked(pll_locked));

  trng_pre_process u_pre (
    .rst_n(rst_n), .osc1(osc1), .osc2(osc2), .pll_clk0(pll_clk0), .pll_clk1(pll_clk1),
    .smp1(), .smp2(), .rnd_out(rnd_bit));

  logic trng_word_valid;
  trng_128 #(.BITS(TRNG_BITS)) u_trng (
    .clk(clk), .rst_n(rst_n), .rnd_bit(rnd_bit), .word(trng_word), .valid(trng_word_valid));
  // words are used only once the PLL clocks are stable
  assign trng_valid = trng_word_valid & pll_locked;

  // ---------------------------------------------------------------- BIST
  logic                  lfsr_load, lfsr_step, lfsr_inject, scan_in_zero, misr_clear, misr_en;
  logic [LFSR_W-1:0]     lfsr_seed, lfsr_q;
  logic [SSW-1:0]        seed_word;
  logic [EXW-1:0]        seed_extra;
  logic [SAW-1:0]        seed_raddr;
  logic [NUM_CHAINS-1:0] chain_ce, chain_te, te_weighted, scan_out, misr_in;

  bist_controller #(
    .NUM_CHAINS(NUM_CHAINS), .CHAIN_LEN(CHAIN_LEN), .NUM_SEEDS(NUM_SEEDS),
    .NUM_EXTRA(NUM_EXTRA), .NUM_SUBCKTS(NUM_SUBCKTS),
    .PR_CYCLES(PR_CYCLES), .LFSR_W(LFSR_W), .MISR_W(MISR_W)
  ) u_ctrl (
    .clk, .rst_n, .start, .use_trng_seed, .cfg_seed,
    .chain_mask(chain_mask[pr_subckt]), .sub_idx(pr_subckt),
    .trng_valid, .trng_seed(trng_word[LFSR_W-1:0]),
    .te_weighted, .lfsr_load, .lfsr_seed, .lfsr_step, .lfsr_inject, .seed_raddr,
    .seed_rdata(seed_word[LFSR_W-1:0]), .seed_extra,
    .chain_ce, .chain_te, .scan_in_zero, .misr_clear, .misr_en,
    .misr_sig(signature), .golden_sig, .test_mode, .bist_done, .bist_fault,
    .prpg_seed, .state(bist_state));

  lfsr_prpg #(.W(LFSR_W)) u_lfsr (
    .clk, .rst_n, .load(lfsr_load), .seed(lfsr_seed), .step(lfsr_step),
    .inject(lfsr_inject), .q(lfsr_q));

  seed_store #(.DEPTH(NUM_SEEDS), .W(SSW)) u_seeds (
    .clk, .we(seed_we), .waddr(seed_waddr), .wdata(seed_wdata),
    .raddr(seed_raddr), .rdata(seed_word));

  if (NUM_EXTRA > 0) begin : g_extra
    assign seed_extra = seed_word[SSW-1 -: EXW];
  end else begin : g_no_extra
    assign seed_extra = '0;
  end

  weighted_te_gen #(.NUM_CHAINS(NUM_CHAINS), .LFSR_W(LFSR_W)) u_wte (
    .rnd(lfsr_q), .weight(te_weight[pr_subckt]), .te(te_weighted));

  bist_input_mux #(.W(PI_W)) u_mux (
    .test_mode, .normal_in(normal_pi), .test_in(lfsr_q[PI_W-1:0]), .out(cut_pi));

  for (genvar i = 0; i < NUM_CHAINS; i++) begin : g_chain
    scan_chain #(.LEN(CHAIN_LEN)) u_chain (
      .clk, .rst_n, .ce(chain_ce[i]), .te(chain_te[i]),
      .scan_in(lfsr_q[i] & ~scan_in_zero),
      .capture_d(cut_next[i*CHAIN_LEN +: CHAIN_LEN]),
      .q(cut_state[i*CHAIN_LEN +: CHAIN_LEN]),
      .scan_out(scan_out[i]));
  end

  assign misr_in = scan_out & chain_ce & chain_te;

  misr #(.W(MISR_W), .IN_W(NUM_CHAINS)) u_misr (
    .clk, .rst_n, .clear(misr_clear), .en(misr_en), .d_in(misr_in), .sig(signature));

  initial begin
    assert (LFSR_W >= NUM_CHAINS && LFSR_W >= PI_W)
      else $error("lp_scan_bist: LFSR narrower than the chains or primary inputs");
  end

endmodule
