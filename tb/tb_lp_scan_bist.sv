`timescale 1ns/1ps
// tb_lp_scan_bist: end-to-end test of the low-power scan BIST at its default
// sizes (4 chains x 8 cells, 16-bit LFSR and MISR, 4 degraded sub-circuits
// of 64 pseudorandom cycles, 4 seeds with 4 extra variables, 128-bit TRNG).
//
// The circuit under test is a small sequential function written here
// (cut_fn); an optional stuck-at-0 fault on one next-state bit turns it into
// a faulty circuit. For every session an independent cycle model
// (model_session) recomputes the whole test from the seed and the scan
// contents at the start: LFSR, per-sub-circuit masks and weighted test
// enables, reseeding with extra-variable injection, one-chain-at-a-time
// shifting, captures, unload and signature.
// The model's fault-free signature is given as the golden signature.
// Sessions: 1) configuration seed, fault-free circuit: status must be low;
// 2) same seed, faulty circuit: status must be high and the signature must
// equal the model's faulty signature; 3) TRNG seed (must equal the low bits
// of the TRNG word), fault-free. Also checks functional mode before and
// after sessions, the session length, the balance of ones in the TRNG
// words and that no word repeats, and counts each mechanism.
module tb_lp_scan_bist;
  import lpbist_pkg::*;
  localparam int NC = 4, CL = 8, NCELL = 32, PIW = 8, NS = 4, PR = 64, NSUB = 4, NX = 4;

  logic clk = 0, rst_n = 1, start = 0, use_trng_seed = 0, seed_we = 0;
  logic [15:0] cfg_seed = 16'hC0DE, golden_sig = '0, signature, prpg_seed;
  logic [19:0] seed_wdata = '0;
  logic [1:0] seed_waddr = '0, pr_subckt;
  logic [3:0][3:0] chain_mask;
  te_weight_t [3:0][3:0] te_weight;
  logic [7:0] normal_pi = 8'h3C, cut_pi;
  logic [31:0] cut_state, cut_next;
  logic test_mode, bist_done, bist_fault, trng_valid;
  bist_state_e bist_state;
  logic [127:0] trng_word;

  logic fault_en = 0;
  localparam int FAULT_BIT = 13;
  logic [15:0] seeds [NS];
  logic [3:0]  extras [NS];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_pr_shift = 0, n_pr_capture = 0, n_masked = 0, n_reseed = 0, n_det_shift = 0;
  int n_det_capture = 0, n_unload = 0, n_func = 0, n_trng_words = 0, n_trng_sessions = 0;
  int n_cfg_sessions = 0, n_fault_detect = 0, n_pass = 0, n_inject = 0;
  int n_subckt [NSUB];

  lp_scan_bist dut (.*);
  always #5 clk = ~clk;

  // ---------------------------------------------------------- circuit under test
  function automatic logic [31:0] cut_fn(input logic [31:0] s, input logic [7:0] pi, input logic flt);
    logic [31:0] n;
    for (int j = 0; j < 32; j++)
      n[j] = s[(j + 1) % 32] ^ (s[(j + 5) % 32] & pi[j % 8]) ^ (s[(j + 13) % 32] | s[(j + 22) % 32]) ^ pi[(j + 3) % 8];
    if (flt) n[FAULT_BIT] = 1'b0;
    return n;
  endfunction
  always_comb cut_next = cut_fn(cut_state, cut_pi, fault_en);

  // ---------------------------------------------------------- reference model
  function automatic logic [15:0] lfsr_nxt(input logic [15:0] s);
    logic [15:0] r = {1'b0, s[15:1]};
    if (s[0]) begin r[15] ^= 1'b1; r[13] ^= 1'b1; r[12] ^= 1'b1; r[10] ^= 1'b1; end
    return r;
  endfunction

  function automatic logic [15:0] misr_nxt(input logic [15:0] s, input logic [3:0] d);
    logic [15:0] r;
    r[0] = s[15] ^ d[0];
    for (int b = 1; b < 16; b++) begin
      r[b] = s[b-1];
      if (b < 4) r[b] ^= d[b];
      if (b == 5 || b == 12) r[b] ^= s[15];
    end
    return r;
  endfunction

  // cells[c] holds chain c, bit k = cell k (cell 0 at scan-in)
  function automatic logic [15:0] model_session(input logic [15:0] seed, input logic [31:0] st0,
                                                input logic flt, output int n_sh, output int n_cp);
    logic [15:0] lf, ms;
    logic [31:0] st, nx;
    logic [3:0] d;
    lf = (seed == 0) ? 16'd1 : seed;
    ms = '0;
    n_sh = 0;
    n_cp = 0;
    st = st0;
    for (int c = 0; c < NSUB * PR; c++) begin
      int u;
      u = c / PR;
      nx = cut_fn(st, lf[7:0], flt);
      d = '0;
      for (int i = 0; i < NC; i++) if (chain_mask[u][i]) begin
        logic capt;
        capt = 1'b1;
        for (int j = 0; j <= int'(te_weight[u][i]); j++) capt &= lf[4*i + j];
        if (!capt) begin
          d[i] = st[i*CL + CL-1];
          st[i*CL +: CL] = {st[i*CL +: CL-1], lf[i]};
          n_sh++;
        end else begin
          st[i*CL +: CL] = nx[i*CL +: CL];
          n_cp++;
        end
      end
      ms = misr_nxt(ms, d);
      lf = lfsr_nxt(lf);
    end
    for (int s = 0; s < NS; s++) begin
      lf = (seeds[s] == 0) ? 16'd1 : seeds[s];
      for (int ch = 0; ch < NC; ch++)
        for (int b = 0; b < CL; b++) begin
          d = '0;
          d[ch] = st[ch*CL + CL-1];
          st[ch*CL +: CL] = {st[ch*CL +: CL-1], lf[ch]};
          ms = misr_nxt(ms, d);
          lf = lfsr_nxt(lf);
          if (ch == 0 && b < NX) lf[15] ^= extras[s][b];
        end
      st = cut_fn(st, lf[7:0], flt);
    end
    for (int b = 0; b < CL; b++) begin
      for (int i = 0; i < NC; i++) begin
        d[i] = st[i*CL + CL-1];
        st[i*CL +: CL] = {st[i*CL +: CL-1], 1'b0};
      end
      ms = misr_nxt(ms, d);
    end
    return ms;
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------- monitors
  // TRNG words: count ones and repeated words
  int trng_ones = 0, trng_repeats = 0;
  logic [127:0] prev_word = '0;
  always @(posedge clk) if (rst_n) begin
    if (trng_valid) begin
      n_trng_words++;
      trng_ones += $countones(trng_word);
      if (n_trng_words > 1 && trng_word == prev_word) trng_repeats++;
      prev_word = trng_word;
    end
    case (bist_state)
      ST_PR: begin
        n_subckt[pr_subckt]++;
        for (int i = 0; i < NC; i++) if (!chain_mask[pr_subckt][i]) n_masked++;
      end
      ST_DET_LOAD:  n_reseed++;
      ST_DET_SHIFT: n_det_shift++;
      ST_DET_CAPT:  n_det_capture++;
      ST_UNLOAD:    n_unload++;
      ST_IDLE, ST_DONE: n_func++;
      default: ;
    endcase
  end

  // functional mode: normal inputs reach the circuit, chains capture every cycle
  logic [31:0] exp_state;
  logic        func_prev = 0;
  always @(negedge clk) if (rst_n) begin
    if (func_prev) begin
      checks++;
      if (cut_state !== exp_state) begin failures++; if (failures < 20) $display("FAIL functional capture"); end
    end
    func_prev = !test_mode && (bist_state == ST_IDLE || bist_state == ST_DONE) && !start;
    if (!test_mode) begin
      checks++;
      if (cut_pi !== normal_pi) begin failures++; $display("FAIL normal inputs not selected"); end
    end
    if (($urandom % 8) == 0) normal_pi = 8'($urandom);
    exp_state = cut_fn(cut_state, normal_pi, fault_en);
  end

  // ---------------------------------------------------------- one session
  task automatic run_session(input logic trng, input logic flt, input logic exp_fault,
                             input int exp_len);
    int len = 0;
    logic [15:0] good, bad;
    logic [127:0] w;
    int sh, cp, sh2, cp2;
    use_trng_seed = trng;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    len = 1;
    // wait for the pseudorandom phase: state and seed are now fixed
    while (bist_state != ST_PR) begin
      if (trng_valid) w = trng_word;
      @(negedge clk); len++;
    end
    if (trng) begin
      chk(prpg_seed == w[15:0], "TRNG seed taken from the TRNG word");
      n_trng_sessions++;
    end else begin
      chk(prpg_seed == cfg_seed, "configuration seed used");
      n_cfg_sessions++;
    end
    chk(test_mode == 1'b1, "test mode during BIST");
    // shift/capture events of the PR phase come from the model, whose
    // signature must match the design's
    good = model_session(prpg_seed, cut_state, 1'b0, sh, cp);
    bad  = model_session(prpg_seed, cut_state, 1'b1, sh2, cp2);
    n_pr_shift += sh;
    n_pr_capture += cp;
    chk(good != bad, "fault changes the signature");
    golden_sig = good;
    fault_en = flt;
    while (!bist_done) begin @(negedge clk); len++; end
    fault_en = 0;
    chk(signature == (flt ? bad : good), "signature equals model");
    chk(bist_fault == exp_fault, "status line");
    if (bist_fault) n_fault_detect++; else n_pass++;
    if (exp_len > 0) chk(len == exp_len, $sformatf("session length %0d, expected %0d", len, exp_len));
    chk(test_mode == 1'b0, "normal inputs reconnected after BIST");
    repeat (20) @(negedge clk);
  endtask

  initial begin
    // degraded sub-circuits: chains clocked and test-enable weights of each
    chain_mask[0] = 4'b1011; chain_mask[1] = 4'b0101; chain_mask[2] = 4'b1110; chain_mask[3] = 4'b0011;
    for (int u = 0; u < NSUB; u++)
      for (int i = 0; i < NC; i++) te_weight[u][i] = 2'((i + u) % 4);
    for (int u = 0; u < NSUB; u++) n_subckt[u] = 0;
    #1 rst_n = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int s = 0; s < NS; s++) begin
      seeds[s] = 16'($urandom);
      extras[s] = 4'($urandom);
      if (extras[s] != 0) n_inject++;
      @(negedge clk); seed_we = 1; seed_waddr = 2'(s); seed_wdata = {extras[s], seeds[s]};
    end
    @(negedge clk); seed_we = 0;
    repeat (10) @(negedge clk);
    // 1) configuration seed, fault-free: bist_done rises 2+NSUB*PR+NS*(2+32)+CL
    //    clock edges after the edge that samples start (len counts that edge too)
    run_session(1'b0, 1'b0, 1'b0, 1 + 2 + NSUB * PR + NS * (2 + NC * CL) + CL);
    // 2) same seed, faulty circuit
    run_session(1'b0, 1'b1, 1'b1, 1 + 2 + NSUB * PR + NS * (2 + NC * CL) + CL);
    // 3) TRNG seed, another mask for sub-circuit 0
    chain_mask[0] = 4'b0110;
    run_session(1'b1, 1'b0, 1'b0, 0);

    chk(n_pr_shift > 0,     "mechanism: weighted PR shift");
    chk(n_pr_capture > 0,   "mechanism: weighted PR capture");
    chk(n_masked > 0,       "mechanism: disabled chains in PR");
    for (int u = 0; u < NSUB; u++)
      chk(n_subckt[u] == 3 * PR, $sformatf("mechanism: degraded sub-circuit %0d", u));
    chk(n_inject > 0,       "mechanism: extra variables injected");
    chk(n_reseed == 3 * NS, "mechanism: reseeding");
    chk(n_det_shift == 3 * NS * NC * CL, "mechanism: one-chain deterministic shift");
    chk(n_det_capture == 3 * NS, "mechanism: deterministic capture");
    chk(n_unload == 3 * CL, "mechanism: unload");
    chk(n_func > 0,         "mechanism: functional mode");
    chk(n_trng_words > 0,   "mechanism: TRNG word");
    // the first word holds two reset zeros; all words together must be
    // roughly balanced and no word may repeat
    chk(trng_ones * 100 > n_trng_words * 128 * 35 && trng_ones * 100 < n_trng_words * 128 * 65,
        $sformatf("TRNG bit balance: %0d ones in %0d words", trng_ones, n_trng_words));
    chk(trng_repeats == 0,  "TRNG words differ");
    chk(n_trng_sessions == 1 && n_cfg_sessions == 2, "mechanism: seed sources");
    chk(n_fault_detect == 1 && n_pass == 2, "mechanism: pass and fault detection");
    $display("mechanisms: pr_shift=%0d pr_capture=%0d masked=%0d reseed=%0d det_shift=%0d det_capture=%0d unload=%0d func=%0d trng_words=%0d fault_detect=%0d pass=%0d seeds_with_extra=%0d",
             n_pr_shift, n_pr_capture, n_masked, n_reseed, n_det_shift, n_det_capture, n_unload,
             n_func, n_trng_words, n_fault_detect, n_pass, n_inject);
    $display("TRNG: %0d words, %0d ones of %0d bits", n_trng_words, trng_ones, n_trng_words * 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
