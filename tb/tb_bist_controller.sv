`timescale 1ns/1ps
// tb_bist_controller: runs sessions of the test controller (PR_CYCLES = 10
// per sub-circuit, 4 sub-circuits) and checks, cycle by cycle, the expected
// schedule worked out from the phase lengths: seed load; for each degraded
// sub-circuit PR_CYCLES cycles with sub_idx = that sub-circuit,
// chain_ce = its mask and chain_te = weighted enables; per seed a reload
// from the right store address, 8 shift cycles per chain in chain order with
// one chain enabled and the seed's 4 extra variables injected in the first 4
// cycles; one capture cycle; 8 unload cycles with zero scan input; status.
// Sessions: configuration seed with matching and mismatching golden
// signature, and a TRNG-seeded session that must wait for trng_valid.
module tb_bist_controller;
  import lpbist_pkg::*;
  localparam int NC = 4, CL = 8, NS = 4, PR = 10, NSUB = 4, NX = 4;
  logic clk = 0, rst_n = 0, start = 0, use_trng_seed = 0, trng_valid = 0;
  logic [15:0] cfg_seed = 16'h5A5A, trng_seed = 16'hBEEF, lfsr_seed, seed_rdata, prpg_seed;
  logic [3:0] masks [NSUB], chain_mask, te_weighted = '0, chain_ce, chain_te;
  logic [1:0] sub_idx;
  logic [3:0] seed_extra;
  logic lfsr_inject;
  logic lfsr_load, lfsr_step, scan_in_zero, misr_clear, misr_en, test_mode, bist_done, bist_fault;
  logic [1:0] seed_raddr;
  logic [15:0] misr_sig = 16'h1111, golden_sig = 16'h1111;
  bist_state_e state;
  int checks = 0, failures = 0;

  bist_controller #(.PR_CYCLES(PR)) dut (.*);
  always #5 clk = ~clk;
  assign seed_rdata = 16'h1000 + 16'(seed_raddr);   // address-tagged seeds
  assign seed_extra = 4'(4'hA ^ 4'(seed_raddr));
  assign chain_mask = masks[sub_idx];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s (state=%s)", what, state.name()); end
  endtask

  // one session; returns cycles from start edge to done
  task automatic session(input logic trng, input int trng_delay, input logic exp_fault);
    int wait_c = 0;
    use_trng_seed = trng;
    @(negedge clk); start = 1;
    // IDLE/DONE cycle: functional capture, normal inputs
    chk(test_mode == 0 && chain_ce == '1 && chain_te == '0, "functional mode before start");
    @(negedge clk); start = 0;
    // SEED
    chk(state == ST_SEED && misr_clear, "seed state");
    if (trng) begin
      while (wait_c < trng_delay) begin
        chk(!lfsr_load && state == ST_SEED, "waits for trng"); wait_c++; @(negedge clk);
      end
      trng_valid = 1; #1;
      chk(lfsr_load && lfsr_seed == trng_seed, "trng seed load");
      @(negedge clk); trng_valid = 0;
    end else begin
      chk(lfsr_load && lfsr_seed == cfg_seed, "cfg seed load");
      @(negedge clk);
    end
    chk(prpg_seed == (trng ? trng_seed : cfg_seed), "prpg_seed");
    // PR phase
    for (int u = 0; u < NSUB; u++)
      for (int c = 0; c < PR; c++) begin
        te_weighted = 4'($urandom); #1;
        chk(state == ST_PR && sub_idx == 2'(u) && chain_ce == masks[u] && chain_te == te_weighted
            && lfsr_step && misr_en && test_mode, "pr cycle");
        @(negedge clk);
      end
    // deterministic phase
    for (int s = 0; s < NS; s++) begin
      chk(state == ST_DET_LOAD && lfsr_load && seed_raddr == 2'(s) && lfsr_seed == 16'h1000 + 16'(s)
          && chain_ce == '0, "det load");
      @(negedge clk);
      for (int ch = 0; ch < NC; ch++)
        for (int b = 0; b < CL; b++) begin
          logic [3:0] ex;
          ex = 4'hA ^ 4'(s);
          chk(state == ST_DET_SHIFT && chain_ce == 4'(1 << ch) && chain_te == '1 && lfsr_step && misr_en,
              "det shift");
          chk(lfsr_inject == ((ch == 0 && b < NX) ? ex[b] : 1'b0), "extra variable injection");
          @(negedge clk);
        end
      chk(state == ST_DET_CAPT && chain_ce == '1 && chain_te == '0 && !lfsr_step && !misr_en, "det capture");
      @(negedge clk);
    end
    for (int b = 0; b < CL; b++) begin
      chk(state == ST_UNLOAD && chain_ce == '1 && chain_te == '1 && scan_in_zero && misr_en, "unload");
      @(negedge clk);
    end
    chk(state == ST_COMPARE && !bist_done, "compare");
    @(negedge clk);
    chk(state == ST_DONE && bist_done && bist_fault == exp_fault && test_mode == 0, "done/status");
    repeat (3) @(negedge clk);
    chk(bist_done && bist_fault == exp_fault && chain_ce == '1, "status held");
  endtask

  initial begin
    masks[0] = 4'b0101; masks[1] = 4'b1100; masks[2] = 4'b0011; masks[3] = 4'b1010;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(state == ST_IDLE && !bist_done, "idle after reset");
    session(0, 0, 0);
    golden_sig = 16'h2222;
    session(0, 0, 1);
    golden_sig = 16'h1111; masks[1] = 4'b1110;
    session(1, 7, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
