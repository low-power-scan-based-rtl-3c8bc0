`timescale 1ns/1ps
// tb_weighted_te_gen: checks the weighted test-enable generator.
// For random LFSR words and weights the expected test enable is computed
// from the low k bits of each chain's nibble (k = weight+1); the capture
// rates over many random words are also checked against 2^-k.
module tb_weighted_te_gen;
  logic [15:0] rnd;
  lpbist_pkg::te_weight_t [3:0] weight;
  logic [3:0] te;
  int checks = 0, failures = 0;
  int capt [4];

  weighted_te_gen dut (.*);

  initial begin
    for (int n = 0; n < 4000; n++) begin
      rnd = 16'($urandom);
      for (int i = 0; i < 4; i++) weight[i] = 2'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        int k;
        logic [3:0] nib, msk;
        logic exp_te;
        k = int'(weight[i]) + 1;
        nib = rnd[4*i +: 4];
        msk = 4'((1 << k) - 1);
        exp_te = (nib & msk) != msk;
        checks++;
        if (te[i] !== exp_te) begin failures++; if (failures < 10) $display("FAIL n=%0d chain %0d", n, i); end
      end
    end
    // rates: fix weights 0..3 on chains 0..3
    for (int i = 0; i < 4; i++) begin weight[i] = 2'(i); capt[i] = 0; end
    for (int n = 0; n < 16384; n++) begin
      rnd = 16'($urandom); #1;
      for (int i = 0; i < 4; i++) if (!te[i]) capt[i]++;
    end
    for (int i = 0; i < 4; i++) begin
      int expc;
      expc = 16384 >> (i + 1);
      checks++;
      if (capt[i] < expc * 8 / 10 || capt[i] > expc * 12 / 10) begin
        failures++; $display("FAIL rate chain %0d: %0d captures, expected about %0d", i, capt[i], expc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
