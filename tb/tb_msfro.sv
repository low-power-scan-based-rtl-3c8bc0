`timescale 1ns/1ps
// tb_msfro: checks the ring-oscillator model. With 'en' low the output must
// stay low; with 'en' high every half period must lie between
// STAGES*STAGE_DELAY_PS and that plus JITTER_PS, and the half periods must
// not all be equal (the jitter is what the random number generator uses).
module tb_msfro;
  logic en = 0, osc_out;
  int checks = 0, failures = 0;
  realtime last_t;
  real hp, hp_min = 1.0e9, hp_max = 0.0;

  msfro #(.STAGES(5), .STAGE_DELAY_PS(700), .JITTER_PS(60)) dut (.*);

  initial begin
    #20ns;
    checks++; if (osc_out !== 1'b0) begin failures++; $display("FAIL output while disabled"); end
    en = 1;
    @(osc_out); last_t = $realtime;
    for (int i = 0; i < 400; i++) begin
      @(osc_out);
      hp = ($realtime - last_t) * 1000.0;   // ps
      last_t = $realtime;
      if (hp < hp_min) hp_min = hp;
      if (hp > hp_max) hp_max = hp;
      checks++;
      if (hp < 3499.0 || hp > 3561.0) begin failures++; if (failures < 10) $display("FAIL half period %f ps", hp); end
    end
    checks++; if (hp_max - hp_min < 10.0) begin failures++; $display("FAIL no jitter"); end
    en = 0; #20ns;
    checks++; if (osc_out !== 1'b0) begin failures++; $display("FAIL output after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
