`timescale 1ns/1ps
// msfro: behavioural model of a multistage feedback ring oscillator.
// This is a simulation model of an analog part, not synthesizable logic.
//
// The real part is a ring of inverting stages with extra feedback paths
// between stages; its output toggles with a period set by the loop delay and
// disturbed by thermal noise (jitter), which is the TRNG's entropy. The model
// keeps only that: while 'en' is high, osc_out toggles every
// STAGES*STAGE_DELAY_PS picoseconds plus a uniformly random jitter of
// 0..JITTER_PS picoseconds drawn anew for each half period. With 'en' low the
// output stays low. Stage count, delay and jitter are this model's values.
module msfro #(
  parameter int unsigned STAGES         = 5,
  parameter int unsigned STAGE_DELAY_PS = 700,
  parameter int unsigned JITTER_PS      = 60
) (
  input  logic en,
  output logic osc_out
);

  int unsigned half_ps;

  always begin
    if (!en) begin
      osc_out = 1'b0;
      wait (en);
    end
    half_ps = STAGES * STAGE_DELAY_PS + ((JITTER_PS > 0) ? ($urandom % (JITTER_PS + 1)) : 0);
    #(half_ps * 1ps);
    if (en) osc_out = ~osc_out;
  end

endmodule
